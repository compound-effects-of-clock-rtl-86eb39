// Iterative AES-128 encryption core, one round per clock.
//
// start (sampled while idle) loads state = pt ^ key (the initial AddRoundKey)
// and the key into the round-key register. On each of the next ten clocks the
// core applies SubBytes (16 S-boxes), ShiftRows, MixColumns (skipped in round
// 10) and AddRoundKey with the next round key, which is expanded on the fly
// from the current one (4 more S-boxes, rcon doubled each round). done pulses
// for one clock after the tenth round, 10 clocks after the start edge, with
// ct valid from then until the next start; busy is high in between and start
// is ignored while busy.
//
// The source design treats AES-128 as an unmodified standard block and only
// gives its algorithm (ten rounds of the four steps, last round without
// MixColumns, a key schedule); this round-per-clock architecture and the
// start/done handshake are this design's choice. Byte 0 is in bits 127:120.
module aes128 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic [127:0] ct,
  output logic         busy,
  output logic         done
);
  import aes_pkg::*;

  block_t     state_q, rkey_q;
  logic [7:0] rcon_q;
  logic [3:0] round_q;

  // SubBytes on the state
  block_t sub_state;
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.in_byte (state_q[127 - 8*i -: 8]), .out_byte (sub_state[127 - 8*i -: 8]));
  end

  // Next round key: SubWord(RotWord(w3)) ^ rcon, then the XOR chain
  logic [31:0] w3_rot, w3_sub, temp;
  block_t      rkey_next;
  assign w3_rot = {rkey_q[23:0], rkey_q[31:24]};
  for (genvar i = 0; i < 4; i++) begin : g_ksbox
    aes_sbox u_sbox (.in_byte (w3_rot[31 - 8*i -: 8]), .out_byte (w3_sub[31 - 8*i -: 8]));
  end
  assign temp = w3_sub ^ {rcon_q, 24'h0};
  always_comb begin
    rkey_next[127:96] = rkey_q[127:96] ^ temp;
    rkey_next[95:64]  = rkey_q[95:64]  ^ rkey_next[127:96];
    rkey_next[63:32]  = rkey_q[63:32]  ^ rkey_next[95:64];
    rkey_next[31:0]   = rkey_q[31:0]   ^ rkey_next[63:32];
  end

  block_t shifted, mixed, state_next;
  logic   last_round;
  assign last_round = (round_q == 4'd10);
  assign shifted    = shift_rows(sub_state);
  assign mixed      = last_round ? shifted : mix_columns(shifted);
  assign state_next = mixed ^ rkey_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rkey_q  <= '0;
      rcon_q  <= 8'h01;
      round_q <= 4'd0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= pt ^ key;
          rkey_q  <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= state_next;
        rkey_q  <= rkey_next;
        rcon_q  <= xtime(rcon_q);
        if (last_round) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule
