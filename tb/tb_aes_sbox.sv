// Exhaustive test of the AES S-box ROM against an independent exp/log-table
// computation and a few values of the published table.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte (in_byte), .out_byte (out_byte));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i);
      #1;
      check(out_byte, ref_sbox(8'(i)), $sformatf("sbox[%02h]", i));
    end
    // published anchor values
    in_byte = 8'h00; #1; check(out_byte, 8'h63, "anchor 00");
    in_byte = 8'h01; #1; check(out_byte, 8'h7c, "anchor 01");
    in_byte = 8'h53; #1; check(out_byte, 8'hed, "anchor 53");
    in_byte = 8'hff; #1; check(out_byte, 8'h16, "anchor ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
