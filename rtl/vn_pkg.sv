// Shared types and constants for the noise-based countermeasure blocks.
//
// vn_row_type_e selects what each row of the voltage-noise array holds:
// a plain ring of shift registers (VN_SRL, every bit toggles on every
// enabled clock) or the same chain with XOR feedback (VN_SRL_LFSR, a long
// LFSR). The default LFSR polynomials are maximal-length choices of this
// design; the source design only says that a 32-bit LFSR (noise array) and
// an 8-bit LFSR (clock-phase noise) are used.
package vn_pkg;

  typedef enum logic {
    VN_SRL      = 1'b0,
    VN_SRL_LFSR = 1'b1
  } vn_row_type_e;

  // x^32 + x^22 + x^2 + x + 1, bit k of the mask taps state bit k
  localparam logic [31:0] LFSR32_TAPS = 32'h8020_0003;
  // x^8 + x^6 + x^5 + x^4 + 1
  localparam logic [7:0]  LFSR8_TAPS  = 8'hB8;

  // Alternating 1/0 pattern for one shift register of the given depth,
  // bit 0 (the newest bit) being 0.
  function automatic logic [63:0] alt_pattern(input int unsigned depth);
    logic [63:0] p;
    p = '0;
    for (int unsigned b = 0; b < depth && b < 64; b++) p[b] = b[0];
    return p;
  endfunction

endpackage
