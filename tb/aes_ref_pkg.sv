// Reference AES-128 model for the testbenches, written independently of the
// RTL: the S-box comes from exp/log tables of the generator 3 and the bitwise
// form of the affine map, and the cipher uses a full 44-word key expansion
// on a 4x4 byte array.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] mul2(input logic [7:0] a);
    mul2 = {a[6:0], 1'b0};
    if (a[7]) mul2 ^= 8'h1b;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] ex [256];
    int         lg [256];
    logic [7:0] b, s;
    logic [7:0] aff_c;
    aff_c = 8'h63;
    ex[0] = 8'h01;
    for (int i = 1; i < 256; i++) ex[i] = ex[i-1] ^ mul2(ex[i-1]);
    for (int i = 0; i < 255; i++) lg[ex[i]] = i;
    b = (a == 0) ? 8'h00 : ex[(255 - lg[a]) % 255];
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ aff_c[i];
    return s;
  endfunction

  function automatic logic [127:0] ref_encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0]  sb [256];
    logic [31:0] w [44];
    logic [7:0]  st [4][4];
    logic [7:0]  t  [4][4];
    logic [31:0] tmp;
    logic [7:0]  rc;
    logic [127:0] out;
    for (int i = 0; i < 256; i++) sb[i] = ref_sbox(8'(i));
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]], sb[tmp[31:24]]} ^ {rc, 24'h0};
        rc  = mul2(rc);
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        st[r][c] = pt[127 - 8*(4*c + r) -: 8] ^ w[c][31 - 8*r -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          t[r][c] = sb[st[r][(c + r) % 4]];
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          if (rnd != 10)
            st[r][c] = mul2(t[r][c]) ^ mul2(t[(r+1)%4][c]) ^ t[(r+1)%4][c]
                     ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
          else
            st[r][c] = t[r][c];
        end
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          st[r][c] ^= w[4*rnd + c][31 - 8*r -: 8];
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        out[127 - 8*(4*c + r) -: 8] = st[r][c];
    return out;
  endfunction

endpackage
