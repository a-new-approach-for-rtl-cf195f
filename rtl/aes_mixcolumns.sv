// aes_mixcolumns: the AES MixColumns transformation.
//
// Each column (a0..a3) is multiplied over GF(2^8) by the circulant matrix
// [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2].  Multiplication by 2 is xtime (a left
// shift with a conditional XOR of 8'h1b); multiplication by 3 is xtime(a)^a.
// Interface: state_in in, state_out out (byte 0 in bits 127:120, column c is
// bytes 4c..4c+3).  Purely combinational.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      byte_t x2 [4];
      for (int r = 0; r < 4; r++) begin
        a[r]  = get_byte(state_in, 4*c + r);
        x2[r] = xtime(a[r]);
      end
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] =
          x2[r] ^ (x2[(r+1)%4] ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    end

endmodule
