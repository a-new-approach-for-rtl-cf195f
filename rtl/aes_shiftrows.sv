// aes_shiftrows: the AES ShiftRows transformation ("shifter").
//
// Row r of the 4x4 state is rotated left by r byte positions:
// out(r, c) = in(r, (c + r) mod 4), with byte i of the 128-bit vector in row
// i%4, column i/4 (byte 0 in bits 127:120).  It is a fixed byte permutation,
// pure wiring with no logic.  Interface: state_in in, state_out out.
module aes_shiftrows
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] =
          state_in[127 - 8*(r + 4*((c + r) % 4)) -: 8];

endmodule
