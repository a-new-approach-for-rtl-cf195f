// aes_addroundkey: the AES AddRoundKey transformation, a bitwise XOR of the
// 128-bit state with the 128-bit round key.  Purely combinational.
module aes_addroundkey
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
