// aes_subround: the final AES encryption round (the "sub-round").
//
// SubBytes, ShiftRows and AddRoundKey, without MixColumns, as FIPS-197
// prescribes for the last round.  Interface: state_in and round_key in,
// state_out (the ciphertext) out.  Purely combinational.
module aes_subround
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  state_t s_sub, s_shift;

  aes_subbytes    u_sub   (.state_in(state_in), .state_out(s_sub));
  aes_shiftrows   u_shift (.state_in(s_sub),    .state_out(s_shift));
  aes_addroundkey u_ark   (.state_in(s_shift),  .round_key(round_key), .state_out(state_out));

endmodule
