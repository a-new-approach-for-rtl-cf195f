// aes_round: one full AES encryption round.
//
// SubBytes (sixteen split SOP/ROM S-boxes), ShiftRows, MixColumns and AddRoundKey,
// chained combinationally in the FIPS-197 order.  AES-128 uses nine of these
// (rounds 1..9).  Interface: state_in and round_key in, state_out out.
module aes_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  state_t round_key,
  output state_t state_out
);

  state_t s_sub, s_shift, s_mix;

  aes_subbytes    u_sub   (.state_in(state_in), .state_out(s_sub));
  aes_shiftrows   u_shift (.state_in(s_sub),    .state_out(s_shift));
  aes_mixcolumns  u_mix   (.state_in(s_shift),  .state_out(s_mix));
  aes_addroundkey u_ark   (.state_in(s_mix),    .round_key(round_key), .state_out(state_out));

endmodule
