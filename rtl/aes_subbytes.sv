// aes_subbytes: the AES SubBytes transformation.
//
// Each of the 16 state bytes goes through its own instance of the split SOP/ROM
// S-box (sbox8).  Interface: state_in[127:0] in, state_out[127:0] out, byte 0
// in bits 127:120.  Purely combinational.
module aes_subbytes
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar i = 0; i < NB_BYTES; i++) begin : g_byte
    sbox8 u_sbox (
      .din (state_in [127 - 8*i -: 8]),
      .dout(state_out[127 - 8*i -: 8])
    );
  end

endmodule
