// aes_key_expand: one step of the AES-128 key schedule.
//
// From round key i (words w0..w3) and the round constant of step i+1 it forms
// round key i+1:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// SubWord uses four instances of the split SOP/ROM S-box (sbox8).  The key schedule
// itself is the standard one of FIPS-197.  Ten steps in a row produce all
// round keys of AES-128; the top module places one step in each pipeline
// stage.  Interface: key_in[127:0], rcon[7:0] in, key_out[127:0] out (word 0
// in bits 127:96).  Purely combinational.
module aes_key_expand
  import aes_pkg::*;
(
  input  state_t      key_in,
  input  logic [7:0]  rcon,
  output state_t      key_out
);

  logic [31:0] w [4];
  logic [31:0] rot, sub, t;
  logic [31:0] nw [4];

  always_comb
    for (int j = 0; j < 4; j++) w[j] = key_in[127 - 32*j -: 32];

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    sbox8 u_sbox (.din(rot[31 - 8*b -: 8]), .dout(sub[31 - 8*b -: 8]));
  end

  assign t = sub ^ {rcon, 24'h0};

  always_comb begin
    nw[0] = w[0] ^ t;
    for (int j = 1; j < 4; j++) nw[j] = w[j] ^ nw[j-1];
  end

  assign key_out = {nw[0], nw[1], nw[2], nw[3]};

endmodule
