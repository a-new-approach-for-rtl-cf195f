// sbox_subblock: one sub-range of the split SOP/ROM 8-bit AES S-box.
//
// The S-box input range 0..255 is cut into sixteen sub-ranges of sixteen
// values; this block serves sub-range RANGE, i.e. inputs 16*RANGE .. 16*RANGE+15,
// and sees only the low input nibble `nib`.  Following the reference
// architecture, the output byte is produced in two halves:
//   * the upper nibble by four 4-input sum-of-products functions of `nib`
//     ("SOP 4x1"), one per output bit;
//   * the lower nibble by a 16-word x 4-bit ROM addressed by `nib` ("ROM 16x4").
// The sixteen sub-block outputs are selected by the upper input nibble in sbox8.
//
// The SOP functions here are written in canonical form (the OR of the
// minterms where the output bit is 1); a synthesis tool minimises them the
// way a hand K-map would.  The minterm lists and the ROM contents are derived
// at elaboration time from the standard AES table in aes_pkg.
//
// Interface: nib[3:0] in, sub_out[7:0] out.  Purely combinational.
module sbox_subblock
  import aes_pkg::*;
#(
  parameter int unsigned RANGE = 0   // sub-range index, 0..15
) (
  input  logic [3:0] nib,
  output logic [7:0] sub_out
);

  // Truth tables of the four upper output bits: SOP_TT[k][n] is bit 4+k of
  // the S-box output for input 16*RANGE+n.
  function automatic logic [3:0][15:0] sop_tables(input int unsigned r);
    logic [3:0][15:0] tt;
    for (int unsigned n = 0; n < 16; n++)
      for (int unsigned k = 0; k < 4; k++)
        tt[k][n] = SBOX_TABLE[16*r + n][4+k];
    return tt;
  endfunction

  // Lower-nibble ROM contents.
  function automatic logic [15:0][3:0] rom_contents(input int unsigned r);
    logic [15:0][3:0] m;
    for (int unsigned n = 0; n < 16; n++) m[n] = SBOX_TABLE[16*r + n][3:0];
    return m;
  endfunction

  localparam logic [3:0][15:0] SOP_TT  = sop_tables(RANGE);
  localparam logic [15:0][3:0] ROM_INIT = rom_contents(RANGE);

  // 16x4 ROM.
  logic [3:0] rom [16];
  always_comb
    for (int n = 0; n < 16; n++) rom[n] = ROM_INIT[n];

  // Minterms of nib: product of the four literals, true or complemented.
  logic [15:0] minterm;
  always_comb
    for (int n = 0; n < 16; n++) begin
      logic [3:0] lit;
      for (int b = 0; b < 4; b++) lit[b] = n[b] ? nib[b] : ~nib[b];
      minterm[n] = &lit;
    end

  // Four SOP functions for the upper nibble.
  logic [3:0] upper;
  always_comb
    for (int k = 0; k < 4; k++) upper[k] = |(minterm & SOP_TT[k]);

  assign sub_out = {upper, rom[nib]};

endmodule
