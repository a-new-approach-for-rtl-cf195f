// sbox8: the split SOP/ROM 8-bit AES substitution box (SubBytes S-box).
//
// Sixteen sbox_subblock instances, one per sub-range of sixteen input values,
// all look at the low input nibble in parallel; each produces the S-box output
// for its own sub-range (upper nibble from sum-of-products logic, lower nibble
// from a 16x4 ROM).  A 16:1 multiplexer, selected by the upper input nibble,
// picks the output of the sub-block whose sub-range contains the input.
//
// Interface: din[7:0] in, dout[7:0] out.  Purely combinational.  The mapping
// is the AES S-box of FIPS-197.
module sbox8 (
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [7:0] sub_out [16];

  for (genvar r = 0; r < 16; r++) begin : g_sub
    sbox_subblock #(.RANGE(r)) u_sub (
      .nib    (din[3:0]),
      .sub_out(sub_out[r])
    );
  end

  // 16x1 multiplexer.
  assign dout = sub_out[din[7:4]];

endmodule
