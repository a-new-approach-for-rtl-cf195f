// sbox_subblock_tb: exhaustive test of the S-box sub-block.
// All sixteen sub-ranges are instantiated (RANGE = 0..15); for every low
// nibble each output is compared with the reference S-box computed from the
// GF(2^8) inverse and the affine map, and the upper/lower halves are checked
// separately so a fault in either the SOP logic or the ROM is reported.
module sbox_subblock_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  logic [3:0] nib;
  logic [7:0] outs [16];

  for (genvar r = 0; r < 16; r++) begin : g_dut
    sbox_subblock #(.RANGE(r)) dut (.nib(nib), .sub_out(outs[r]));
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      nib = 4'(n);
      #1;
      for (int r = 0; r < 16; r++) begin
        u8 exp;
        exp = sbox(u8'(16*r + n));
        checks += 2;
        if (outs[r][7:4] !== exp[7:4]) begin
          failures++;
          $display("FAIL range %0d nib %0d: SOP nibble %h, expected %h", r, n, outs[r][7:4], exp[7:4]);
        end
        if (outs[r][3:0] !== exp[3:0]) begin
          failures++;
          $display("FAIL range %0d nib %0d: ROM nibble %h, expected %h", r, n, outs[r][3:0], exp[3:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
