// sbox8_tb: exhaustive test of the split SOP/ROM S-box against the reference S-box
// (GF(2^8) inverse plus affine map), plus four FIPS-197 table entries.
module sbox8_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  logic [7:0] din, dout;
  sbox8 dut (.din(din), .dout(dout));

  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input u8 x, input u8 exp);
    @(negedge clk);
    din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL S(%h) = %h, expected %h", x, dout, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    for (int x = 0; x < 256; x++) check(u8'(x), sbox(u8'(x)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
