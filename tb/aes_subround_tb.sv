// aes_subround_tb: the final round on FIPS-197 Appendix B round 10 and on random state/key pairs.
module aes_subround_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  u128 state_in, round_key, state_out;
  aes_subround dut (.state_in(state_in), .round_key(round_key), .state_out(state_out));

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input u128 s, input u128 k, input u128 exp);
    @(negedge clk);
    state_in = s;
    round_key = k;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL in %h key %h: got %h, expected %h", s, k, state_out, exp);
    end
  endtask

  initial begin
    check(128'heb40f21e592e38848ba113e71bc342d2, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 500; i++) begin
      u128 s, k;
      s = rand128();
      k = rand128();
      check(s, k, shift_rows(sub_bytes(s)) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
