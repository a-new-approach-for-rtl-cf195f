// aes_subbytes_tb: SubBytes on the FIPS-197 Appendix B round-1 state and on random states.
module aes_subbytes_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  u128 state_in, round_key, state_out;
  aes_subbytes dut (.state_in(state_in), .state_out(state_out));

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
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, '0, 128'hd42711aee0bf98f1b8b45de51e415230);
    for (int i = 0; i < 500; i++) begin
      u128 s, k;
      s = rand128();
      k = rand128();
      check(s, k, sub_bytes(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
