// aes_mixcolumns_tb: MixColumns on the FIPS-197 Appendix B round-1 state, on the column db 13 53 45 -> 8e 4d a1 bc and on random states.
module aes_mixcolumns_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  u128 state_in, round_key, state_out;
  aes_mixcolumns dut (.state_in(state_in), .state_out(state_out));

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
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5, '0, 128'h046681e5e0cb199a48f8d37a2806264c);
    check({4{32'hdb135345}}, '0, {4{32'h8e4da1bc}});
    for (int i = 0; i < 500; i++) begin
      u128 s, k;
      s = rand128();
      k = rand128();
      check(s, k, mix_columns(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
