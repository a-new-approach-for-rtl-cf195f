// aes128_top_tb: end-to-end test of the pipelined AES-128 core at its default
// parameters (ten rounds).
//
// Stimulus: the FIPS-197 Appendix B and C.1 vectors, then streams of random
// plaintext/key pairs sent back to back (one per clock, the key changing with
// every block), streams with random idle cycles (bubbles), and a reset in the
// middle of a stream.  A scoreboard compares each ciphertext with the
// reference model and checks that it leaves exactly NR clocks after its block
// entered.  Each mechanism (back-to-back issue, bubble, per-block key change,
// reset flush) is counted and the test fails if one never occurred.
module aes128_top_tb;
  import aes_ref_pkg::*;

  localparam int unsigned NR = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycles = 0;

  logic rst_n, in_valid, out_valid;
  u128  plaintext, key, ciphertext;

  aes128_top dut (
    .clk, .rst_n, .in_valid, .plaintext, .key, .out_valid, .ciphertext
  );

  // Scoreboard: expected ciphertext and issue cycle of every block in flight.
  u128    exp_q [$];
  longint cyc_q [$];
  int n_back_to_back = 0, n_bubbles = 0, n_key_changes = 0, n_flushed = 0, n_out = 0;
  logic   prev_valid = 1'b0;
  u128    prev_key = '0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Output monitor, sampling between clock edges; `cycles` then holds the
  // number of edges so far.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected output %h", ciphertext);
      end else begin
        u128 e;
        longint c;
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (ciphertext !== e) begin
          failures++;
          $display("FAIL ciphertext %h, expected %h", ciphertext, e);
        end
        if (cycles - c != longint'(NR)) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycles - c, NR);
        end
      end
    end
  end

  // Drive one cycle; valid blocks are recorded on the clock edge that takes them.
  task automatic drive(input logic v, input u128 pt, input u128 k);
    @(negedge clk);
    in_valid  = v;
    plaintext = pt;
    key       = k;
    if (rst_n && v) begin
      exp_q.push_back(encrypt(pt, k));
      cyc_q.push_back(cycles);   // edges seen before this block is presented
      if (prev_valid) n_back_to_back++;
      if (prev_valid && k != prev_key) n_key_changes++;
      prev_key = k;
    end
    if (rst_n && !v && prev_valid) n_bubbles++;
    prev_valid = v & rst_n;
    @(posedge clk);
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) drive(1'b0, rand128(), rand128());
  endtask

  task automatic check_known(input u128 pt, input u128 k, input u128 ct);
    checks++;
    if (encrypt(pt, k) !== ct) begin
      failures++;
      $display("FAIL reference model on known vector");
    end
    drive(1'b1, pt, k);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; plaintext = '0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 Appendix B and Appendix C.1, back to back.
    check_known(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
                128'h3925841d02dc09fbdc118597196a0b32);
    check_known(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
                128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    idle(NR + 2);

    // Full-rate stream, a new key with every block.
    for (int i = 0; i < 200; i++) drive(1'b1, rand128(), rand128());
    idle(NR + 2);

    // Stream with random bubbles and a key that sometimes repeats.
    begin
      u128 k;
      k = rand128();
      for (int i = 0; i < 300; i++) begin
        if ($urandom % 4 == 0) k = rand128();
        drive($urandom % 3 != 0, rand128(), k);
      end
    end
    idle(NR + 2);

    // Reset in the middle of a stream: the blocks in flight are discarded.
    for (int i = 0; i < 5; i++) drive(1'b1, rand128(), rand128());
    @(negedge clk);
    rst_n = 1'b0;
    n_flushed = exp_q.size();
    exp_q.delete();
    cyc_q.delete();
    prev_valid = 1'b0;
    idle(2);
    @(negedge clk);
    rst_n = 1'b1;
    idle(NR + 2);
    for (int i = 0; i < 20; i++) drive(1'b1, rand128(), rand128());
    idle(NR + 2);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_q.size());
    end
    $display("blocks out %0d, back-to-back %0d, bubbles %0d, key changes %0d, flushed by reset %0d",
             n_out, n_back_to_back, n_bubbles, n_key_changes, n_flushed);
    checks += 4;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_bubbles == 0)      begin failures++; $display("FAIL no bubble"); end
    if (n_key_changes == 0)  begin failures++; $display("FAIL no key change"); end
    if (n_flushed == 0)      begin failures++; $display("FAIL no reset flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
