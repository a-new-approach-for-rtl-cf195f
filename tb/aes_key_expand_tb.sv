// aes_key_expand_tb: key-schedule step test.
// Runs the ten steps of the FIPS-197 Appendix A.1 key 2b7e1516... through the
// block, checking round keys 1 and 10 against the published values and every
// step against the reference model, then checks random keys and step numbers.
module aes_key_expand_tb;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  u128 key_in, key_out;
  u8   rcon_in;
  aes_key_expand dut (.key_in(key_in), .rcon(rcon_in), .key_out(key_out));

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic step(input u128 k, input int unsigned i, output u128 got);
    @(negedge clk);
    key_in  = k;
    rcon_in = rcon(i);
    #1;
    got = key_out;
    checks++;
    if (key_out !== next_key(k, i)) begin
      failures++;
      $display("FAIL step %0d from %h: got %h, expected %h", i, k, key_out, next_key(k, i));
    end
  endtask

  initial begin
    u128 k;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int unsigned i = 1; i <= 10; i++) begin
      step(k, i, k);
      if (i == 1) begin
        checks++;
        if (k !== 128'ha0fafe1788542cb123a339392a6c7605) begin
          failures++; $display("FAIL round key 1 = %h", k);
        end
      end
    end
    checks++;
    if (k !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL round key 10 = %h", k);
    end
    for (int n = 0; n < 500; n++) begin
      u128 dummy;
      step(rand128(), 1 + ($urandom % 10), dummy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
