// aes128_top: high-throughput AES-128 encryption core.
//
// The ten AES-128 rounds are unrolled in hardware: the initial AddRoundKey and
// nine full rounds (aes_round) followed by the final sub-round without
// MixColumns (aes_subround).  Every round uses sixteen copies of the split SOP/ROM
// S-box (sbox8), built from per-sub-range sum-of-products logic and small ROMs.
// The key schedule is unrolled alongside: each round has its own key-expansion
// step (aes_key_expand), so the round key travels down the pipeline together
// with the block it belongs to and the key may change on every block.
//
// Pipelining: a register follows each round (the initial AddRoundKey shares the
// first stage with round 1), so a new plaintext/key pair is accepted on every
// clock and its ciphertext appears NR clocks later with out_valid high.  There
// is no back-pressure.  Unrolling the rounds follows the reference architecture's
// nine-rounds-plus-sub-round structure; the placement of the pipeline
// registers, the valid signal and the reset are this design's choices.
//
// Interface (byte 0 of each 128-bit vector in bits 127:120, as in FIPS-197):
//   clk, rst_n (synchronous, active low; clears the valid pipeline only)
//   in_valid, plaintext[127:0], key[127:0]  -> out_valid, ciphertext[127:0]
module aes128_top
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128   // rounds; 10 for AES-128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  state_t plaintext,
  input  state_t key,
  output logic   out_valid,
  output state_t ciphertext
);

  // Pipeline registers after each round k = 1..NR; index 0 is the input.
  state_t state_q [NR+1];
  state_t rkey_q  [NR+1];
  logic   valid_q [NR+1];

  // Round 0: AddRoundKey with the cipher key.
  aes_addroundkey u_ark0 (.state_in(plaintext), .round_key(key), .state_out(state_q[0]));
  assign rkey_q[0]  = key;
  assign valid_q[0] = in_valid;

  for (genvar k = 1; k <= NR; k++) begin : g_round
    state_t rkey_d, state_d;

    aes_key_expand u_key (
      .key_in (rkey_q[k-1]),
      .rcon   (rcon_of(k)),
      .key_out(rkey_d)
    );

    if (k < NR) begin : g_full
      aes_round u_round (.state_in(state_q[k-1]), .round_key(rkey_d), .state_out(state_d));
    end else begin : g_last
      aes_subround u_round (.state_in(state_q[k-1]), .round_key(rkey_d), .state_out(state_d));
    end

    always_ff @(posedge clk) begin
      if (!rst_n) valid_q[k] <= 1'b0;
      else        valid_q[k] <= valid_q[k-1];
      if (valid_q[k-1]) begin
        state_q[k] <= state_d;
        rkey_q[k]  <= rkey_d;
      end
    end
  end

  assign out_valid  = valid_q[NR];
  assign ciphertext = state_q[NR];

endmodule
