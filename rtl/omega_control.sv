// omega_control: the control string of an omega network.
//
// NCTL control blocks, one per full switch, chained so that left shift moves
// every steering pair one block toward block 0. Serial data (sin = {D0, D1})
// enters block NCTL-1; after NCTL shifts the first pair sent sits in block 0,
// the last one in block NCTL-1. dprl instead loads every block from dp at
// once. latch then copies all shift registers into the steering flip-flops in
// the same clock, and the decoded controls c follow. sout is block 0's
// register, for chaining to a further string on the left.
//
// Loading a whole string serially takes NCTL clocks plus one latch clock.
//
// One control block per full switch and the shift-then-latch scheme follow
// the original design; the single global latch (no select block) and the
// chain order are this design's.
module omega_control #(
  parameter int unsigned NCTL = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dprl,
  input  logic       left,
  input  logic       latch,
  input  logic [1:0] sin,
  input  logic [1:0] dp [NCTL],
  output logic [1:0] sout,
  output logic [1:0] d  [NCTL],
  output logic [2:0] c  [NCTL]
);

  logic [1:0] chain [NCTL+1];   // chain[i] = leftout of block i, chain[NCTL] = sin

  assign chain[NCTL] = sin;
  assign sout        = chain[0];

  for (genvar i = 0; i < NCTL; i++) begin : g_blk
    omega_ctrl_block u_blk (
      .clk, .rst_n, .dprl, .left, .latch,
      .dp      (dp[i]),
      .leftin  (chain[i+1]),
      .leftout (chain[i]),
      .d       (d[i]),
      .c       (c[i])
    );
  end

endmodule
