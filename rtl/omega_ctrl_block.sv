// omega_ctrl_block: control block for one full switch (or a row of them).
//
// Three parts in series: a two-bit shift register cell that receives the
// steering pair serially (left shift) or in parallel (dprl), a two-bit
// steering flip-flop that takes the pair when latch is high, and the decoder
// that turns the stored pair into C1..C3. Blocks are chained through
// leftin/leftout to form the control string of a network. The select block
// that would pick which node latches is not part of this block; latch is
// shared by all blocks of a chain.
//
// Timing: a pair shifted or loaded at one clock edge can be latched at the
// next; c changes right after the latching edge.
module omega_ctrl_block (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dprl,
  input  logic       left,
  input  logic       latch,
  input  logic [1:0] dp,
  input  logic [1:0] leftin,
  output logic [1:0] leftout,
  output logic [1:0] d,
  output logic [2:0] c
);

  ctrl_shift_cell u_sr (
    .clk, .rst_n, .dprl, .left, .dp, .leftin, .leftout
  );

  steer_ff u_ff (
    .clk, .rst_n, .latch, .d_in(leftout), .q(d)
  );

  ctrl_decoder u_dec (
    .d, .c
  );

endmodule
