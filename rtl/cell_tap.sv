// cell_tap: connection of one function block (cell) to the bus lines.
//
// A row of N full switches, one per bus line, under one control block. Each
// switch uses W as the bus coming from the left, N as the cell's output, E as
// the bus going right and S as the cell's input:
//   steering 10 (C2: W-S, N-E)  integrates the cell: the bus feeds the cell
//                               and the cell drives the bus onward;
//   steering 11 (C3: W-E, N-S)  bypasses the cell: the bus passes straight on
//                               to the next omega network and spare cells.
//   00 isolates both; 01 (N-W, S-E) joins bus-in with cell-out.
// The control block is one link of the control chain (leftin/leftout), so
// cells are switched in and out by the same serial programming as the omega
// switches. Data is combinational; the setting changes on a latch edge.
//
// The row of full switches follows the original bus; the terminal assignment
// and the single shared control block are this design's choices.
module cell_tap
  import wsi_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dprl,
  input  logic       left,
  input  logic       latch,
  input  logic [1:0] dp,
  input  logic [1:0] leftin,
  output logic [1:0] leftout,
  output logic [1:0] steer,
  input  line_t      bus_w   [N],
  output line_t      bus_e   [N],
  input  line_t      cell_out[N],
  output line_t      cell_in [N]
);

  logic [2:0] c;

  omega_ctrl_block u_ctrl (
    .clk, .rst_n, .dprl, .left, .latch, .dp, .leftin, .leftout,
    .d (steer),
    .c (c)
  );

  for (genvar i = 0; i < N; i++) begin : g_sw
    full_switch u_sw (
      .n (cell_out[i]),
      .w (bus_w[i]),
      .c (c),
      .e (bus_e[i]),
      .s (cell_in[i])
    );
  end

endmodule
