// wsi_bus_top: defect-avoiding wafer-scale bus built from omega networks with
// embedded laser links, beside the laser-link bus system and the two
// laser-link crossbar networks.
//
// Omega bus (left to right):
//   bus_in -> omega node 0 -> spare segment 0 -> cell tap 0 -> omega node 1
//          -> ... -> omega node NODES-1 -> bus_out
// Each omega node is an 8 x 8 omega network with a laser bypass link per line
// (omega_ll_node). Between two nodes sit a segment of 8 regular and 2 spare
// tracks with laser cuts and links (spare_line_segment) and the row of full
// switches that puts a function block on the bus or passes it by (cell_tap).
// The function blocks themselves are outside: their lines are cell_in and
// cell_out.
//
// Programming: all control blocks form one serial chain in the same left to
// right order: omega node 0 (switches 0..11), tap 0, omega node 1, ... Chain
// index g of a control block is its position in that order (NCTL blocks in
// all). ctl_sin enters the right end (the last block) and ctl_left moves all
// pairs one block left per clock, so after NCTL shifts the first pair sent is
// in block 0. ctl_dprl loads all blocks from ctl_dp instead; ctl_latch copies
// every shift register into its steering flip-flop, and the data paths change
// at that edge. All data paths are combinational.
//
// Laser configuration (static, set once after wafer test): bypass_link per
// omega node, seg_cut / seg_lin / seg_lout per segment, xb_link for the
// two-sided crossbar and xb1s_lk for the one-sided one.
//
// Crossbars: the 8 x 8 two-sided crossbar (ll_crossbar) and the 8 x 8
// one-sided crossbar (ll_crossbar_1s) are the laser-restructured networks
// used at the crossings of a crossbar bus; they have their own ports and are
// not wired to the omega bus. Their lines are bidirectional: each has a
// driver input (*_drive) and reads back its resolved net.
//
// Laser-link bus system (ll_bus_system, bs_* ports): a 3 x 3 grid of cells
// in bus channels with a crossbar at every channel crossing. It is the other
// way of building the wafer bus, with links only, and stands beside the
// omega bus with its own ports.
//
// The number of omega nodes in the row (NODES) is this design's choice.
module wsi_bus_top
  import wsi_pkg::*;
#(
  parameter int unsigned NODES = 2,
  localparam int unsigned BS_ROWS = 3,
  localparam int unsigned BS_COLS = 3,
  localparam int unsigned BS_PINS = 4,
  localparam int unsigned BS_NH = (BS_ROWS + 1) * N_LINES,
  localparam int unsigned BS_NV = (BS_COLS + 1) * N_LINES,
  localparam int unsigned BS_NX = (BS_ROWS + 1) * (BS_COLS + 1),
  localparam int unsigned BS_NP = BS_ROWS * BS_COLS * BS_PINS
) (
  input  logic clk,
  input  logic rst_n,

  // omega bus data
  input  line_t bus_in  [N_LINES],
  output line_t bus_out [N_LINES],
  output line_t cell_in [NODES-1][N_LINES],
  input  line_t cell_out[NODES-1][N_LINES],

  // control chain
  input  logic       ctl_dprl,
  input  logic       ctl_left,
  input  logic       ctl_latch,
  input  logic [1:0] ctl_sin,
  input  logic [1:0] ctl_dp   [NODES*N_SW + NODES-1],
  output logic [1:0] ctl_sout,
  output logic [1:0] ctl_steer[NODES*N_SW + NODES-1],

  // laser links of the omega bus
  input  logic [N_LINES-1:0] bypass_link[NODES],
  input  logic [N_LINES-1:0] seg_cut [NODES-1],
  input  logic [N_LINES-1:0] seg_lin [NODES-1][2],
  input  logic [N_LINES-1:0] seg_lout[NODES-1][2],
  output line_t              seg_spare[NODES-1][2],

  // two-sided laser-link crossbar
  input  line_t              xb_h_drive[N_LINES],
  input  line_t              xb_v_drive[N_LINES],
  input  logic [N_LINES-1:0] xb_link   [N_LINES],
  output line_t              xb_h      [N_LINES],
  output line_t              xb_v      [N_LINES],

  // one-sided laser-link crossbar
  input  line_t              xb1s_drive[2*N_LINES],
  input  logic [N_LINES-1:0] xb1s_lk   [2*N_LINES],
  output line_t              xb1s_port [2*N_LINES],
  output line_t              xb1s_bus  [N_LINES],

  // laser-link bus system (sizes from ll_bus_system's defaults)
  input  line_t              bs_h_drive  [BS_NH],
  input  line_t              bs_v_drive  [BS_NV],
  input  line_t              bs_pin_drive[BS_NP],
  input  logic [N_LINES-1:0] bs_xlink    [BS_NX*N_LINES],
  input  logic [N_LINES-1:0] bs_stub     [BS_NP],
  output line_t              bs_h        [BS_NH],
  output line_t              bs_v        [BS_NV],
  output line_t              bs_pin      [BS_NP]
);

  localparam int unsigned STRIDE = N_SW + 1;   // chain blocks per omega node + tap

  // control chain links: chain_in[k] is the serial input of omega node k
  logic [1:0] chain_in [NODES];
  logic [1:0] chain_out[NODES];   // sout of omega node k

  assign chain_in[NODES-1] = ctl_sin;
  assign ctl_sout          = chain_out[0];

  for (genvar k = 0; k < NODES; k++) begin : g_node
    line_t      node_in [N_LINES];
    line_t      node_out[N_LINES];
    logic [1:0] dp_k    [N_SW];
    logic [1:0] steer_k [N_SW];

    if (k == 0) begin : g_first
      assign node_in = bus_in;
    end else begin : g_next
      assign node_in = g_node[k-1].g_link.tap_out;
    end

    for (genvar s = 0; s < N_SW; s++) begin : g_map
      assign dp_k[s]                 = ctl_dp[k*STRIDE + s];
      assign ctl_steer[k*STRIDE + s] = steer_k[s];
    end

    omega_ll_node #(.N(N_LINES)) u_node (
      .clk, .rst_n,
      .dprl   (ctl_dprl),
      .left   (ctl_left),
      .latch  (ctl_latch),
      .sin    (chain_in[k]),
      .dp     (dp_k),
      .sout   (chain_out[k]),
      .steer  (steer_k),
      .bypass (bypass_link[k]),
      .din    (node_in),
      .dout   (node_out)
    );

    if (k < NODES - 1) begin : g_link
      line_t seg_out[N_LINES];
      line_t tap_out[N_LINES];

      spare_line_segment #(.N(N_LINES), .N_SPARE(2)) u_seg (
        .a     (node_out),
        .cut   (seg_cut[k]),
        .lin   (seg_lin[k]),
        .lout  (seg_lout[k]),
        .spare (seg_spare[k]),
        .b     (seg_out)
      );

      cell_tap #(.N(N_LINES)) u_tap (
        .clk, .rst_n,
        .dprl     (ctl_dprl),
        .left     (ctl_left),
        .latch    (ctl_latch),
        .dp       (ctl_dp[k*STRIDE + N_SW]),
        .leftin   (chain_out[k+1]),
        .leftout  (chain_in[k]),
        .steer    (ctl_steer[k*STRIDE + N_SW]),
        .bus_w    (seg_out),
        .bus_e    (tap_out),
        .cell_out (cell_out[k]),
        .cell_in  (cell_in[k])
      );
    end else begin : g_last
      assign bus_out = node_out;
    end
  end

  ll_crossbar #(.N_H(N_LINES), .N_V(N_LINES)) u_xb (
    .h_drive (xb_h_drive),
    .v_drive (xb_v_drive),
    .link    (xb_link),
    .h_net   (xb_h),
    .v_net   (xb_v)
  );

  ll_crossbar_1s #(.N(N_LINES)) u_xb1s (
    .p_drive (xb1s_drive),
    .lk      (xb1s_lk),
    .p_net   (xb1s_port),
    .bus_net (xb1s_bus)
  );

  ll_bus_system #(.ROWS(BS_ROWS), .COLS(BS_COLS), .TRACKS(N_LINES), .PINS(BS_PINS)) u_bs (
    .h_drive   (bs_h_drive),
    .v_drive   (bs_v_drive),
    .pin_drive (bs_pin_drive),
    .xlink     (bs_xlink),
    .stub      (bs_stub),
    .h_net     (bs_h),
    .v_net     (bs_v),
    .pin_net   (bs_pin)
  );

endmodule
