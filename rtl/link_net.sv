// link_net: resolves the nets of a bipartite array of laser links.
//
// NA lines of one kind (say horizontal tracks) cross NB lines of the other
// (vertical tracks or buses). A made link joins line a_i to line b_j
// electrically, in both directions, and joins transitively: a signal can go
// a_0 -> b_3 -> a_5 -> b_1 through three made links. Every line has an
// external driver (a_drive, b_drive; drv = 0 when nothing drives it) and
// reads back the value of the whole net it belongs to (a_net, b_net): the
// OR of all driven values in the connected set, with drv = 1 if anything in
// the set drives it.
//
// The connected sets are found by repeated propagation across the links,
// one generate stage per round. A round first lets every a line pass its
// drive and value bits to the b lines it is linked to, then every b line to
// its a lines. A chain of links that visits k of the b lines is covered in
// k + 1 rounds, so min(NA, NB) + 1 rounds are always enough and the logic is
// a fixed, loop-free cascade. The drive and value bits of each side are kept
// as packed vectors so that one round is a row of AND-OR reductions. Purely
// combinational; the links are static configuration. Used by both crossbars
// and by the laser-link bus system; the OR of several drivers on one net is
// this design's choice.
module link_net
  import wsi_pkg::*;
#(
  parameter int unsigned NA = 8,
  parameter int unsigned NB = 8
) (
  input  line_t          a_drive [NA],
  input  line_t          b_drive [NB],
  input  logic [NB-1:0]  link    [NA],   // link[i][j]: a_i joined to b_j
  output line_t          a_net   [NA],
  output line_t          b_net   [NB]
);

  localparam int unsigned ROUNDS = ((NA < NB) ? NA : NB) + 1;

  // col[j][i] = link[i][j]: the links of b line j
  logic [NA-1:0] col [NB];
  always_comb
    for (int j = 0; j < int'(NB); j++)
      for (int i = 0; i < int'(NA); i++)
        col[j][i] = link[i][j];

  // drive and value bits of the external drivers; a value counts only where
  // the line is driven
  logic [NA-1:0] a_drv0, a_val0;
  logic [NB-1:0] b_drv0, b_val0;
  always_comb begin
    for (int i = 0; i < int'(NA); i++) begin
      a_drv0[i] = a_drive[i].drv;
      a_val0[i] = a_drive[i].val & a_drive[i].drv;
    end
    for (int j = 0; j < int'(NB); j++) begin
      b_drv0[j] = b_drive[j].drv;
      b_val0[j] = b_drive[j].val & b_drive[j].drv;
    end
  end

  for (genvar r = 0; r < int'(ROUNDS); r++) begin : g_round
    logic [NA-1:0] a_drv_p, a_val_p, a_drv, a_val;
    logic [NB-1:0] b_drv_p, b_val_p, b_drv, b_val;
    if (r == 0) begin : g_first
      assign a_drv_p = a_drv0;
      assign a_val_p = a_val0;
      assign b_drv_p = b_drv0;
      assign b_val_p = b_val0;
    end else begin : g_next
      assign a_drv_p = g_round[r-1].a_drv;
      assign a_val_p = g_round[r-1].a_val;
      assign b_drv_p = g_round[r-1].b_drv;
      assign b_val_p = g_round[r-1].b_val;
    end
    always_comb begin
      for (int j = 0; j < int'(NB); j++) begin
        b_drv[j] = b_drv_p[j] | (|(a_drv_p & col[j]));
        b_val[j] = b_val_p[j] | (|(a_val_p & col[j]));
      end
      for (int i = 0; i < int'(NA); i++) begin
        a_drv[i] = a_drv_p[i] | (|(b_drv & link[i]));
        a_val[i] = a_val_p[i] | (|(b_val & link[i]));
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NA); i++)
      a_net[i] = '{drv: g_round[ROUNDS-1].a_drv[i], val: g_round[ROUNDS-1].a_val[i]};
    for (int j = 0; j < int'(NB); j++)
      b_net[j] = '{drv: g_round[ROUNDS-1].b_drv[j], val: g_round[ROUNDS-1].b_val[j]};
  end

endmodule
