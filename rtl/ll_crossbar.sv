// ll_crossbar: two-sided laser-link crossbar network (8 x 8 by default).
//
// N_H horizontal lines cross N_V vertical lines, with a laser link switch at
// every crossing (64 for 8 x 8). Making link (i, j) joins horizontal line i
// to vertical line j, so any horizontal line can be routed to any vertical
// line, and a defective line can be replaced by a spare one. Links are
// permanent once made by the laser and are given as the static input link.
//
// A made link is a plain electrical join, so signals may enter on either
// side. Every line has a driver input (h_drive, v_drive; drv = 0 where
// nothing drives the line) and a net output (h_net, v_net) that shows the
// value of everything the line is joined to, through any chain of made
// links. A line joined to no driver floats. If several drivers share a net
// the model ORs them; a real net would be in conflict. Combinational.
//
// The 8 x 8 array of links follows the original network; link bits in place
// of physical links, and the OR of shared drivers, are this model's.
module ll_crossbar
  import wsi_pkg::*;
#(
  parameter int unsigned N_H = 8,
  parameter int unsigned N_V = 8
) (
  input  line_t          h_drive [N_H],
  input  line_t          v_drive [N_V],
  input  logic [N_V-1:0] link    [N_H],   // link[i][j]: h_i joined to v_j
  output line_t          h_net   [N_H],
  output line_t          v_net   [N_V]
);

  link_net #(.NA(N_H), .NB(N_V)) u_net (
    .a_drive (h_drive),
    .b_drive (v_drive),
    .link    (link),
    .a_net   (h_net),
    .b_net   (v_net)
  );

endmodule
