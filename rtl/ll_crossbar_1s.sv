// ll_crossbar_1s: one-sided laser-link crossbar network (8 x 8 by default).
//
// All 2N port lines sit on one side and cross N internal vertical buses,
// giving a 2N x N array of laser link switches (16 x 8 for N = 8). Ports are
// not split into inputs and outputs: a connection between any two ports p
// and q picks a free bus b and makes two links, lk[p][b] and lk[q][b].
// Because any unused bus will do, a defective bus costs no connection.
//
// Links are permanent and given as static inputs. Links are electrical
// joins, so every port has a driver input (p_drive) and reads back its net
// (p_net); bus_net shows the internal buses. A net with no driver floats;
// several drivers on one net are OR-ed by the model. Combinational.
//
// The 2N x N link array follows the original network; link bits in place of
// physical links, and the OR of shared drivers, are this model's.
module ll_crossbar_1s
  import wsi_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  line_t        p_drive [2*N],
  input  logic [N-1:0] lk      [2*N],   // lk[p][b]: port p joined to bus b
  output line_t        p_net   [2*N],
  output line_t        bus_net [N]
);

  line_t bus_drive [N];

  always_comb begin
    for (int b = 0; b < int'(N); b++) bus_drive[b] = LINE_FLOAT;
  end

  link_net #(.NA(2*N), .NB(N)) u_net (
    .a_drive (p_drive),
    .b_drive (bus_drive),
    .link    (lk),
    .a_net   (p_net),
    .b_net   (bus_net)
  );

endmodule
