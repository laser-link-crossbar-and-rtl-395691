// ll_bus_system: a laser-link bus system for a grid of cells.
//
// ROWS x COLS function blocks (cells) sit in a grid of bus channels:
// ROWS + 1 horizontal channels (Metal 2) and COLS + 1 vertical channels
// (Metal 1), each of TRACKS parallel tracks. At every crossing of a
// horizontal and a vertical channel sits a TRACKS x TRACKS laser-link
// crossbar, so any horizontal track of that channel can be joined to any
// vertical track of the other. Each cell brings PINS signal pins out on
// stubs that cross the TRACKS tracks of the vertical channel on its left; a
// link on the stub puts the pin on one track. A route from a pin of one cell
// to a pin of another is made by linking the two stubs and the crossbars at
// the corners of the path, and a defective track is avoided simply by
// choosing another one.
//
// Interface (all links are static configuration, made once after test):
//   xlink[(x*TRACKS)+i][j]  crossbar x = r*(COLS+1) + c, at horizontal
//                           channel r and vertical channel c: joins
//                           horizontal track i to vertical track j
//   stub[p][t]              pin p of cell (r, c), p = (r*COLS + c)*PINS + k,
//                           joined to track t of vertical channel c
//   h_drive, v_drive        drivers at the track ends (package pins or test
//                           access), track n of channel ch at ch*TRACKS + n
//   pin_drive               drivers of the cell pins
//   h_net, v_net, pin_net   resolved value of each line
// Every line is bidirectional: it reads back the OR of all drivers on the
// net it belongs to (see link_net). Purely combinational.
//
// The grid, the crossbars at the crossings and the stub links follow the
// laser-link bus system of the design. The channel count around the cells,
// the stubs going only to the left vertical channel, and continuous tracks
// (no cut sites along a track) are this design's own simplifications.
module ll_bus_system
  import wsi_pkg::*;
#(
  parameter int unsigned ROWS   = 3,
  parameter int unsigned COLS   = 3,
  parameter int unsigned TRACKS = 8,
  parameter int unsigned PINS   = 4,
  localparam int unsigned NH    = (ROWS + 1) * TRACKS,
  localparam int unsigned NV    = (COLS + 1) * TRACKS,
  localparam int unsigned NX    = (ROWS + 1) * (COLS + 1),
  localparam int unsigned NP    = ROWS * COLS * PINS
) (
  input  line_t               h_drive  [NH],
  input  line_t               v_drive  [NV],
  input  line_t               pin_drive[NP],
  input  logic [TRACKS-1:0]   xlink    [NX*TRACKS],
  input  logic [TRACKS-1:0]   stub     [NP],
  output line_t               h_net    [NH],
  output line_t               v_net    [NV],
  output line_t               pin_net  [NP]
);

  // one link array over all lines: horizontal tracks and pins on one side,
  // vertical tracks on the other
  line_t          a_drive [NH+NP];
  line_t          a_net   [NH+NP];
  logic [NV-1:0]  link    [NH+NP];

  always_comb begin
    for (int a = 0; a < int'(NH + NP); a++) link[a] = '0;
    // crossbars at the channel crossings
    for (int r = 0; r <= int'(ROWS); r++)
      for (int c = 0; c <= int'(COLS); c++)
        for (int i = 0; i < int'(TRACKS); i++)
          link[r*TRACKS + i][c*TRACKS +: TRACKS] = xlink[(r*(COLS+1) + c)*TRACKS + i];
    // cell stubs onto the vertical channel left of the cell
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        for (int k = 0; k < int'(PINS); k++)
          link[NH + (r*COLS + c)*PINS + k][c*TRACKS +: TRACKS] = stub[(r*COLS + c)*PINS + k];
  end

  always_comb begin
    for (int h = 0; h < int'(NH); h++) a_drive[h] = h_drive[h];
    for (int p = 0; p < int'(NP); p++) a_drive[NH + p] = pin_drive[p];
  end

  link_net #(.NA(NH + NP), .NB(NV)) u_net (
    .a_drive (a_drive),
    .b_drive (v_drive),
    .link    (link),
    .a_net   (a_net),
    .b_net   (v_net)
  );

  always_comb begin
    for (int h = 0; h < int'(NH); h++) h_net[h] = a_net[h];
    for (int p = 0; p < int'(NP); p++) pin_net[p] = a_net[NH + p];
  end

endmodule
