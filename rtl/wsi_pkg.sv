// wsi_pkg: types and constants shared by the wafer-scale bus networks.
//
// A bus line in these networks is a wire that a transmission gate or a laser
// link may leave floating, so each line is carried as a value plus a "driven"
// flag (line_t). A floating line reads as drv=0, val=0. When several sources
// are wired onto one line, the driven values are OR-ed (line_merge); this is a
// modelling choice of this design, not something the networks define.
//
// The sizes are those of the 8 x 8 omega network: 8 lines, log2(8)=3 stages,
// 4 full switches per stage, 12 full switches in all.
package wsi_pkg;

  localparam int unsigned N_LINES  = 8;
  localparam int unsigned N_STAGES = 3;
  localparam int unsigned N_SW     = N_STAGES * N_LINES / 2;  // 12

  // One bus line: val is meaningful only when drv is 1.
  typedef struct packed {
    logic drv;
    logic val;
  } line_t;

  localparam line_t LINE_FLOAT = '{drv: 1'b0, val: 1'b0};

  // Steering pair {D0, D1} of a full switch and its meaning.
  typedef enum logic [1:0] {
    ST_OFF      = 2'b00,  // all terminals disconnected
    ST_NW_SE    = 2'b01,  // N-W and S-E joined (C1)
    ST_STRAIGHT = 2'b10,  // W-S and N-E joined (C2)
    ST_EXCHANGE = 2'b11   // N-S and W-E joined (C3)
  } steer_e;

  // Wired connection of two sources onto one line.
  function automatic line_t line_merge(line_t a, line_t b);
    line_t r;
    r.drv = a.drv | b.drv;
    r.val = (a.drv & a.val) | (b.drv & b.val);
    return r;
  endfunction

  // A source seen through a link or gate that may be open.
  function automatic line_t line_gate(line_t a, logic on);
    line_t r;
    r.drv = a.drv & on;
    r.val = a.val & a.drv & on;
    return r;
  endfunction

endpackage
