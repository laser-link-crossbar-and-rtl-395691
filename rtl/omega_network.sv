// omega_network: 8 x 8 electronic-switch omega network, transfer block plus
// control string.
//
// The transfer block (omega_transfer) carries the data lines through three
// stages of full switches; the control string (omega_control) holds one
// steering pair per switch, 12 in all. Control block i drives switch i
// (switch index = stage*4 + row). Steering data is shifted in through sin or
// loaded in parallel through dp, then latched; the data path is
// combinational and changes only when new steering data is latched. The
// network routes any input to any output, following the destination-tag
// rule (upper switch output for a 0 bit, lower for a 1, one destination bit
// per stage, most significant first); computing the steering pairs for a
// given mapping is left to whatever programs the network.
//
// The split into transfer and control blocks follows the original design.
module omega_network
  import wsi_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dprl,
  input  logic       left,
  input  logic       latch,
  input  logic [1:0] sin,
  input  logic [1:0] dp  [($clog2(N) * N / 2)],
  output logic [1:0] sout,
  output logic [1:0] steer [($clog2(N) * N / 2)],
  input  line_t      din [N],
  output line_t      dout[N]
);

  localparam int unsigned NSW = $clog2(N) * N / 2;

  logic [2:0] c [NSW];

  omega_control #(.NCTL(NSW)) u_ctrl (
    .clk, .rst_n, .dprl, .left, .latch, .sin, .dp, .sout,
    .d (steer),
    .c (c)
  );

  omega_transfer #(.N(N)) u_xfer (
    .din, .c, .dout
  );

endmodule
