// omega_ll_node: omega network with laser-link bypass.
//
// An omega network is a single point of failure for every line of its bus:
// one bad full switch, or a power short that forces it out of service, stops
// all signals. This node therefore places a laser link between each input
// line i and output line i. The links are open as fabricated; if the omega
// network is found faulty, they are made and the signals pass straight
// through, line i to line i.
//
// The laser links are permanent and are given here as the static input
// bypass (bit i = link i made). A made link wires din[i] onto dout[i] in
// parallel with the omega output; the faulty omega network should then be
// left in its all-off state (steering pairs 00, as after reset) so that it
// drives nothing; an assertion checks this at every clock edge out of
// reset. Timing is that of omega_network; the bypass is combinational.
module omega_ll_node
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
  input  logic [N-1:0] bypass,
  input  line_t      din [N],
  output line_t      dout[N]
);

  line_t omega_out [N];

  omega_network #(.N(N)) u_omega (
    .clk, .rst_n, .dprl, .left, .latch, .sin, .dp, .sout, .steer,
    .din,
    .dout (omega_out)
  );

  logic [N-1:0] omega_drv;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      omega_drv[i] = omega_out[i].drv;
      dout[i]      = line_merge(omega_out[i], line_gate(din[i], bypass[i]));
    end
  end

  // A line whose bypass link is made must not also be driven by the omega
  // network: the bypassed network has to be held all-off.
  a_bypass_isolated: assert property (
    @(posedge clk) disable iff (!rst_n) (bypass & omega_drv) == '0
  ) else $error("omega output driven on a bypassed line: %b", bypass & omega_drv);

endmodule
