// steer_ff: the two-bit steering flip-flop of a control block.
//
// Holds the steering pair D0 D1 that the decoder turns into switch controls,
// so the shift register can take new data without disturbing the switch. On a
// rising clock edge with latch high it copies d_in (the shift register
// contents); otherwise it holds. An edge-triggered register stands in for the
// master-slave D flip-flop. Reset (active low, asynchronous) clears it to 00,
// the all-off state.
module steer_ff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       latch,
  input  logic [1:0] d_in,
  output logic [1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 2'b00;
    else if (latch) q <= d_in;
  end

endmodule
