// ctrl_shift_cell: one two-bit cell (R0, R1) of the steering shift register.
//
// The cell receives steering data for one switch node and later hands it to
// the steering flip-flop. It has two input modes: parallel load, where dprl
// copies the cell's own pins dp into the cell, and left shift, where left
// copies leftin, the contents of the cell to the right, so that a string of
// cells moves data one place to the left per clock. With neither asserted the
// cell holds (the refresh loop of a dynamic register). dprl wins if both are
// asserted. leftout always shows the stored pair and feeds the cell on the
// left.
//
// One rising-edge clock and static storage stand in for the two-phase dynamic
// register; reset (active low, asynchronous) clears the cell to 00.
// The two input modes follow the original cell; the right-shift and
// parallel-output modes of the general register are not built.
module ctrl_shift_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dprl,
  input  logic       left,
  input  logic [1:0] dp,       // {D0, D1}
  input  logic [1:0] leftin,   // from the cell to the right
  output logic [1:0] leftout   // {R0, R1}
);

  logic [1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= 2'b00;
    else if (dprl)  r <= dp;
    else if (left)  r <= leftin;
  end

  assign leftout = r;

endmodule
