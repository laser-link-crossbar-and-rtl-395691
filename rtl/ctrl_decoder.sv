// ctrl_decoder: steering-pair decoder of the omega control block.
//
// Turns the stored steering pair D0 D1 into the three full-switch controls:
//   D0 D1 = 00 -> C1 C2 C3 = 000 (all off)
//           01 -> 100        (N-W, S-E)
//           10 -> 010        (W-S, N-E)
//           11 -> 001        (N-S, W-E)
// The outputs are active high; an active-low variant of the same table would
// only invert them. Combinational.
// The table follows the original decoder.
module ctrl_decoder (
  input  logic [1:0] d,   // d[1] = D0, d[0] = D1
  output logic [2:0] c    // c[0] = C1, c[1] = C2, c[2] = C3
);

  always_comb begin
    unique case (d)
      2'b00:   c = 3'b000;
      2'b01:   c = 3'b001;
      2'b10:   c = 3'b010;
      default: c = 3'b100;
    endcase
  end

endmodule
