// full_switch: the four-terminal switching element of the omega network.
//
// The element has terminals N, W, S and E and six transmission gates, one per
// terminal pair. Three controls close them in pairs:
//   C1 joins N-W and S-E,  C2 joins W-S and N-E,  C3 joins N-S and W-E,
// and with no control set all four terminals are isolated. Setting two or more
// controls joins all four terminals together.
//
// The transmission gates are bidirectional; this model is unidirectional, with
// N and W as inputs and E and S as outputs (N = upper input, W = lower input,
// E = upper output, S = lower output). C2 is then the "straight" state, C3 the
// "exchange" state, and C1 ties the two inputs to each other and the two
// outputs to each other, so neither output is driven. When all terminals are
// joined both outputs carry the OR of the driven inputs. A floating output
// always reads val = 0.
//
// The six-gate structure and the three paired states follow the original
// circuit; the input/output direction and the OR of joined inputs are this
// model's choices.
//
// Controls are active high, as produced by the decoder of the control block.
// Purely combinational; no clock.
module full_switch
  import wsi_pkg::*;
(
  input  line_t      n,
  input  line_t      w,
  input  logic [2:0] c,   // c[0]=C1, c[1]=C2, c[2]=C3
  output line_t      e,
  output line_t      s
);

  logic all_joined;
  assign all_joined = (c[0] & c[1]) | (c[0] & c[2]) | (c[1] & c[2]);

  always_comb begin
    if (all_joined) begin
      e = line_merge(n, w);
      s = line_merge(n, w);
    end else if (c[1]) begin        // straight: N-E, W-S
      e = line_gate(n, 1'b1);
      s = line_gate(w, 1'b1);
    end else if (c[2]) begin        // exchange: W-E, N-S
      e = line_gate(w, 1'b1);
      s = line_gate(n, 1'b1);
    end else begin                  // off, or C1 alone: outputs float
      e = LINE_FLOAT;
      s = LINE_FLOAT;
    end
  end

endmodule
