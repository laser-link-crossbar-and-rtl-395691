// omega_transfer: the transfer (data) block of an N x N omega network.
//
// log2(N) identical stages; each stage is a perfect shuffle followed by N/2
// full switches. The shuffle moves the line at position s1 s2 ... sl to
// position s2 ... sl s1 (a left rotation of the position bits). Switch k of a
// stage takes shuffled positions 2k (its N input) and 2k+1 (its W input) and
// drives positions 2k (E) and 2k+1 (S). With N = 8 there are 3 stages and 12
// switches in a 3 x 4 array.
//
// Switch index in c is stage*(N/2) + k, stage 0 nearest the inputs. To send
// an input to output d1 d2 ... dl, the switch it meets in stage i sends it to
// its upper output if di = 0 and to its lower output if di = 1.
//
// Purely combinational: data passes from din to dout with no clock.
//
// Stage count, shuffle and switch count follow the original 8 x 8 network;
// the numbering of positions and switches is this design's.
module omega_transfer
  import wsi_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  line_t      din [N],
  input  logic [2:0] c   [($clog2(N) * N / 2)],
  output line_t      dout[N]
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned NS = N / 2;

  for (genvar st = 0; st < L; st++) begin : g_stage
    line_t st_in   [N];   // lines entering this stage
    line_t shuffled[N];   // after the perfect shuffle
    line_t st_out  [N];   // after the full switches

    if (st == 0) begin : g_first
      assign st_in = din;
    end else begin : g_next
      assign st_in = g_stage[st-1].st_out;
    end

    // perfect shuffle: position p goes to rotate-left(p)
    for (genvar p = 0; p < N; p++) begin : g_shuf
      localparam int unsigned Q = ((p << 1) | (p >> (L - 1))) & (N - 1);
      assign shuffled[Q] = st_in[p];
    end

    for (genvar k = 0; k < NS; k++) begin : g_sw
      full_switch u_sw (
        .n (shuffled[2*k]),
        .w (shuffled[2*k+1]),
        .c (c[st*NS + k]),
        .e (st_out[2*k]),
        .s (st_out[2*k+1])
      );
    end
  end

  assign dout = g_stage[L-1].st_out;

endmodule
