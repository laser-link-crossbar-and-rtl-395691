// spare_line_segment: bus segment with laser-linked spare tracks between two
// omega networks.
//
// An 8 x 8 omega network carrying 8 signals has no free line, yet 10-20% of
// bus lines may be lost to defects. Instead of doubling the omega networks,
// this segment adds N_SPARE spare tracks that exist only between two
// networks. Each of the N regular tracks joins left port i to right port i
// and has a laser cut site; each spare track k has a laser link to every
// left port (lin[k][i]) and every right port (lout[k][i]). To replace a
// defective track i by spare k: cut track i, make lin[k][i] and lout[k][i].
// With N = 8 and two spares that is 2*8*2 = 32 links and 8 cut sites.
//
// Links and cuts are permanent and given as static inputs. A right port fed
// by several sources gets their OR. Combinational.
//
// Two spares for eight signals and about 40 link sites follow the original
// proposal; the exact placement of links and cuts is this design's.
module spare_line_segment
  import wsi_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned N_SPARE = 2
) (
  input  line_t        a    [N],
  input  logic [N-1:0] cut,
  input  logic [N-1:0] lin  [N_SPARE],
  input  logic [N-1:0] lout [N_SPARE],
  output line_t        spare[N_SPARE],
  output line_t        b    [N]
);

  always_comb begin
    for (int k = 0; k < int'(N_SPARE); k++) begin
      spare[k] = LINE_FLOAT;
      for (int i = 0; i < int'(N); i++)
        spare[k] = line_merge(spare[k], line_gate(a[i], lin[k][i]));
    end
    for (int i = 0; i < int'(N); i++) begin
      b[i] = line_gate(a[i], !cut[i]);
      for (int k = 0; k < int'(N_SPARE); k++)
        b[i] = line_merge(b[i], line_gate(spare[k], lout[k][i]));
    end
  end

endmodule
