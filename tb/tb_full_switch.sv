// tb_full_switch: exhaustive check of the full switch.
//
// For every control word C1..C3 and every combination of driven/floating
// inputs, the expected outputs come from a connectivity model of the six
// transmission gates: the terminals joined to E (or S) are found by closing
// the gate graph, and the output is driven by the OR of the driven inputs
// among them.
module tb_full_switch;
  import wsi_pkg::*;

  line_t n, w, e, s;
  logic [2:0] c;
  int checks = 0, failures = 0;

  full_switch dut (.n, .w, .c, .e, .s);

  // terminals: 0=N 1=W 2=S 3=E
  function automatic line_t expect_out(int t, logic [2:0] cc, line_t nn, line_t ww);
    bit adj[4][4];
    bit reach[4];
    line_t r;
    adj = '{default: 0};
    if (cc[0]) begin adj[0][1] = 1; adj[1][0] = 1; adj[2][3] = 1; adj[3][2] = 1; end
    if (cc[1]) begin adj[1][2] = 1; adj[2][1] = 1; adj[0][3] = 1; adj[3][0] = 1; end
    if (cc[2]) begin adj[0][2] = 1; adj[2][0] = 1; adj[1][3] = 1; adj[3][1] = 1; end
    reach = '{default: 0};
    reach[t] = 1;
    for (int it = 0; it < 4; it++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          if (reach[a] && adj[a][b]) reach[b] = 1;
    r.drv = (reach[0] & nn.drv) | (reach[1] & ww.drv);
    r.val = (reach[0] & nn.drv & nn.val) | (reach[1] & ww.drv & ww.val);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cc = 0; cc < 8; cc++)
      for (int v = 0; v < 16; v++) begin
        c = cc[2:0];
        n = line_t'(v[1:0]);
        w = line_t'(v[3:2]);
        #1;
        checks++;
        if (e !== expect_out(3, c, n, w) || s !== expect_out(2, c, n, w)) begin
          failures++;
          $display("FAIL c=%b n=%b w=%b e=%b s=%b", c, n, w, e, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
