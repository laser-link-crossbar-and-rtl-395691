// tb_ll_crossbar: the 8 x 8 two-sided laser-link crossbar.
//
// 1. Routing: a permutation of links (one per row and column), driven from
//    the horizontal side and then from the vertical side.
// 2. A chain of links h0 - v3 - h5 - v1 carries one driver to all four lines.
// 3. Random link matrices and random drivers on both sides, against nets
//    found with a union-find over the 16 lines in the testbench.
module tb_ll_crossbar;
  import wsi_pkg::*;

  line_t h_drive [8], v_drive [8], h_net [8], v_net [8];
  logic [7:0] link [8];
  int checks = 0, failures = 0;

  ll_crossbar #(.N_H(8), .N_V(8)) dut (.h_drive, .v_drive, .link, .h_net, .v_net);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int find(ref int parent[16], input int x);
    while (parent[x] != x) x = parent[x];
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[8];
    // 1. permutations in both directions
    for (int t = 0; t < 40; t++) begin
      bit from_h;
      from_h = (t % 2 == 0);
      for (int i = 0; i < 8; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < 8; i++) begin
        link[i]    = 8'(1 << perm[i]);
        h_drive[i] = from_h ? '{drv: 1'b1, val: 1'($urandom)} : '0;
        v_drive[i] = from_h ? '0 : '{drv: 1'b1, val: 1'($urandom)};
      end
      #1;
      for (int i = 0; i < 8; i++)
        chk(from_h ? (v_net[perm[i]] === h_drive[i]) : (h_net[i] === v_drive[perm[i]]),
            $sformatf("route %0d (%s)", i, from_h ? "h to v" : "v to h"));
    end

    // 2. chain h0 - v3 - h5 - v1
    for (int i = 0; i < 8; i++) begin link[i] = 0; h_drive[i] = '0; v_drive[i] = '0; end
    link[0][3] = 1; link[5][3] = 1; link[5][1] = 1;
    h_drive[0] = '{drv: 1'b1, val: 1'b1};
    #1;
    chk(v_net[3] === h_drive[0] && h_net[5] === h_drive[0] && v_net[1] === h_drive[0], "chain of links");
    chk(h_net[1].drv === 1'b0 && v_net[0].drv === 1'b0, "lines off the chain float");

    // 3. random
    for (int t = 0; t < 300; t++) begin
      int parent[16];
      bit cd[16], cv[16];
      for (int i = 0; i < 16; i++) begin parent[i] = i; cd[i] = 0; cv[i] = 0; end
      for (int i = 0; i < 8; i++) begin
        link[i] = 8'($urandom) & 8'($urandom) & 8'($urandom);
        h_drive[i] = ($urandom_range(3) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
        v_drive[i] = ($urandom_range(3) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (link[i][j]) begin
            int ra, rb;
            ra = find(parent, i); rb = find(parent, 8 + j);
            if (ra != rb) parent[ra] = rb;
          end
      for (int i = 0; i < 8; i++) begin
        int r;
        r = find(parent, i);     if (h_drive[i].drv) begin cd[r] = 1; cv[r] |= h_drive[i].val; end
        r = find(parent, 8 + i); if (v_drive[i].drv) begin cd[r] = 1; cv[r] |= v_drive[i].val; end
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        int r;
        r = find(parent, i);
        chk(h_net[i].drv === cd[r] && h_net[i].val === cv[r], $sformatf("random h%0d", i));
        r = find(parent, 8 + i);
        chk(v_net[i].drv === cd[r] && v_net[i].val === cv[r], $sformatf("random v%0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
