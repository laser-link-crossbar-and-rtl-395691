// tb_ll_crossbar_1s: the 8 x 8 one-sided laser-link crossbar.
//
// Pairs of ports are connected, each through a bus chosen at random among
// the free ones (two links per connection); buses left unused stand for
// defective ones. In every pair one port drives, chosen at random, and the
// other must read the driver's value; ports in no pair float. Then random
// link matrices are checked against nets found by union-find.
module tb_ll_crossbar_1s;
  import wsi_pkg::*;

  line_t p_drive [16], p_net [16], bus_net [8];
  logic [7:0] lk [16];
  int checks = 0, failures = 0;

  ll_crossbar_1s #(.N(8)) dut (.p_drive, .lk, .p_net, .bus_net);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int find(ref int parent[24], input int x);
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
    for (int t = 0; t < 100; t++) begin
      int ports[$], buses[$];
      int ncon;
      ncon = 1 + (t % 8);
      ports.delete(); buses.delete();
      for (int p = 0; p < 16; p++) begin ports.push_back(p); lk[p] = 0; p_drive[p] = '0; end
      for (int b = 0; b < 8; b++) buses.push_back(b);
      ports.shuffle(); buses.shuffle();
      for (int c = 0; c < ncon; c++) begin
        lk[ports[2*c]][buses[c]]   = 1'b1;
        lk[ports[2*c+1]][buses[c]] = 1'b1;
        p_drive[ports[2*c + (c % 2)]] = '{drv: 1'b1, val: 1'($urandom)};
      end
      #1;
      for (int c = 0; c < ncon; c++) begin
        line_t src;
        src = p_drive[ports[2*c + (c % 2)]];
        chk(p_net[ports[2*c + 1 - (c % 2)]] === src, "connected port reads its partner");
        chk(bus_net[buses[c]] === src, "bus carries the connection");
      end
      for (int k = 2*ncon; k < 16; k++) chk(p_net[ports[k]].drv === 1'b0, "unconnected port floats");
    end
    for (int t = 0; t < 200; t++) begin
      int parent[24];
      bit cd[24], cv[24];
      for (int i = 0; i < 24; i++) begin parent[i] = i; cd[i] = 0; cv[i] = 0; end
      for (int p = 0; p < 16; p++) begin
        lk[p] = 8'($urandom) & 8'($urandom) & 8'($urandom);
        p_drive[p] = ($urandom_range(3) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      end
      for (int p = 0; p < 16; p++)
        for (int b = 0; b < 8; b++)
          if (lk[p][b]) begin
            int ra, rb;
            ra = find(parent, p); rb = find(parent, 16 + b);
            if (ra != rb) parent[ra] = rb;
          end
      for (int p = 0; p < 16; p++)
        if (p_drive[p].drv) begin
          int r;
          r = find(parent, p); cd[r] = 1; cv[r] |= p_drive[p].val;
        end
      #1;
      for (int p = 0; p < 16; p++) begin
        int r;
        r = find(parent, p);
        chk(p_net[p].drv === cd[r] && p_net[p].val === cv[r], $sformatf("random port %0d", p));
      end
      for (int b = 0; b < 8; b++) begin
        int r;
        r = find(parent, 16 + b);
        chk(bus_net[b].drv === cd[r] && bus_net[b].val === cv[r], $sformatf("random bus %0d", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
