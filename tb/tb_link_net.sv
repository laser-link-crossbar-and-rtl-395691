// tb_link_net: net resolution over a 16 x 8 link array (the one-sided
// crossbar shape).
//
// 1. The longest possible chain: a0 - b0 - a1 - b1 - ... - a8 - b7 - a9...,
//    driven from one end, must reach the far end.
// 2. Random link matrices and random drivers on both sides, against nets
//    found with a union-find over the 24 lines in the testbench.
module tb_link_net;
  import wsi_pkg::*;

  localparam int NA = 16, NB = 8;
  line_t a_drive [NA], b_drive [NB], a_net [NA], b_net [NB];
  logic [NB-1:0] link [NA];
  int checks = 0, failures = 0;

  link_net #(.NA(NA), .NB(NB)) dut (.a_drive, .b_drive, .link, .a_net, .b_net);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int find(ref int parent[NA+NB], input int x);
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
    // 1. zig-zag chain a_i - b_i - a_(i+1), driven at each end in turn
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < NA; i++) begin link[i] = '0; a_drive[i] = '0; end
      for (int j = 0; j < NB; j++) begin
        b_drive[j] = '0;
        link[j][j] = 1'b1;
        link[j+1][j] = 1'b1;
      end
      if (e == 0) a_drive[0]  = '{drv: 1'b1, val: 1'b1};
      else        a_drive[NB] = '{drv: 1'b1, val: 1'b1};
      #1;
      for (int i = 0; i <= NB; i++) chk(a_net[i] === 2'b11, $sformatf("chain end %0d a%0d", e, i));
      for (int j = 0; j < NB; j++)  chk(b_net[j] === 2'b11, $sformatf("chain end %0d b%0d", e, j));
      for (int i = NB + 1; i < NA; i++) chk(a_net[i] === 2'b00, $sformatf("off chain a%0d floats", i));
    end

    // 2. random
    for (int t = 0; t < 400; t++) begin
      int parent[NA+NB];
      bit cd[NA+NB], cv[NA+NB];
      for (int i = 0; i < NA + NB; i++) begin parent[i] = i; cd[i] = 0; cv[i] = 0; end
      for (int i = 0; i < NA; i++) begin
        link[i] = NB'($urandom) & NB'($urandom) & NB'($urandom);
        a_drive[i] = ($urandom_range(3) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      end
      for (int j = 0; j < NB; j++)
        b_drive[j] = ($urandom_range(3) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      for (int i = 0; i < NA; i++)
        for (int j = 0; j < NB; j++)
          if (link[i][j]) begin
            int ra, rb;
            ra = find(parent, i); rb = find(parent, NA + j);
            if (ra != rb) parent[ra] = rb;
          end
      for (int i = 0; i < NA; i++) begin
        int r;
        r = find(parent, i);
        if (a_drive[i].drv) begin cd[r] = 1; cv[r] |= a_drive[i].val; end
      end
      for (int j = 0; j < NB; j++) begin
        int r;
        r = find(parent, NA + j);
        if (b_drive[j].drv) begin cd[r] = 1; cv[r] |= b_drive[j].val; end
      end
      #1;
      for (int i = 0; i < NA; i++) begin
        int r;
        r = find(parent, i);
        chk(a_net[i].drv === cd[r] && a_net[i].val === cv[r], $sformatf("random a%0d", i));
      end
      for (int j = 0; j < NB; j++) begin
        int r;
        r = find(parent, NA + j);
        chk(b_net[j].drv === cd[r] && b_net[j].val === cv[r], $sformatf("random b%0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
