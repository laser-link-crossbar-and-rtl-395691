// tb_ll_bus_system: the 3 x 3 laser-link bus system at its default size
// (8 tracks per channel, 4 pins per cell).
//
// 1. Cell to cell: pin 0 of cell (0,0) reaches pin 1 of cell (1,2) over a
//    vertical track of channel 0, a horizontal track of channel 1 and a
//    vertical track of channel 2, through two crossbars and two stubs.
//    Driven from either end.
// 2. Defect avoidance: the vertical track used in 1 is made defective
//    (shorted to the supply, modelled as a driver stuck at 1). The signal is
//    lost; the route is then relinked over another track and works again.
// 3. Random links and drivers, against nets found with a union-find over
//    all 100 lines in the testbench.
module tb_ll_bus_system;
  import wsi_pkg::*;

  localparam int R = 3, C = 3, T = 8, P = 4;
  localparam int NH = (R+1)*T, NV = (C+1)*T, NX = (R+1)*(C+1), NP = R*C*P;
  localparam int NL = NH + NV + NP;   // union-find: h lines, then v, then pins

  line_t h_drive [NH], v_drive [NV], pin_drive [NP];
  line_t h_net [NH], v_net [NV], pin_net [NP];
  logic [T-1:0] xlink [NX*T];
  logic [T-1:0] stub [NP];
  int checks = 0, failures = 0;

  ll_bus_system dut (.h_drive, .v_drive, .pin_drive, .xlink, .stub, .h_net, .v_net, .pin_net);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int find(ref int parent[NL], input int x);
    while (parent[x] != x) x = parent[x];
    return x;
  endfunction

  function automatic int pin_of(int r, int c, int k);
    return (r*C + c)*P + k;
  endfunction

  task automatic clear_all();
    for (int i = 0; i < NH; i++) h_drive[i] = '0;
    for (int i = 0; i < NV; i++) v_drive[i] = '0;
    for (int i = 0; i < NP; i++) begin pin_drive[i] = '0; stub[i] = '0; end
    for (int i = 0; i < NX*T; i++) xlink[i] = '0;
  endtask

  // route pin (0,0,0) -> v ch0 track vt -> h ch1 track 5 -> v ch2 track 6 -> pin (1,2,1)
  task automatic make_route(int vt);
    clear_all();
    stub[pin_of(0, 0, 0)][vt] = 1'b1;
    xlink[(1*(C+1) + 0)*T + 5][vt] = 1'b1;
    xlink[(1*(C+1) + 2)*T + 5][6] = 1'b1;
    stub[pin_of(1, 2, 1)][6] = 1'b1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int routes, defects;
    routes = 0;
    defects = 0;
    // 1. cell to cell, both directions and both values
    for (int t = 0; t < 4; t++) begin
      bit v;
      v = t[0];
      make_route(2);
      if (t < 2) pin_drive[pin_of(0, 0, 0)] = '{drv: 1'b1, val: v};
      else       pin_drive[pin_of(1, 2, 1)] = '{drv: 1'b1, val: v};
      #1;
      chk(pin_net[pin_of(1, 2, 1)] === '{drv: 1'b1, val: v} &&
          pin_net[pin_of(0, 0, 0)] === '{drv: 1'b1, val: v}, $sformatf("route %0d", t));
      chk(v_net[0*T + 2].drv && h_net[1*T + 5].drv && v_net[2*T + 6].drv, "tracks on the route carry it");
      chk(!v_net[0*T + 3].drv && !h_net[1*T + 4].drv && !pin_net[pin_of(1, 2, 0)].drv &&
          !pin_net[pin_of(0, 1, 0)].drv, "other lines float");
      routes++;
    end

    // 2. defective track 2 of vertical channel 0, then relinked over track 3
    make_route(2);
    v_drive[0*T + 2] = '{drv: 1'b1, val: 1'b1};
    pin_drive[pin_of(0, 0, 0)] = '{drv: 1'b1, val: 1'b0};
    #1;
    chk(pin_net[pin_of(1, 2, 1)].val === 1'b1, "signal lost over the defective track");
    make_route(3);
    v_drive[0*T + 2] = '{drv: 1'b1, val: 1'b1};
    pin_drive[pin_of(0, 0, 0)] = '{drv: 1'b1, val: 1'b0};
    #1;
    chk(pin_net[pin_of(1, 2, 1)] === '{drv: 1'b1, val: 1'b0}, "relinked route avoids the defect");
    chk(v_net[0*T + 2] === '{drv: 1'b1, val: 1'b1}, "defective track left alone");
    defects++;

    // 3. random
    for (int t = 0; t < 200; t++) begin
      int parent[NL];
      bit cd[NL], cv[NL];
      for (int i = 0; i < NL; i++) begin parent[i] = i; cd[i] = 0; cv[i] = 0; end
      for (int i = 0; i < NX*T; i++)
        xlink[i] = ($urandom_range(5) == 0) ? T'(1 << $urandom_range(T-1)) : '0;
      for (int i = 0; i < NP; i++) begin
        stub[i] = ($urandom_range(2) == 0) ? T'(1 << $urandom_range(T-1)) : '0;
        pin_drive[i] = ($urandom_range(5) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      end
      for (int i = 0; i < NH; i++) h_drive[i] = ($urandom_range(15) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      for (int i = 0; i < NV; i++) v_drive[i] = ($urandom_range(15) == 0) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
      // crossbar (r, c): h line r*T+i with v line c*T+j
      for (int r = 0; r <= R; r++)
        for (int c = 0; c <= C; c++)
          for (int i = 0; i < T; i++)
            for (int j = 0; j < T; j++)
              if (xlink[(r*(C+1) + c)*T + i][j]) begin
                int ra, rb;
                ra = find(parent, r*T + i); rb = find(parent, NH + c*T + j);
                if (ra != rb) parent[ra] = rb;
              end
      // pins of cell (r, c) onto vertical channel c
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int k = 0; k < P; k++)
            for (int j = 0; j < T; j++)
              if (stub[pin_of(r, c, k)][j]) begin
                int ra, rb;
                ra = find(parent, NH + NV + pin_of(r, c, k)); rb = find(parent, NH + c*T + j);
                if (ra != rb) parent[ra] = rb;
              end
      for (int i = 0; i < NL; i++) begin
        line_t d;
        int r;
        d = (i < NH) ? h_drive[i] : (i < NH + NV) ? v_drive[i-NH] : pin_drive[i-NH-NV];
        r = find(parent, i);
        if (d.drv) begin cd[r] = 1; cv[r] |= d.val; end
      end
      #1;
      for (int i = 0; i < NL; i++) begin
        line_t q;
        int r;
        q = (i < NH) ? h_net[i] : (i < NH + NV) ? v_net[i-NH] : pin_net[i-NH-NV];
        r = find(parent, i);
        chk(q.drv === cd[r] && q.val === cv[r], $sformatf("random line %0d", i));
      end
    end
    chk(routes > 0 && defects > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
