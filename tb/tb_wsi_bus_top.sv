// tb_wsi_bus_top: end-to-end test of the omega bus, both crossbars and the
// laser-link bus system, at the top's default size (two omega nodes, one
// function-block slot).
//
// The whole control chain (25 blocks: omega node 0, the cell tap, omega
// node 1) is programmed serially and, once, in parallel. Scenarios:
//   integrate  : bus_in -> omega 0 -> cell; cell -> omega 1 -> bus_out
//   cell bypass: bus_in -> omega 0 -> omega 1 -> bus_out, cell passed by
//   spare      : a bus track in the segment is cut and replaced by a spare
//   omega fault: omega node 1 held all-off and bypassed by its laser links
//   crossbars  : a random permutation through each laser-link crossbar
//   bus system : cell-to-cell routes through the 3 x 3 laser-link bus
//                system, rerouted around a defective (shorted) track
// Every mechanism (serial and parallel programming, latching, straight and
// exchange switch states, cell integrate and bypass, spare track, omega
// bypass, crossbar routes, bus-system routes and defect avoidance) is counted; one that never happened is a failure.
// The serial program must take exactly NCTL shifts plus one latch clock.
module tb_wsi_bus_top;
  import wsi_pkg::*;
  import omega_ref_pkg::*;

  localparam int NCTL = 2 * 12 + 1;

  logic clk = 0, rst_n = 0;
  line_t bus_in [8], bus_out [8];
  line_t cell_in [1][8], cell_out [1][8];
  logic ctl_dprl = 0, ctl_left = 0, ctl_latch = 0;
  logic [1:0] ctl_sin = 0, ctl_sout;
  logic [1:0] ctl_dp [NCTL], ctl_steer [NCTL];
  logic [7:0] bypass_link [2];
  logic [7:0] seg_cut [1], seg_lin [1][2], seg_lout [1][2];
  line_t seg_spare [1][2];
  line_t xb_h_drive [8], xb_v_drive [8], xb_h [8], xb_v [8];
  logic [7:0] xb_link [8];
  line_t xb1s_drive [16], xb1s_port [16], xb1s_bus [8];
  logic [7:0] xb1s_lk [16];
  localparam int BS_NH = 32, BS_NV = 32, BS_NP = 36;
  line_t bs_h_drive [BS_NH], bs_v_drive [BS_NV], bs_pin_drive [BS_NP];
  line_t bs_h [BS_NH], bs_v [BS_NV], bs_pin [BS_NP];
  logic [7:0] bs_xlink [16*8], bs_stub [BS_NP];

  int checks = 0, failures = 0;
  int n_serial = 0, n_parallel = 0, n_latch = 0, n_straight = 0, n_exchange = 0;
  int n_integrate = 0, n_cell_bypass = 0, n_spare = 0, n_omega_bypass = 0, n_xb = 0, n_xb1s = 0;
  int n_bs = 0, n_bs_defect = 0;

  wsi_bus_top dut (.*);

  task automatic bs_clear();
    for (int i = 0; i < BS_NH; i++) bs_h_drive[i] = '0;
    for (int i = 0; i < BS_NV; i++) bs_v_drive[i] = '0;
    for (int i = 0; i < BS_NP; i++) begin bs_pin_drive[i] = '0; bs_stub[i] = '0; end
    for (int i = 0; i < 16*8; i++) bs_xlink[i] = '0;
  endtask

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // chain image: blocks 0..11 omega 0, 12 tap, 13..24 omega 1
  task automatic build_image(input logic [1:0] s0[12], input logic [1:0] tap,
                             input logic [1:0] s1[12], output logic [1:0] img[NCTL]);
    for (int i = 0; i < 12; i++) begin img[i] = s0[i]; img[13 + i] = s1[i]; end
    img[12] = tap;
  endtask

  task automatic count_states(input logic [1:0] img[NCTL]);
    for (int i = 0; i < NCTL; i++) begin
      if (i == 12) continue;
      if (img[i] == 2'b10) n_straight++;
      if (img[i] == 2'b11) n_exchange++;
    end
  endtask

  task automatic program_serial(input logic [1:0] img[NCTL]);
    int cycles;
    cycles = 0;
    for (int i = 0; i < NCTL; i++) begin
      @(negedge clk); ctl_sin = img[i]; ctl_left = 1;
      @(posedge clk); cycles++;
    end
    @(negedge clk); ctl_left = 0; ctl_latch = 1;
    @(posedge clk); cycles++;
    @(negedge clk); ctl_latch = 0;
    chk(cycles == NCTL + 1, "serial program takes NCTL+1 clocks");
    for (int i = 0; i < NCTL; i++) chk(ctl_steer[i] === img[i], $sformatf("block %0d programmed", i));
    n_serial++; n_latch++;
    count_states(img);
  endtask

  task automatic program_parallel(input logic [1:0] img[NCTL]);
    ctl_dp = img;
    @(negedge clk); ctl_dprl = 1;
    @(negedge clk); ctl_dprl = 0; ctl_latch = 1;
    @(negedge clk); ctl_latch = 0;
    for (int i = 0; i < NCTL; i++) chk(ctl_steer[i] === img[i], $sformatf("block %0d loaded", i));
    n_parallel++; n_latch++;
    count_states(img);
  endtask

  task automatic drive_random();
    for (int i = 0; i < 8; i++) begin
      bus_in[i]      = '{drv: 1'b1, val: 1'($urandom)};
      cell_out[0][i] = '{drv: 1'b1, val: 1'($urandom)};
    end
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d0[8], d1[8], fault;
    logic [1:0] s0[12], s1[12], img[NCTL], off[12];
    for (int i = 0; i < NCTL; i++) ctl_dp[i] = 0;
    for (int i = 0; i < 12; i++) off[i] = 2'b00;
    bypass_link = '{0, 0};
    seg_cut[0] = 0; seg_lin[0] = '{0, 0}; seg_lout[0] = '{0, 0};
    for (int i = 0; i < 8; i++) begin
      xb_link[i] = 0; xb_h_drive[i] = '0; xb_v_drive[i] = '0;
    end
    for (int p = 0; p < 16; p++) begin xb1s_lk[p] = 0; xb1s_drive[p] = '0; end
    bs_clear();
    drive_random();
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 8; i++) chk(bus_out[i].drv === 1'b0 && cell_in[0][i].drv === 1'b0, "reset: all off");
    rst_n = 1;

    for (int t = 0; t < 24; t++) begin
      bit integrate, use_spare, parallel;
      integrate = (t % 2 == 0);
      use_spare = (t % 3 == 2);
      parallel  = (t % 6 == 5);
      random_perm(d0, s0);
      random_perm(d1, s1);
      build_image(s0, integrate ? 2'b10 : 2'b11, s1, img);
      seg_cut[0] = 0; seg_lin[0] = '{0, 0}; seg_lout[0] = '{0, 0};
      if (use_spare) begin
        fault = int'($urandom_range(7));
        seg_cut[0][fault] = 1'b1;
        seg_lin[0][t % 2][fault] = 1'b1;
        seg_lout[0][t % 2][fault] = 1'b1;
      end
      if (parallel) program_parallel(img); else program_serial(img);
      for (int v = 0; v < 4; v++) begin
        drive_random();
        if (integrate) begin
          for (int i = 0; i < 8; i++) begin
            chk(cell_in[0][d0[i]] === bus_in[i], "bus_in reaches the cell through omega 0");
            chk(bus_out[d1[i]] === cell_out[0][i], "cell output reaches bus_out through omega 1");
          end
        end else begin
          for (int i = 0; i < 8; i++) begin
            chk(bus_out[d1[d0[i]]] === bus_in[i], "bus_in passes the cell to bus_out");
            chk(cell_in[0][i] === cell_out[0][i], "bypassed cell sees its own output");
          end
        end
        if (use_spare && integrate) chk(seg_spare[0][t % 2] === cell_in[0][fault], "spare track carries the cut signal");
        if (use_spare && !integrate) chk(seg_spare[0][t % 2].drv === 1'b1, "spare track driven");
      end
      if (integrate) n_integrate++; else n_cell_bypass++;
      if (use_spare) n_spare++;
    end

    // a cut track with no spare linked leaves that line floating at the cell
    random_perm(d0, s0);
    random_perm(d1, s1);
    build_image(s0, 2'b10, s1, img);
    program_serial(img);
    fault = int'($urandom_range(7));
    seg_cut[0] = 8'(1 << fault); seg_lin[0] = '{0, 0}; seg_lout[0] = '{0, 0};
    drive_random();
    for (int i = 0; i < 8; i++)
      chk((i == fault) ? (cell_in[0][i].drv === 1'b0) : (cell_in[0][i].drv === 1'b1), "cut track isolates");
    seg_cut[0] = 0;

    // omega node 1 out of service: all-off and bypassed by laser links
    random_perm(d0, s0);
    build_image(s0, 2'b11, off, img);
    program_serial(img);
    bypass_link[1] = 8'hff;
    for (int v = 0; v < 8; v++) begin
      drive_random();
      for (int i = 0; i < 8; i++) chk(bus_out[d0[i]] === bus_in[i], "omega 1 bypassed by links");
    end
    n_omega_bypass++;
    bypass_link[1] = 8'h00;
    #1;
    for (int i = 0; i < 8; i++) chk(bus_out[i].drv === 1'b0, "omega 1 off without links");

    // crossbars: permutations, driven from either side
    for (int t = 0; t < 20; t++) begin
      int p[8], q[16];
      bit from_h;
      from_h = (t % 2 == 0);
      for (int i = 0; i < 8; i++) p[i] = i;
      for (int i = 0; i < 16; i++) q[i] = i;
      p.shuffle(); q.shuffle();
      for (int i = 0; i < 8; i++) begin
        xb_link[i]    = 8'(1 << p[i]);
        xb_h_drive[i] = from_h ? '{drv: 1'b1, val: 1'($urandom)} : '0;
        xb_v_drive[i] = from_h ? '0 : '{drv: 1'b1, val: 1'($urandom)};
      end
      // one-sided: ports q[2b] and q[2b+1] joined through bus b
      for (int i = 0; i < 16; i++) begin xb1s_lk[i] = 0; xb1s_drive[i] = '0; end
      for (int b = 0; b < 8; b++) begin
        xb1s_lk[q[2*b]][b] = 1'b1;
        xb1s_lk[q[2*b+1]][b] = 1'b1;
        xb1s_drive[q[2*b + (t % 2)]] = '{drv: 1'b1, val: 1'($urandom)};
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        chk(from_h ? (xb_v[p[i]] === xb_h_drive[i]) : (xb_h[i] === xb_v_drive[p[i]]), "two-sided crossbar route");
        chk(xb1s_port[q[2*i + 1 - (t % 2)]] === xb1s_drive[q[2*i + (t % 2)]], "one-sided crossbar route");
      end
      n_xb++; n_xb1s++;
    end

    // laser-link bus system: pin k0 of cell (r0,c0) to pin k1 of cell (r1,c1)
    // down vertical channel c0 (track va), along horizontal channel hr (track
    // ht) and up vertical channel c1 (track vb). Every other route has a
    // shorted track va first, which must spoil the signal, then is relinked.
    for (int t = 0; t < 40; t++) begin
      int r0, c0, k0, r1, c1, k1, hr, ht, va, vb, bad;
      bit v;
      r0 = $urandom_range(2); c0 = $urandom_range(2); k0 = $urandom_range(3);
      do begin r1 = $urandom_range(2); c1 = $urandom_range(2); end while (r1 == r0 && c1 == c0);
      k1 = $urandom_range(3); hr = $urandom_range(3); ht = $urandom_range(7);
      va = $urandom_range(7);
      do vb = $urandom_range(7); while (c1 == c0 && vb == va);
      bad = (t % 2 == 1);
      v = 1'($urandom);
      for (int pass = 0; pass <= bad; pass++) begin
        int vt;
        vt = (pass == 0) ? va : (va + ((c1 == c0 && (va + 1) % 8 == vb) ? 2 : 1)) % 8;
        bs_clear();
        bs_stub[(r0*3 + c0)*4 + k0][vt] = 1'b1;
        bs_xlink[(hr*4 + c0)*8 + ht][vt] = 1'b1;
        bs_xlink[(hr*4 + c1)*8 + ht][vb] = 1'b1;
        bs_stub[(r1*3 + c1)*4 + k1][vb] = 1'b1;
        bs_pin_drive[(r0*3 + c0)*4 + k0] = '{drv: 1'b1, val: bad ? 1'b0 : v};
        if (bad) bs_v_drive[c0*8 + va] = '{drv: 1'b1, val: 1'b1};
        #1;
        if (bad && pass == 0)
          chk(bs_pin[(r1*3 + c1)*4 + k1].val === 1'b1, "bus system: shorted track spoils the signal");
        else
          chk(bs_pin[(r1*3 + c1)*4 + k1] === '{drv: 1'b1, val: bad ? 1'b0 : v}, "bus system: cell-to-cell route");
        chk(bs_pin[(r1*3 + c1)*4 + (k1 + 1) % 4].drv === 1'b0, "bus system: other pin of the cell floats");
      end
      if (bad) n_bs_defect++; else n_bs++;
    end

    $display("mechanisms: serial=%0d parallel=%0d latch=%0d straight=%0d exchange=%0d integrate=%0d cell_bypass=%0d spare=%0d omega_bypass=%0d xb=%0d xb1s=%0d bs=%0d bs_defect=%0d",
             n_serial, n_parallel, n_latch, n_straight, n_exchange, n_integrate, n_cell_bypass,
             n_spare, n_omega_bypass, n_xb, n_xb1s, n_bs, n_bs_defect);
    chk(n_serial > 0, "serial programming happened");
    chk(n_parallel > 0, "parallel programming happened");
    chk(n_latch > 0, "latch happened");
    chk(n_straight > 0, "straight state used");
    chk(n_exchange > 0, "exchange state used");
    chk(n_integrate > 0, "cell integrated");
    chk(n_cell_bypass > 0, "cell bypassed");
    chk(n_spare > 0, "spare track used");
    chk(n_omega_bypass > 0, "omega bypass used");
    chk(n_xb > 0, "two-sided crossbar used");
    chk(n_xb1s > 0, "one-sided crossbar used");
    chk(n_bs > 0, "bus system route used");
    chk(n_bs_defect > 0, "bus system defect avoided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
