// tb_redundancy_workload: the redundancy cases of an 8 x 8 omega bus.
//
// K signals (K = 4, 6, 7, 8) travel bus_in[0..K-1] -> omega node 0 -> bus
// segment -> (cell bypassed) -> omega node 1 -> bus_out, to K chosen
// outputs. In each round one regular track of the segment is defective
// (cut, so it carries nothing):
//   K < 8: the 8 - K free lines are the redundancy. Omega node 0 is
//          reprogrammed to steer the signals onto good tracks only, and
//          omega node 1 to bring them back to their outputs.
//   K = 8: there is no free line; the defective track is replaced by a
//          laser-linked spare track instead.
// A round without the repair (signal routed over the cut track) must lose
// that signal, which shows the defect is real. Steering data is computed
// with the destination-tag rule and shifted into the 25-block chain.
module tb_redundancy_workload;
  import wsi_pkg::*;
  import omega_ref_pkg::*;

  localparam int NCTL = 25;

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
  line_t bs_h_drive [32], bs_v_drive [32], bs_pin_drive [36];
  line_t bs_h [32], bs_v [32], bs_pin [36];
  logic [7:0] bs_xlink [128], bs_stub [36];

  int checks = 0, failures = 0;
  int n_reroute = 0, n_spare = 0, n_lost = 0;

  wsi_bus_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load_chain(input logic [1:0] s0[12], input logic [1:0] s1[12]);
    logic [1:0] img[NCTL];
    for (int i = 0; i < 12; i++) begin img[i] = s0[i]; img[13 + i] = s1[i]; end
    img[12] = 2'b11;   // cell bypassed
    for (int i = 0; i < NCTL; i++) begin
      @(negedge clk); ctl_sin = img[i]; ctl_left = 1;
    end
    @(negedge clk); ctl_left = 0; ctl_latch = 1;
    @(negedge clk); ctl_latch = 0;
  endtask

  // find intermediate tracks (avoiding track 'bad' if avoid=1) so that both
  // omega nodes can realize: input i -> track t[i] -> output outp[i]
  function automatic bit plan(int k, int outp[8], int bad, bit avoid,
                              output logic [1:0] s0[12], output logic [1:0] s1[12],
                              output int t[8]);
    for (int tries = 0; tries < 2000; tries++) begin
      int tracks[$];
      int d0[8], d1[8];
      for (int i = 0; i < 8; i++) if (!avoid || i != bad || k == 8) tracks.push_back(i);
      tracks.shuffle();
      for (int i = 0; i < 8; i++) begin d0[i] = -1; d1[i] = -1; t[i] = -1; end
      for (int i = 0; i < k; i++) begin
        t[i] = tracks[i];
        d0[i] = t[i];
        d1[t[i]] = outp[i];
      end
      if (route(d0, s0) && route(d1, s1)) return 1;
    end
    return 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ks[4] = '{4, 6, 7, 8};
    bypass_link = '{0, 0};
    seg_cut[0] = 0; seg_lin[0] = '{0, 0}; seg_lout[0] = '{0, 0};
    for (int i = 0; i < 8; i++) begin
      xb_link[i] = 0; xb_h_drive[i] = '0; xb_v_drive[i] = '0;
      cell_out[0][i] = '0; bus_in[i] = '0;
    end
    for (int p = 0; p < 16; p++) begin xb1s_lk[p] = 0; xb1s_drive[p] = '0; end
    for (int i = 0; i < 32; i++) begin bs_h_drive[i] = '0; bs_v_drive[i] = '0; end
    for (int i = 0; i < 36; i++) begin bs_pin_drive[i] = '0; bs_stub[i] = '0; end
    for (int i = 0; i < 128; i++) bs_xlink[i] = '0;
    for (int i = 0; i < NCTL; i++) ctl_dp[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    foreach (ks[n]) begin
      int k;
      k = ks[n];
      for (int round = 0; round < 6; round++) begin
        int outp[8], t[8], bad, victim;
        logic [1:0] s0[12], s1[12];
        for (int i = 0; i < 8; i++) outp[i] = i;
        outp.shuffle();
        bad = int'($urandom_range(7));
        seg_cut[0] = 8'(1 << bad); seg_lin[0] = '{0, 0}; seg_lout[0] = '{0, 0};

        // 1. a plan that uses the defective track loses that signal
        victim = -1;
        for (int tries = 0; tries < 50 && victim < 0; tries++) begin
          chk(plan(k, outp, bad, 0, s0, s1, t), "plan found");
          for (int i = 0; i < k; i++) if (t[i] == bad) victim = i;
        end
        if (victim >= 0) begin
          load_chain(s0, s1);
          for (int i = 0; i < 8; i++) bus_in[i] = (i < k) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
          #1;
          chk(bus_out[outp[victim]].drv === 1'b0, "signal over the defective track is lost");
          n_lost++;
        end

        // 2. repair: reroute over free lines, or a spare track when K = 8
        if (k < 8) begin
          chk(plan(k, outp, bad, 1, s0, s1, t), $sformatf("K=%0d reroute plan found", k));
          for (int i = 0; i < k; i++) chk(t[i] != bad, "reroute avoids the defective track");
          n_reroute++;
        end else begin
          chk(plan(k, outp, bad, 0, s0, s1, t), "K=8 plan found");
          seg_lin[0][round % 2][bad] = 1'b1;
          seg_lout[0][round % 2][bad] = 1'b1;
          n_spare++;
        end
        load_chain(s0, s1);
        for (int v = 0; v < 4; v++) begin
          for (int i = 0; i < 8; i++) bus_in[i] = (i < k) ? '{drv: 1'b1, val: 1'($urandom)} : '0;
          #1;
          for (int i = 0; i < k; i++)
            chk(bus_out[outp[i]] === bus_in[i], $sformatf("K=%0d signal %0d delivered", k, i));
        end
      end
    end
    $display("workload: reroutes=%0d spare_repairs=%0d lost_without_repair=%0d", n_reroute, n_spare, n_lost);
    chk(n_reroute > 0 && n_spare > 0 && n_lost > 0, "every case happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
