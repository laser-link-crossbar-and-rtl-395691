// tb_omega_network: the full 8 x 8 omega network, programmed serially.
//
// For each of a series of realizable permutations the steering pairs are
// computed with the destination-tag rule, shifted into the control string
// (12 clocks, block 0's pair first) and
// latched; every input must then reach its destination output. The data
// path must keep the old mapping until the latch edge. Also checks the
// parallel-load path and that reset leaves all outputs floating.
module tb_omega_network;
  import wsi_pkg::*;
  import omega_ref_pkg::*;

  logic clk = 0, rst_n = 0, dprl = 0, left = 0, latch = 0;
  logic [1:0] sin = 0, sout;
  logic [1:0] dp [12], steer [12];
  line_t din [8], dout [8];
  int checks = 0, failures = 0;

  omega_network #(.N(8)) dut (.clk, .rst_n, .dprl, .left, .latch, .sin, .dp, .sout, .steer, .din, .dout);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic check_map(int dest[8], string tag);
    for (int v = 0; v < 4; v++) begin
      for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'($urandom)};
      #1;
      for (int i = 0; i < 8; i++) chk(dout[dest[i]] === din[i], $sformatf("%s in %0d", tag, i));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dest[8], prev[8];
    logic [1:0] st[12];
    for (int i = 0; i < 12; i++) dp[i] = 0;
    for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'b1};
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 8; i++) chk(dout[i].drv === 1'b0, "reset: output floating");
    rst_n = 1;
    for (int i = 0; i < 8; i++) prev[i] = -1;
    for (int t = 0; t < 40; t++) begin
      random_perm(dest, st);
      for (int i = 0; i < 12; i++) begin
        @(negedge clk);
        sin = st[i]; left = 1;
      end
      @(negedge clk);
      left = 0;
      if (prev[0] >= 0) check_map(prev, "old mapping held");
      latch = 1;
      @(negedge clk);
      latch = 0;
      check_map(dest, "serial");
      for (int i = 0; i < 12; i++) chk(steer[i] === st[i], "steering pair stored");
      prev = dest;
    end
    for (int t = 0; t < 10; t++) begin
      random_perm(dest, st);
      dp = st;
      @(negedge clk); dprl = 1;
      @(negedge clk); dprl = 0; latch = 1;
      @(negedge clk); latch = 0;
      check_map(dest, "parallel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
