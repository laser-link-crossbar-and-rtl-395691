// tb_omega_ll_node: omega network with laser bypass links.
//
// With no link made the node routes like an omega network. With the omega
// network held all-off (as after reset) and all bypass links made, line i
// must reach output i unchanged; with only some links made, only those
// lines pass.
module tb_omega_ll_node;
  import wsi_pkg::*;
  import omega_ref_pkg::*;

  logic clk = 0, rst_n = 0, dprl = 0, left = 0, latch = 0;
  logic [1:0] sin = 0, sout;
  logic [1:0] dp [12], steer [12];
  logic [7:0] bypass = 0;
  line_t din [8], dout [8];
  int checks = 0, failures = 0;

  omega_ll_node #(.N(8)) dut (.clk, .rst_n, .dprl, .left, .latch, .sin, .dp, .sout, .steer,
                              .bypass, .din, .dout);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dest[8];
    logic [1:0] st[12];
    for (int i = 0; i < 12; i++) dp[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // omega routing, links open
    for (int t = 0; t < 10; t++) begin
      random_perm(dest, st);
      dp = st;
      @(negedge clk); dprl = 1;
      @(negedge clk); dprl = 0; latch = 1;
      @(negedge clk); latch = 0;
      for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'($urandom)};
      #1;
      for (int i = 0; i < 8; i++) chk(dout[dest[i]] === din[i], "omega route");
    end
    // omega taken out of service: all-off, links made
    for (int i = 0; i < 12; i++) dp[i] = 2'b00;
    @(negedge clk); dprl = 1;
    @(negedge clk); dprl = 0; latch = 1;
    @(negedge clk); latch = 0;
    for (int t = 0; t < 20; t++) begin
      bypass = (t < 10) ? 8'hff : 8'($urandom);
      for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'($urandom)};
      #1;
      for (int i = 0; i < 8; i++)
        chk(bypass[i] ? (dout[i] === din[i]) : (dout[i].drv === 1'b0), $sformatf("bypass line %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
