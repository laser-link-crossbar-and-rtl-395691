// tb_omega_control: the 12-block control string.
//
// Serial load: 12 random steering pairs are shifted in, first pair first;
// after exactly 12 left shifts and one latch, block i must hold pair i and
// drive its decoded controls. The controls must not change before latch.
// Parallel load: dprl loads all blocks at once. sout must show block 0.
module tb_omega_control;
  localparam int NC = 12;
  logic clk = 0, rst_n = 0, dprl = 0, left = 0, latch = 0;
  logic [1:0] sin = 0, sout;
  logic [1:0] dp [NC], d [NC];
  logic [2:0] c [NC];
  logic [1:0] pairs [NC];
  int checks = 0, failures = 0;
  int cycles;

  omega_control #(.NCTL(NC)) dut (.clk, .rst_n, .dprl, .left, .latch, .sin, .dp, .sout, .d, .c);

  always #5 clk = ~clk;

  function automatic logic [2:0] dec(logic [1:0] x);
    return (x == 2'b00) ? 3'b000 : 3'(1 << (x - 1));
  endfunction

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
    for (int i = 0; i < NC; i++) dp[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 10; rep++) begin
      logic [1:0] old_d [NC];
      old_d = d;
      for (int i = 0; i < NC; i++) pairs[i] = 2'($urandom);
      cycles = 0;
      for (int i = 0; i < NC; i++) begin
        @(negedge clk);
        sin = pairs[i]; left = 1;
        @(posedge clk);
        cycles++;
      end
      @(negedge clk);
      left = 0;
      for (int i = 0; i < NC; i++) chk(d[i] === old_d[i], "controls changed before latch");
      chk(sout === pairs[0], "sout shows block 0");
      latch = 1;
      @(posedge clk);
      cycles++;
      @(negedge clk);
      latch = 0;
      chk(cycles == NC + 1, "serial load takes NCTL+1 clocks");
      for (int i = 0; i < NC; i++) begin
        chk(d[i] === pairs[i], $sformatf("serial block %0d pair", i));
        chk(c[i] === dec(pairs[i]), $sformatf("serial block %0d controls", i));
      end
    end
    // parallel load
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 0; i < NC; i++) dp[i] = 2'($urandom);
      @(negedge clk); dprl = 1;
      @(negedge clk); dprl = 0; latch = 1;
      @(negedge clk); latch = 0;
      for (int i = 0; i < NC; i++) chk(d[i] === dp[i] && c[i] === dec(dp[i]), $sformatf("parallel block %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
