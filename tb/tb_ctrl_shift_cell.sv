// tb_ctrl_shift_cell: reset, parallel load, left shift, hold and the
// priority of dprl over left, against a register model in the testbench.
module tb_ctrl_shift_cell;
  logic clk = 0, rst_n = 0, dprl = 0, left = 0;
  logic [1:0] dp = 0, leftin = 0, leftout;
  logic [1:0] model;
  int checks = 0, failures = 0;

  ctrl_shift_cell dut (.clk, .rst_n, .dprl, .left, .dp, .leftin, .leftout);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (leftout !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = 2'b00;
    for (int i = 0; i < 200; i++) begin
      dprl   = 1'($urandom_range(1));
      left   = 1'($urandom_range(1));
      dp     = 2'($urandom);
      leftin = 2'($urandom);
      @(posedge clk);
      if (dprl) model = dp; else if (left) model = leftin;
      #1;
      checks++;
      if (leftout !== model) begin failures++; $display("FAIL i=%0d got %b exp %b", i, leftout, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
