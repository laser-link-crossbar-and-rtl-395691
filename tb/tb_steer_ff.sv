// tb_steer_ff: the steering flip-flop loads only on latch and holds
// otherwise; reset clears it.
module tb_steer_ff;
  logic clk = 0, rst_n = 0, latch = 0;
  logic [1:0] d_in = 0, q, model;
  int checks = 0, failures = 0;

  steer_ff dut (.clk, .rst_n, .latch, .d_in, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_in = 2'b11;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = 2'b00;
    for (int i = 0; i < 200; i++) begin
      latch = ($urandom_range(3) == 0);
      d_in  = 2'($urandom);
      @(posedge clk);
      if (latch) model = d_in;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d got %b exp %b", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
