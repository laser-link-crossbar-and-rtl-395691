// tb_omega_ctrl_block: one control block. Checks that a pair shifted in (or
// loaded in parallel) reaches the switch controls only after latch, and that
// the controls follow the decoder table.
module tb_omega_ctrl_block;
  logic clk = 0, rst_n = 0, dprl = 0, left = 0, latch = 0;
  logic [1:0] dp = 0, leftin = 0, leftout, d;
  logic [2:0] c;
  logic [1:0] m_sr, m_ff;
  int checks = 0, failures = 0;

  omega_ctrl_block dut (.clk, .rst_n, .dprl, .left, .latch, .dp, .leftin, .leftout, .d, .c);

  always #5 clk = ~clk;

  function automatic logic [2:0] dec(logic [1:0] x);
    return (x == 2'b00) ? 3'b000 : 3'(1 << (x - 1));
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (c !== 3'b000 || d !== 2'b00) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    m_sr = 0; m_ff = 0;
    for (int i = 0; i < 300; i++) begin
      dprl   = ($urandom_range(3) == 0);
      left   = 1'($urandom_range(1));
      latch  = ($urandom_range(2) == 0);
      dp     = 2'($urandom);
      leftin = 2'($urandom);
      @(posedge clk);
      if (latch) m_ff = m_sr;          // latch takes the value before this edge
      if (dprl) m_sr = dp; else if (left) m_sr = leftin;
      #1;
      checks++;
      if (leftout !== m_sr || d !== m_ff || c !== dec(m_ff)) begin
        failures++;
        $display("FAIL i=%0d sr=%b/%b ff=%b/%b c=%b", i, leftout, m_sr, d, m_ff, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
