// tb_cell_tap: a function block switched onto the bus and bypassed.
//
// Steering 10 integrates the cell (bus -> cell_in, cell_out -> bus), 11
// bypasses it (bus passes, cell output loops to its own input), 00 isolates
// both; the setting arrives through the control chain (shift then latch).
module tb_cell_tap;
  import wsi_pkg::*;

  logic clk = 0, rst_n = 0, dprl = 0, left = 0, latch = 0;
  logic [1:0] dp = 0, leftin = 0, leftout, steer;
  line_t bus_w [8], bus_e [8], cell_out [8], cell_in [8];
  int checks = 0, failures = 0;

  cell_tap #(.N(8)) dut (.clk, .rst_n, .dprl, .left, .latch, .dp, .leftin, .leftout, .steer,
                         .bus_w, .bus_e, .cell_out, .cell_in);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [1:0] mode;
      mode = (t % 3 == 0) ? 2'b10 : (t % 3 == 1) ? 2'b11 : 2'b00;
      @(negedge clk); leftin = mode; left = 1;
      @(negedge clk); left = 0; latch = 1;
      @(negedge clk); latch = 0;
      chk(steer === mode && leftout === mode, "setting latched");
      for (int i = 0; i < 8; i++) begin
        bus_w[i]    = '{drv: 1'b1, val: 1'($urandom)};
        cell_out[i] = '{drv: 1'b1, val: 1'($urandom)};
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        case (mode)
          2'b10: chk(cell_in[i] === bus_w[i] && bus_e[i] === cell_out[i], "integrate");
          2'b11: chk(bus_e[i] === bus_w[i] && cell_in[i] === cell_out[i], "bypass");
          default: chk(bus_e[i].drv === 1'b0 && cell_in[i].drv === 1'b0, "isolated");
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
