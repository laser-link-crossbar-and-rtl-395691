// tb_spare_line_segment: regular tracks, cuts and spare-track substitution.
//
// Intact segment: b = a. One or two defective tracks are cut and each is
// replaced by a spare track linked at both ends: every signal must still
// arrive at its own right port, and a cut track with no spare must float.
module tb_spare_line_segment;
  import wsi_pkg::*;

  line_t a [8], b [8], spare [2];
  logic [7:0] cut, lin [2], lout [2];
  int checks = 0, failures = 0;

  spare_line_segment #(.N(8), .N_SPARE(2)) dut (.a, .cut, .lin, .lout, .spare, .b);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int f0, f1, nf;
      for (int i = 0; i < 8; i++) a[i] = '{drv: 1'b1, val: 1'($urandom)};
      cut = 0; lin = '{0, 0}; lout = '{0, 0};
      nf = t % 4;             // 0: intact, 1: one spare used, 2: two spares, 3: cut without spare
      f0 = int'($urandom_range(7));
      f1 = (f0 + 1 + int'($urandom_range(6))) % 8;
      if (nf >= 1) begin cut[f0] = 1; if (nf != 3) begin lin[0][f0] = 1; lout[0][f0] = 1; end end
      if (nf == 2) begin cut[f1] = 1; lin[1][f1] = 1; lout[1][f1] = 1; end
      #1;
      for (int i = 0; i < 8; i++) begin
        if (nf == 3 && i == f0) chk(b[i].drv === 1'b0, "cut track floats");
        else chk(b[i] === a[i], $sformatf("t=%0d port %0d", t, i));
      end
      if (nf == 1 || nf == 2) chk(spare[0] === a[f0], "spare 0 carries the signal");
      if (nf == 0) chk(spare[0].drv === 1'b0 && spare[1].drv === 1'b0, "unused spares float");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
