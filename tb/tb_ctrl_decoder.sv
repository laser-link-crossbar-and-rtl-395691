// tb_ctrl_decoder: the four steering pairs against the decoder table.
module tb_ctrl_decoder;
  logic [1:0] d;
  logic [2:0] c;
  int checks = 0, failures = 0;
  // expected {C3,C2,C1} for D0D1 = 00, 01, 10, 11
  localparam logic [2:0] EXP [4] = '{3'b000, 3'b001, 3'b010, 3'b100};

  ctrl_decoder dut (.d, .c);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int i = 0; i < 4; i++) begin
        d = i[1:0];
        #1;
        checks++;
        if (c !== EXP[i]) begin failures++; $display("FAIL d=%b c=%b", d, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
