// tb_omega_transfer: the 8 x 8 transfer block.
//
// 1. Realizable permutations: steering pairs come from the destination-tag
//    rule (omega_ref_pkg::route), are decoded by a table in this testbench,
//    and every input must appear at its destination output.
// 2. The path of Figure 2.7 style example: input 010 to output 110 alone.
// 3. All switches off: every output floats.
// 4. Random control words (including the C1 and all-joined states) against a
//    stage-by-stage model of shuffle and switch written here.
module tb_omega_transfer;
  import wsi_pkg::*;
  import omega_ref_pkg::*;

  line_t      din [8], dout[8];
  logic [2:0] c   [12];
  int checks = 0, failures = 0;

  omega_transfer #(.N(8)) dut (.din, .c, .dout);

  function automatic logic [2:0] dec(logic [1:0] x);
    return (x == 2'b00) ? 3'b000 : 3'(1 << (x - 1));
  endfunction

  function automatic line_t merge(line_t a, line_t b);
    line_t r;
    r.drv = a.drv | b.drv;
    r.val = (a.drv & a.val) | (b.drv & b.val);
    return r;
  endfunction

  task automatic model(output line_t o[8]);
    line_t cur[8], sh[8];
    cur = din;
    for (int s = 0; s < 3; s++) begin
      for (int p = 0; p < 8; p++) sh[rotl(p)] = cur[p];
      for (int k = 0; k < 4; k++) begin
        logic [2:0] cc;
        cc = c[s*4 + k];
        if ($countones(cc) >= 2) begin
          cur[2*k] = merge(sh[2*k], sh[2*k+1]); cur[2*k+1] = cur[2*k];
        end else if (cc == 3'b010) begin
          cur[2*k] = merge(sh[2*k], '0); cur[2*k+1] = merge(sh[2*k+1], '0);
        end else if (cc == 3'b100) begin
          cur[2*k] = merge(sh[2*k+1], '0); cur[2*k+1] = merge(sh[2*k], '0);
        end else begin
          cur[2*k] = '0; cur[2*k+1] = '0;
        end
      end
    end
    o = cur;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dest[8];
    logic [1:0] st[12];
    line_t exp_o[8];

    // 1. permutations
    for (int t = 0; t < 100; t++) begin
      random_perm(dest, st);
      for (int i = 0; i < 12; i++) c[i] = dec(st[i]);
      for (int v = 0; v < 4; v++) begin
        for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'($urandom)};
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (dout[dest[i]] !== din[i]) begin
            failures++;
            $display("FAIL perm t=%0d in %0d -> out %0d", t, i, dest[i]);
          end
        end
      end
    end

    // 2. single path 010 -> 110, other inputs floating
    for (int i = 0; i < 8; i++) begin din[i] = '0; dest[i] = (i + 4) % 8; end
    dest[2] = 6;
    void'(route(dest, st));
    for (int i = 0; i < 12; i++) c[i] = dec(st[i]);
    din[2] = '{drv: 1'b1, val: 1'b1};
    #1;
    checks++;
    if (dout[6] !== din[2]) begin failures++; $display("FAIL path 010->110"); end

    // 3. all off
    for (int i = 0; i < 12; i++) c[i] = 3'b000;
    for (int i = 0; i < 8; i++) din[i] = '{drv: 1'b1, val: 1'b1};
    #1;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dout[i].drv !== 1'b0) begin failures++; $display("FAIL off out %0d driven", i); end
    end

    // 4. random controls
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 12; i++) c[i] = 3'($urandom);
      for (int i = 0; i < 8; i++) din[i] = line_t'(2'($urandom));
      #1;
      model(exp_o);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (dout[i] !== exp_o[i]) begin failures++; $display("FAIL random t=%0d out %0d", t, i); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
