// tb_p8_alu_encoder: each ALU operation bit alone, and none, must give the
// 74181 mode, select and carry-in listed below (the settings for F = B,
// A plus B, A minus B, A minus 1, A or B, not B, A plus A, A minus B minus 1
// and F = A); the IR clear must follow IR reset or system reset.
module tb_p8_alu_encoder;
  logic pass, add, sub, dec, lor, inv, shl, cmp, ir_reset, sys_reset;
  logic m, cn_n, ir_clear;
  logic [3:0] s;
  int checks = 0, failures = 0;

  p8_alu_encoder dut (.pass(pass), .add(add), .sub(sub), .dec(dec), .lor(lor), .inv(inv),
                      .shl(shl), .cmp(cmp), .ir_reset(ir_reset), .sys_reset(sys_reset),
                      .m(m), .s(s), .cn_n(cn_n), .ir_clear(ir_clear));

  // index: 0 none, 1 pass, 2 add, 3 sub, 4 dec, 5 or, 6 inv, 7 shl, 8 cmp  -> {m, s, cn_n}
  logic [5:0] exp_tab [9] = '{6'b0_0000_1, 6'b1_1010_1, 6'b0_1001_1, 6'b0_0110_0,
                              6'b0_1111_1, 6'b1_1110_1, 6'b1_0101_1, 6'b0_1100_1,
                              6'b0_0110_1};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 9; k++) begin
      logic [7:0] oh;
      oh = (k == 0) ? 8'h00 : 8'(1 << (k - 1));
      {cmp, shl, inv, lor, dec, sub, add, pass} = oh;
      for (int rr = 0; rr < 4; rr++) begin
        {ir_reset, sys_reset} = 2'(rr);
        #1;
        checks += 2;
        if ({m, s, cn_n} !== exp_tab[k]) begin
          failures++;
          $display("FAIL op %0d: m=%b s=%b cn_n=%b", k, m, s, cn_n);
        end
        if (ir_clear !== (ir_reset | sys_reset)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
