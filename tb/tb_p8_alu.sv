// tb_p8_alu: the 8-bit ALU (two cascaded 74181 slices) in the eight settings
// the P8 uses, with random operands, plus the A=B flag of the compare setting.
// Expected values are plain 8-bit arithmetic and logic on the operands.
module tb_p8_alu;
  logic [7:0] a, b, f;
  logic [3:0] s;
  logic       m, cn_n, cn8_n, aeqb;
  int checks = 0, failures = 0;

  p8_alu dut (.a(a), .b(b), .s(s), .m(m), .cn_n(cn_n), .f(f), .cn8_n(cn8_n), .aeqb(aeqb));

  typedef struct { string name; logic [3:0] s; logic m; logic cn_n; } set_t;
  set_t sets [8] = '{
    '{"pass", 4'b1010, 1'b1, 1'b1}, '{"add", 4'b1001, 1'b0, 1'b1},
    '{"sub",  4'b0110, 1'b0, 1'b0}, '{"dec", 4'b1111, 1'b0, 1'b1},
    '{"or",   4'b1110, 1'b1, 1'b1}, '{"inv", 4'b0101, 1'b1, 1'b1},
    '{"shl",  4'b1100, 1'b0, 1'b1}, '{"cmp", 4'b0110, 1'b0, 1'b1}};

  function automatic logic [7:0] expect_f(input int k, input logic [7:0] a_, b_);
    case (k)
      0: return b_;
      1: return a_ + b_;
      2: return a_ - b_;
      3: return a_ - 8'd1;
      4: return a_ | b_;
      5: return ~b_;
      6: return {a_[6:0], 1'b0};
      default: return a_ - b_ - 8'd1;
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int k;
      k = n % 8;
      a = 8'($urandom);
      b = (n % 5 == 0) ? a : 8'($urandom);
      s = sets[k].s; m = sets[k].m; cn_n = sets[k].cn_n;
      #1;
      checks++;
      if (f !== expect_f(k, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h f=%h exp=%h", sets[k].name, a, b, f, expect_f(k, a, b));
      end
      if (k == 7) begin
        checks++;
        if (aeqb !== (a == b)) begin
          failures++;
          if (failures < 10) $display("FAIL cmp flag a=%h b=%h aeqb=%b", a, b, aeqb);
        end
      end
      if (k == 1) begin
        checks++;
        if (cn8_n !== !((9'(a) + 9'(b)) > 9'd255)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
