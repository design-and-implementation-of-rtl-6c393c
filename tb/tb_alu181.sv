// tb_alu181: exhaustive test of one 74181 slice.
//
// Every combination of A, B, S, M and carry in (16384 in all) is applied and
// F, the carry out and A=B are compared with the function table of the 74181
// (active-high data), written out here case by case.
module tb_alu181;
  logic [3:0] a, b, s, f;
  logic       m, cn_n, cn4_n, aeqb;
  int checks = 0, failures = 0;

  alu181 dut (.a(a), .b(b), .s(s), .m(m), .cn_n(cn_n), .f(f), .cn4_n(cn4_n), .aeqb(aeqb));

  // logic functions, M = 1
  function automatic logic [3:0] logic_fn(input logic [3:0] s_, a_, b_);
    case (s_)
      4'h0: return ~a_;          4'h1: return ~(a_ | b_);
      4'h2: return ~a_ & b_;     4'h3: return 4'h0;
      4'h4: return ~(a_ & b_);   4'h5: return ~b_;
      4'h6: return a_ ^ b_;      4'h7: return a_ & ~b_;
      4'h8: return ~a_ | b_;     4'h9: return ~(a_ ^ b_);
      4'hA: return b_;           4'hB: return a_ & b_;
      4'hC: return 4'hF;         4'hD: return a_ | ~b_;
      4'hE: return a_ | b_;      default: return a_;
    endcase
  endfunction

  // arithmetic functions, M = 0, as a 5-bit value before adding the carry
  function automatic int arith_fn(input logic [3:0] s_, a_, b_);
    int A = a_, B = b_, NB = 4'(~b_), AO = a_ | b_, AON = a_ | 4'(~b_), ANB = a_ & 4'(~b_), AB = a_ & b_;
    case (s_)
      4'h0: return A;             4'h1: return AO;
      4'h2: return AON;           4'h3: return 15;          // minus 1
      4'h4: return A + ANB;       4'h5: return AO + ANB;
      4'h6: return A + NB;        4'h7: return ANB + 15;    // A minus B minus 1, AB' minus 1
      4'h8: return A + AB;        4'h9: return A + B;
      4'hA: return AON + AB;      4'hB: return AB + 15;
      4'hC: return A + A;         4'hD: return AO + A;
      4'hE: return AON + A;       default: return A + 15;   // A minus 1
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      logic [3:0] ef;
      logic       ec;
      {m, cn_n, s, a, b} = 14'(i);
      #1;
      if (m) begin
        ef = logic_fn(s, a, b);
        checks++;
        if (f !== ef) begin
          failures++;
          if (failures < 10) $display("FAIL logic s=%h a=%h b=%h f=%h exp=%h", s, a, b, f, ef);
        end
      end else begin
        int v;
        v = arith_fn(s, a, b) + (cn_n ? 0 : 1);
        ef = 4'(v);
        ec = (v > 15);
        checks += 2;
        if (f !== ef) begin
          failures++;
          if (failures < 10) $display("FAIL arith s=%h a=%h b=%h cn_n=%b f=%h exp=%h", s, a, b, cn_n, f, ef);
        end
        if (cn4_n !== ~ec) begin
          failures++;
          if (failures < 10) $display("FAIL carry s=%h a=%h b=%h cn_n=%b", s, a, b, cn_n);
        end
      end
      checks++;
      if (aeqb !== (ef == 4'hF)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
