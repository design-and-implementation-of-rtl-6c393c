// tb_p8_control_store: the microprogram against the numbers of the P8 design.
//
// 1. The four microwords of "jump if not zero" (opcode 28h) listed bit by bit
//    in the design are compared word for word (Z = 0: three words; Z = 1:
//    one word).
// 2. FETCH (opcode 00h) must take three words and end with IR load.
// 3. For every instruction, the number of microwords up to and including the
//    one with IR reset (C0) must equal its clock count less the three clocks
//    of FETCH, as tabulated in the instruction-set reference; for the
//    conditional jumps both values of A3 are checked.
// 4. In every word of every instruction at most one source drives the
//    internal bus and at most one drives the address bus.
module tb_p8_control_store;
  import p8_pkg::*;
  logic [11:0] addr, addr_b;
  logic [31:0] data, data_b;
  int checks = 0, failures = 0;

  p8_control_store dut (.addr(addr), .data(data), .addr_b(addr_b), .data_b(data_b));

  function automatic logic [11:0] csa(input logic [7:0] op, input logic a3, input int mip);
    return {op, a3, 3'(mip)};
  endfunction

  // {opcode, clock cycles with A3 = 0, clock cycles with A3 = 1 (0: same)}
  typedef struct { logic [7:0] op; int cyc0; int cyc1; } ent_t;
  ent_t tab [] = '{
    '{8'h08, 9, 0}, '{8'h0C, 7, 0}, '{8'h10, 9, 0}, '{8'h14, 7, 0},
    '{8'h20, 6, 0}, '{8'h23, 4, 0}, '{8'h28, 6, 4}, '{8'h2B, 4, 4},
    '{8'h30, 4, 6}, '{8'h33, 4, 4},
    '{8'h38, 9, 0}, '{8'h3A, 4, 0}, '{8'h3B, 4, 0}, '{8'h3C, 7, 0}, '{8'h3E, 6, 0},
    '{8'h40, 9, 0}, '{8'h42, 4, 0}, '{8'h43, 4, 0}, '{8'h44, 7, 0}, '{8'h46, 6, 0},
    '{8'h48, 9, 0}, '{8'h4A, 4, 0}, '{8'h4B, 4, 0}, '{8'h4C, 7, 0}, '{8'h4E, 6, 0},
    '{8'h50, 9, 0}, '{8'h54, 7, 0}, '{8'h58, 9, 0}, '{8'h5C, 7, 0},
    '{8'h60, 9, 0}, '{8'h62, 4, 0}, '{8'h63, 4, 0}, '{8'h64, 7, 0}, '{8'h66, 6, 0},
    '{8'h68, 9, 0}, '{8'h6A, 4, 0}, '{8'h6B, 4, 0}, '{8'h6C, 7, 0}, '{8'h6E, 6, 0},
    '{8'h70, 11, 0}, '{8'h72, 4, 0}, '{8'h73, 7, 0}, '{8'h74, 9, 0}, '{8'h76, 8, 0},
    '{8'h80, 9, 0}, '{8'h82, 4, 0}, '{8'h83, 4, 0}, '{8'h84, 7, 0}, '{8'h86, 6, 0},
    '{8'h88, 9, 0}, '{8'h8A, 4, 0}, '{8'h8B, 5, 0}, '{8'h8C, 7, 0}, '{8'h8E, 6, 0},
    '{8'h90, 11, 0}, '{8'h92, 4, 0}, '{8'h93, 7, 0}, '{8'h94, 9, 0}, '{8'h96, 8, 0}};

  task automatic expect_word(input logic [11:0] a, input logic [31:0] w);
    addr = a; #1;
    checks++;
    if (data !== w) begin
      failures++;
      $display("FAIL word %h = %h, expected %h", a, data, w);
    end
  endtask

  // count words until IR reset; also check the bus rules on each word
  task automatic count_words(input logic [7:0] op, input logic a3, output int n);
    n = 0;
    for (int i = 0; i < 8; i++) begin
      p8_cw_t cw;
      addr = csa(op, a3, i); #1;
      cw = p8_cw_t'(data);
      n++;
      checks++;
      if (!$onehot0({~cw.drin_out_n, ~cw.a_out_n, ~cw.r_out_n}) ||
          !$onehot0({~cw.ip_out_n, ~cw.or_out_n})) begin
        failures++;
        $display("FAIL bus contention at %h", addr);
      end
      if (cw.ir_reset) break;
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    addr_b = '0;
    // words of opcode 28h as printed in the design
    expect_word(12'h280, 32'h0940_2564);
    expect_word(12'h281, 32'h0940_65C4);
    expect_word(12'h282, 32'h0940_5511);
    expect_word(12'h288, 32'h0940_7551);
    // second read port sees the same ROM
    addr_b = 12'h281; #1;
    checks++; if (data_b !== 32'h0940_65C4) failures++;

    // FETCH
    for (int i = 0; i < 3; i++) begin
      p8_cw_t cw;
      addr = csa(8'h00, 1'b0, i); #1;
      cw = p8_cw_t'(data);
      checks++;
      if (cw.ir_reset || (cw.ir_load != (i == 2))) begin
        failures++;
        $display("FAIL fetch word %0d", i);
      end
    end
    addr = csa(8'h00, 1'b0, 0); #1;
    checks++; if (data[14] !== 1'b0 || data[5] !== 1'b1 || data[2] !== 1'b1) failures++; // AR <- IP, MEMR

    foreach (tab[k]) begin
      count_words(tab[k].op, 1'b0, n);
      checks++;
      if (n != tab[k].cyc0 - 3) begin
        failures++;
        $display("FAIL opcode %h (A3=0): %0d words, expected %0d", tab[k].op, n, tab[k].cyc0 - 3);
      end
      if (tab[k].cyc1 != 0) begin
        count_words(tab[k].op, 1'b1, n);
        checks++;
        if (n != tab[k].cyc1 - 3) begin
          failures++;
          $display("FAIL opcode %h (A3=1): %0d words, expected %0d", tab[k].op, n, tab[k].cyc1 - 3);
        end
        // C27 set in both sub-blocks of a conditional jump
        addr = csa(tab[k].op, 1'b1, 0); #1;
        checks++; if (!data[27]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
