// tb_p8_cpu: the whole P8 CPU running a program from a 256-byte memory, with
// 256 input and output ports, at its default (and only) configuration.
//
// The program exercises every instruction type in every addressing mode it
// has, both outcomes of each conditional jump in both of its modes, and ends
// with a loop that multiplies 7 by 5 by repeated addition and writes the
// product to output port 10h; it stops in a jump-to-self.
//
// An instruction-level reference model of the P8 instruction set, written
// independently of the RTL, runs alongside.  At the first clock of every FETCH
// (IR = 00h, MIP = 0) the CPU's A, R, Z and IP must equal the model's, and the
// number of clocks the previous instruction took must equal its clock count
// in the instruction-set reference (3 for FETCH plus the execute words).  At
// the end the memory and the output-port log must match the model's.  Each
// mechanism (every operation and mode, taken and untaken conditional jumps in
// both modes, memory and port reads and writes, Z set and cleared) is
// counted; one that never happened is a failure.
module tb_p8_cpu;
  logic clk = 0, rst_n;
  logic [7:0] addr_o, data_i, data_o, r_monitor;
  logic addr_oe, data_oe, memr, memw, ior, iow;
  int checks = 0, failures = 0, cycles = 0;

  p8_cpu dut (.clk(clk), .rst_n(rst_n), .addr_o(addr_o), .addr_oe(addr_oe), .data_i(data_i),
              .data_o(data_o), .data_oe(data_oe), .memr(memr), .memw(memw), .ior(ior),
              .iow(iow), .r_monitor(r_monitor));

  always #5 clk = ~clk;

  // ---------------- memory and ports ----------------
  logic [7:0] mem [256];
  logic [7:0] out_val [256];
  int         out_cnt [256];
  int n_memr = 0, n_memw = 0, n_ior = 0, n_iow = 0;

  function automatic logic [7:0] in_port(input logic [7:0] p);
    return p * 8'd3 + 8'd1;
  endfunction

  always_comb begin
    data_i = 8'h00;
    if (memr) data_i = mem[addr_o];
    else if (ior) data_i = in_port(addr_o);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if ((memr || ior) && dut.u_ctl.stb.dri_load) begin
        checks++;
        if (!addr_oe) begin failures++; $display("FAIL read with AR disabled"); end
        if (memr) n_memr++; else n_ior++;
      end
      if (memw) begin
        checks++;
        if (!(addr_oe && data_oe)) begin failures++; $display("FAIL write with bus disabled"); end
        mem[addr_o] <= data_o;
        n_memw++;
      end
      if (iow) begin
        checks++;
        if (!(addr_oe && data_oe)) begin failures++; $display("FAIL port write with bus disabled"); end
        out_val[addr_o] <= data_o;
        out_cnt[addr_o] <= out_cnt[addr_o] + 1;
        n_iow++;
      end
    end
  end

  // ---------------- program assembly ----------------
  localparam logic [4:0] IN = 5'h01, OUT = 5'h02, JMP = 5'h04, JNZ = 5'h05, JZ = 5'h06,
                         CMP = 5'h07, LDA = 5'h08, LDR = 5'h09, STA = 5'h0A, STR = 5'h0B,
                         ADD = 5'h0C, SUB = 5'h0D, DEC = 5'h0E, ORR = 5'h10, INV = 5'h11,
                         SHL = 5'h12;
  localparam logic [2:0] D = 3'b000, RA = 3'b010, RR = 3'b011, M = 3'b100, I = 3'b110;
  logic [7:0] img [256];
  int pc;
  task automatic e1(input logic [4:0] op, input logic [2:0] md);
    img[pc] = {op, md}; pc++;
  endtask
  task automatic e2(input logic [4:0] op, input logic [2:0] md, input logic [7:0] b);
    img[pc] = {op, md}; img[pc+1] = b; pc += 2;
  endtask

  int end_addr;
  task automatic assemble();
    int f1, f2, f3, f4, f5, f6, loop;
    for (int i = 0; i < 256; i++) img[i] = 8'hA5 ^ 8'(i);
    pc = 0;
    // loads and stores
    e2(LDA, I, 8'h13); e2(STA, D, 8'hC0); e2(LDA, I, 8'h11); e2(STA, D, 8'hC1);
    e2(LDA, D, 8'hC0); e2(SUB, D, 8'hC1);                 // 13h - 11h = 02h
    e2(LDR, I, 8'hC2); e1(STA, M); e2(STR, D, 8'hC3); e1(STR, M);
    e2(LDR, I, 8'hC0); e1(LDA, M);
    // add, compare, subtract
    e1(ADD, RA); e1(ADD, RR); e1(ADD, M); e2(ADD, I, 8'h07); e2(ADD, D, 8'hC1);
    e2(CMP, I, 8'h11); e1(CMP, RA); e1(CMP, RR); e1(CMP, M); e2(CMP, D, 8'hC1);
    e1(SUB, RA); e1(SUB, RR); e1(SUB, M); e2(SUB, I, 8'h0D);
    // decrement
    e1(DEC, RA); e1(DEC, RR); e1(DEC, M); e2(DEC, I, 8'h05); e2(DEC, D, 8'hC0);
    // logic
    e2(ORR, I, 8'h40); e1(ORR, RA); e1(ORR, RR); e1(ORR, M); e2(ORR, D, 8'hC1);
    e1(INV, RA); e1(INV, RR); e1(INV, M); e2(INV, I, 8'h0F); e2(INV, D, 8'hC0);
    e2(LDR, I, 8'hC0); e1(SHL, RA); e1(SHL, RR); e2(LDR, I, 8'hC1);
    e1(SHL, M); e2(SHL, I, 8'h81); e2(SHL, D, 8'hC0);
    // register moves
    e1(LDA, RA); e1(LDA, RR); e1(LDR, RA); e1(LDR, RR); e1(LDR, M); e2(LDR, D, 8'hC0);
    // ports
    e2(LDA, I, 8'h3C); e2(OUT, D, 8'h05); e2(LDR, I, 8'h07); e1(OUT, M);
    e2(IN, D, 8'h02); e1(IN, M);
    // conditional jumps, direct
    e2(LDA, I, 8'h00); e2(CMP, I, 8'h00);                 // Z = 1
    e2(JNZ, D, 8'hFC);                                    // not taken
    e2(JZ, D, 8'h00); f1 = pc - 1;                        // taken
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);                 // skipped
    img[f1] = 8'(pc);
    e2(CMP, I, 8'h01);                                    // Z = 0
    e2(JZ, D, 8'hFC);                                     // not taken
    e2(JNZ, D, 8'h00); f2 = pc - 1;                       // taken
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);
    img[f2] = 8'(pc);
    // conditional jumps, register
    e2(LDR, I, 8'h00); f3 = pc - 1; e1(JNZ, RR);          // Z = 0: taken
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);
    img[f3] = 8'(pc);
    e2(LDR, I, 8'hFC); e1(JZ, RR);                        // Z = 0: not taken
    e1(CMP, RA);                                          // Z = 1
    e2(LDR, I, 8'h00); f4 = pc - 1; e1(JZ, RR);           // taken
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);
    img[f4] = 8'(pc);
    e1(JNZ, RR);                                          // Z = 1: not taken
    // unconditional jumps
    e2(LDR, I, 8'h00); f5 = pc - 1; e1(JMP, RR);
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);
    img[f5] = 8'(pc);
    e2(JMP, D, 8'h00); f6 = pc - 1;
    e2(LDA, I, 8'hEE); e2(OUT, D, 8'hFE);
    img[f6] = 8'(pc);
    // workload: 7 x 5 by repeated addition
    e2(LDA, I, 8'h00); e2(STA, D, 8'hD0); e2(LDA, I, 8'h05); e2(STA, D, 8'hD1);
    loop = pc;
    e2(LDA, D, 8'hD0); e2(ADD, I, 8'h07); e2(STA, D, 8'hD0);
    e2(LDA, D, 8'hD1); e1(DEC, RA); e2(STA, D, 8'hD1);
    e2(CMP, I, 8'h00); e2(JNZ, D, 8'(loop));
    e2(LDA, D, 8'hD0); e2(OUT, D, 8'h10);
    end_addr = pc;
    e2(JMP, D, 8'(end_addr));
    if (pc > 8'hBF) $fatal(1, "program too long");
  endtask

  // ---------------- reference model ----------------
  logic [7:0] m_a, m_r, m_ip, m_mem [256], m_out_val [256];
  logic       m_z;
  int         m_out_cnt [256];
  int         expect_cycles;
  int         n_op [32], n_mode [8], n_jnz_t, n_jnz_n, n_jz_t, n_jz_n, n_jr_t, n_jr_n, n_zset, n_zclr;

  // clock counts of the instruction-set reference
  function automatic int ref_cycles(input logic [7:0] opc, input logic z);
    logic [4:0] op;
    logic [2:0] md;
    op = opc[7:3]; md = opc[2:0];
    case (op)
      IN, OUT, STA, STR: return (md == D) ? 9 : 7;
      JMP: return (md == D) ? 6 : 4;
      JNZ: return (md == D && !z) ? 6 : 4;
      JZ:  return (md == D && z) ? 6 : 4;
      DEC, SHL: case (md) D: return 11; RA: return 4; RR: return 7; M: return 9; default: return 8; endcase
      INV: case (md) D: return 9; RA: return 4; RR: return 5; M: return 7; default: return 6; endcase
      default: case (md) D: return 9; RA, RR: return 4; M: return 7; default: return 6; endcase
    endcase
  endfunction

  task automatic model_step();
    logic [7:0] opc, b2, v, res;
    logic [4:0] op;
    logic [2:0] md;
    int len;
    opc = m_mem[m_ip]; b2 = m_mem[8'(m_ip + 1)];
    op = opc[7:3]; md = opc[2:0];
    len = (md == D || md == I) ? 2 : 1;
    v = (md == D) ? m_mem[b2] : (md == RA) ? m_a : (md == RR) ? m_r : (md == M) ? m_mem[m_r] : b2;
    expect_cycles = ref_cycles(opc, m_z);
    n_op[op]++; n_mode[md]++;
    m_ip = 8'(m_ip + len);
    case (op)
      IN:  m_a = in_port((md == D) ? b2 : m_r);
      OUT: begin
        m_out_val[(md == D) ? b2 : m_r] = m_a;
        m_out_cnt[(md == D) ? b2 : m_r]++;
      end
      JMP: m_ip = (md == D) ? b2 : m_r;
      JNZ: begin
        if (!m_z) m_ip = (md == D) ? b2 : m_r;
        if (md == D) begin if (!m_z) n_jnz_t++; else n_jnz_n++; end
        else begin if (!m_z) n_jr_t++; else n_jr_n++; end
      end
      JZ: begin
        if (m_z) m_ip = (md == D) ? b2 : m_r;
        if (md == D) begin if (m_z) n_jz_t++; else n_jz_n++; end
        else begin if (m_z) n_jr_t++; else n_jr_n++; end
      end
      CMP: begin m_z = (m_a == v); if (m_z) n_zset++; else n_zclr++; end
      LDA: m_a = v;
      LDR: m_r = v;
      STA: m_mem[(md == D) ? b2 : m_r] = m_a;
      STR: m_mem[(md == D) ? b2 : m_r] = m_r;
      ADD: m_a = m_a + v;
      SUB: m_a = m_a - v;
      ORR: m_a = m_a | v;
      DEC, INV, SHL: begin
        res = (op == DEC) ? v - 8'd1 : (op == INV) ? ~v : {v[6:0], 1'b0};
        m_a = res;
        if (md == RR) m_r = res;   // register form writes the result back to R too
      end
      default: $display("model: undefined opcode %h", opc);
    endcase
  endtask

  // ---------------- run ----------------
  int  last_start = -1, n_instr = 0;
  bit  started = 0, done = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    assemble();
    for (int i = 0; i < 256; i++) begin
      mem[i] = img[i]; m_mem[i] = img[i];
      out_val[i] = 0; out_cnt[i] = 0; m_out_val[i] = 0; m_out_cnt[i] = 0;
    end
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_mode[i]) n_mode[i] = 0;
    {n_jnz_t, n_jnz_n, n_jz_t, n_jz_n, n_jr_t, n_jr_n, n_zset, n_zclr} = '0;
    m_a = 0; m_r = 0; m_z = 0; m_ip = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n && !done) begin
      cycles++;
      if (dut.u_ctl.mip == 3'd0 && dut.ir == 8'h00 && !dut.u_rst.rst) begin
        // first clock of FETCH
        if (started) begin
          checks++;
          if (cycles - last_start != expect_cycles) begin
            failures++;
            $display("FAIL cycles: instruction at %h took %0d, expected %0d",
                     dut.u_dp.ip, cycles - last_start, expect_cycles);
          end
        end
        checks++;
        if (dut.u_dp.a !== m_a || dut.u_dp.r !== m_r || dut.z !== m_z || dut.u_dp.ip !== m_ip) begin
          failures++;
          $display("FAIL state before %h: A=%h/%h R=%h/%h Z=%b/%b IP=%h/%h", m_ip,
                   dut.u_dp.a, m_a, dut.u_dp.r, m_r, dut.z, m_z, dut.u_dp.ip, m_ip);
        end
        checks++;
        if (r_monitor !== dut.u_dp.r) failures++;
        if (int'(m_ip) == end_addr && started) begin
          done = 1;
          finish_run();
        end else begin
          model_step();
          n_instr++;
          started = 1;
          last_start = cycles;
        end
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  task automatic finish_run();
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL memory %h = %h, expected %h", i, mem[i], m_mem[i]);
      end
      checks++;
      if (out_cnt[i] != m_out_cnt[i] || (out_cnt[i] != 0 && out_val[i] !== m_out_val[i])) begin
        failures++;
        $display("FAIL port %h: %0d writes of %h, expected %0d of %h", i, out_cnt[i],
                 out_val[i], m_out_cnt[i], m_out_val[i]);
      end
    end
    checks++;
    if (out_val[8'h10] !== 8'd35 || out_cnt[8'hFE] != 0) begin
      failures++;
      $display("FAIL workload: port 10h = %0d", out_val[8'h10]);
    end
    foreach (n_op[k])
      if (k inside {IN, OUT, JMP, JNZ, JZ, CMP, LDA, LDR, STA, STR, ADD, SUB, DEC, ORR, INV, SHL})
        need(n_op[k], $sformatf("operation %0d", k));
    need(n_mode[D], "direct mode");   need(n_mode[RA], "register A mode");
    need(n_mode[RR], "register R mode"); need(n_mode[M], "indirect mode");
    need(n_mode[I], "immediate mode");
    need(n_jnz_t, "JNZ taken"); need(n_jnz_n, "JNZ not taken");
    need(n_jz_t, "JZ taken");   need(n_jz_n, "JZ not taken");
    need(n_jr_t, "register jump taken"); need(n_jr_n, "register jump not taken");
    need(n_zset, "Z set"); need(n_zclr, "Z cleared");
    need(n_memr, "memory read"); need(n_memw, "memory write");
    need(n_ior, "port read");    need(n_iow, "port write");
    $display("program %0d bytes, instructions %0d, clocks %0d, memory reads %0d writes %0d, port reads %0d writes %0d",
             end_addr + 2, n_instr, cycles, n_memr, n_memw, n_ior, n_iow);
    $display("JNZ taken/not %0d/%0d, JZ taken/not %0d/%0d, register jumps taken/not %0d/%0d",
             n_jnz_t, n_jnz_n, n_jz_t, n_jz_n, n_jr_t, n_jr_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
