// tb_p8_isa_examples: the worked example of every P8 instruction, run on the
// whole CPU at its default configuration.
//
// Each example gives a starting state (A, R, Z, the byte at memory or port
// address 10h, IP = 00h), one instruction, and the state it must leave (A, R,
// Z, IP, and the byte written to memory or port 10h).  For each example the
// CPU is reset, runs a short set-up routine at E0h (LDA #a; LDR #r; CMP to set
// or clear Z; JMP 00h), then executes the instruction under test from 00h.  At
// the next instruction boundary (IR = 00h, MIP = 0) the state is compared with
// the expected one, and the clocks the instruction took with its clock count
// (3 FETCH clocks plus its execute words).  FETCH itself is checked on its own:
// with 54h at address 06h, three clocks from IP = 06h must leave IR = 54h and
// IP = 07h.  Beside the printed examples, which all take conditional jumps,
// the untaken case of each conditional jump and a compare that clears Z are
// added.
//
// Two examples are taken from the operation they illustrate rather than from
// the numbers printed with them: LDR A copies A to R (R = A = 06h), and JMP 10h
// jumps to 10h.
module tb_p8_isa_examples;
  logic clk = 0, rst_n;
  logic [7:0] addr_o, data_i, data_o, r_monitor;
  logic addr_oe, data_oe, memr, memw, ior, iow;
  int checks = 0, failures = 0;

  p8_cpu dut (.clk(clk), .rst_n(rst_n), .addr_o(addr_o), .addr_oe(addr_oe), .data_i(data_i),
              .data_o(data_o), .data_oe(data_oe), .memr(memr), .memw(memw), .ior(ior),
              .iow(iow), .r_monitor(r_monitor));

  always #5 clk = ~clk;

  logic [7:0] mem [256];
  logic [7:0] port_in10, port_out [256];
  int         port_writes;

  always_comb begin
    data_i = 8'h00;
    if (memr) data_i = mem[addr_o];
    else if (ior) data_i = (addr_o == 8'h10) ? port_in10 : 8'h00;
  end
  // strobes are ignored while reset is applied (they are cleared by it)
  always @(posedge clk) begin
    if (rst_n && memw) mem[addr_o] <= data_o;
    if (rst_n && iow) begin port_out[addr_o] <= data_o; port_writes <= port_writes + 1; end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string      name;
    logic [7:0] op, b2;
    logic [7:0] a, r;      // starting A and R
    logic       z;         // starting Z
    logic [7:0] m10;       // memory / input port 10h
    logic [7:0] ea, er;    // expected A and R
    logic       ez;        // expected Z
    logic [7:0] eip;       // expected IP
    int         wr;        // 0 none, 1 memory 10h, 2 port 10h
    logic [7:0] ewr;       // value written
    int         clocks;
  } ex_t;

  localparam int N = 56;
  ex_t ex [N] = '{
    '{"ADD 10h",   8'h60, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h0A, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"ADD A",     8'h62, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h0C, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"ADD R",     8'h63, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h0A, 8'h04, 0, 8'h01, 0, 8'h00, 4},
    '{"ADD M",     8'h64, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h0A, 8'h10, 0, 8'h01, 0, 8'h00, 7},
    '{"ADD #10h",  8'h66, 8'h10, 8'h06, 8'h00, 0, 8'h00, 8'h16, 8'h00, 0, 8'h02, 0, 8'h00, 6},
    '{"CMP 10h",   8'h38, 8'h10, 8'h06, 8'h00, 0, 8'h06, 8'h06, 8'h00, 1, 8'h02, 0, 8'h00, 9},
    '{"CMP A",     8'h3A, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h06, 8'h00, 1, 8'h01, 0, 8'h00, 4},
    '{"CMP R",     8'h3B, 8'h00, 8'h06, 8'h06, 0, 8'h00, 8'h06, 8'h06, 1, 8'h01, 0, 8'h00, 4},
    '{"CMP M",     8'h3C, 8'h00, 8'h06, 8'h10, 0, 8'h06, 8'h06, 8'h10, 1, 8'h01, 0, 8'h00, 7},
    '{"CMP #06h",  8'h3E, 8'h06, 8'h06, 8'h00, 0, 8'h00, 8'h06, 8'h00, 1, 8'h02, 0, 8'h00, 6},
    '{"CMP #07h",  8'h3E, 8'h07, 8'h06, 8'h00, 1, 8'h00, 8'h06, 8'h00, 0, 8'h02, 0, 8'h00, 6},
    '{"DEC 10h",   8'h70, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h03, 8'h00, 0, 8'h02, 0, 8'h00, 11},
    '{"DEC A",     8'h72, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h05, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"DEC R",     8'h73, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h03, 8'h03, 0, 8'h01, 0, 8'h00, 7},
    '{"DEC M",     8'h74, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h03, 8'h10, 0, 8'h01, 0, 8'h00, 9},
    '{"DEC #10h",  8'h76, 8'h10, 8'h06, 8'h00, 0, 8'h00, 8'h0F, 8'h00, 0, 8'h02, 0, 8'h00, 8},
    '{"IN 10h",    8'h08, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h04, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"IN P",      8'h0C, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h04, 8'h10, 0, 8'h01, 0, 8'h00, 7},
    '{"INV 10h",   8'h88, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'hFB, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"INV A",     8'h8A, 8'h00, 8'h04, 8'h00, 0, 8'h00, 8'hFB, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"INV R",     8'h8B, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'hFB, 8'hFB, 0, 8'h01, 0, 8'h00, 5},
    '{"INV M",     8'h8C, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'hFB, 8'h10, 0, 8'h01, 0, 8'h00, 7},
    '{"INV #04h",  8'h8E, 8'h04, 8'h06, 8'h00, 0, 8'h00, 8'hFB, 8'h00, 0, 8'h02, 0, 8'h00, 6},
    '{"JMP 10h",   8'h20, 8'h10, 8'h00, 8'h00, 0, 8'h04, 8'h00, 8'h00, 0, 8'h10, 0, 8'h00, 6},
    '{"JMP R",     8'h23, 8'h00, 8'h00, 8'h10, 0, 8'h00, 8'h00, 8'h10, 0, 8'h10, 0, 8'h00, 4},
    '{"JNZ 10h",   8'h28, 8'h10, 8'h00, 8'h00, 0, 8'h00, 8'h00, 8'h00, 0, 8'h10, 0, 8'h00, 6},
    '{"JNZ 10h/Z", 8'h28, 8'h10, 8'h00, 8'h00, 1, 8'h00, 8'h00, 8'h00, 1, 8'h02, 0, 8'h00, 4},
    '{"JNZ R",     8'h2B, 8'h00, 8'h00, 8'h10, 0, 8'h00, 8'h00, 8'h10, 0, 8'h10, 0, 8'h00, 4},
    '{"JNZ R/Z",   8'h2B, 8'h00, 8'h00, 8'h10, 1, 8'h00, 8'h00, 8'h10, 1, 8'h01, 0, 8'h00, 4},
    '{"JZ 10h",    8'h30, 8'h10, 8'h00, 8'h00, 1, 8'h00, 8'h00, 8'h00, 1, 8'h10, 0, 8'h00, 6},
    '{"JZ 10h/NZ", 8'h30, 8'h10, 8'h00, 8'h00, 0, 8'h00, 8'h00, 8'h00, 0, 8'h02, 0, 8'h00, 4},
    '{"JZ R",      8'h33, 8'h00, 8'h00, 8'h10, 1, 8'h00, 8'h00, 8'h10, 1, 8'h10, 0, 8'h00, 4},
    '{"JZ R/NZ",   8'h33, 8'h00, 8'h00, 8'h10, 0, 8'h00, 8'h00, 8'h10, 0, 8'h01, 0, 8'h00, 4},
    '{"LDA 10h",   8'h40, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h04, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"LDA A",     8'h42, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h06, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"LDA R",     8'h43, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h04, 8'h04, 0, 8'h01, 0, 8'h00, 4},
    '{"LDA M",     8'h44, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h04, 8'h10, 0, 8'h01, 0, 8'h00, 7},
    '{"LDA #10h",  8'h46, 8'h10, 8'h06, 8'h00, 0, 8'h00, 8'h10, 8'h00, 0, 8'h02, 0, 8'h00, 6},
    '{"LDR 10h",   8'h48, 8'h10, 8'h00, 8'h06, 0, 8'h04, 8'h00, 8'h04, 0, 8'h02, 0, 8'h00, 9},
    '{"LDR A",     8'h4A, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h06, 8'h06, 0, 8'h01, 0, 8'h00, 4},
    '{"LDR R",     8'h4B, 8'h00, 8'h00, 8'h06, 0, 8'h00, 8'h00, 8'h06, 0, 8'h01, 0, 8'h00, 4},
    '{"LDR M",     8'h4C, 8'h00, 8'h00, 8'h10, 0, 8'h04, 8'h00, 8'h04, 0, 8'h01, 0, 8'h00, 7},
    '{"LDR #10h",  8'h4E, 8'h10, 8'h00, 8'h06, 0, 8'h00, 8'h00, 8'h10, 0, 8'h02, 0, 8'h00, 6},
    '{"OR 10h",    8'h80, 8'h10, 8'h06, 8'h00, 0, 8'h40, 8'h46, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"OR A",      8'h82, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h06, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"OR R",      8'h83, 8'h00, 8'h06, 8'h40, 0, 8'h00, 8'h46, 8'h40, 0, 8'h01, 0, 8'h00, 4},
    '{"OR M",      8'h84, 8'h00, 8'h06, 8'h10, 0, 8'h40, 8'h46, 8'h10, 0, 8'h01, 0, 8'h00, 7},
    '{"OR #10h",   8'h86, 8'h10, 8'h06, 8'h00, 0, 8'h00, 8'h16, 8'h00, 0, 8'h02, 0, 8'h00, 6},
    '{"OUT 10h",   8'h10, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h06, 8'h00, 0, 8'h02, 2, 8'h06, 9},
    '{"OUT P",     8'h14, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h06, 8'h10, 0, 8'h01, 2, 8'h06, 7},
    '{"SHL 10h",   8'h90, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h08, 8'h00, 0, 8'h02, 0, 8'h00, 11},
    '{"SHL A",     8'h92, 8'h00, 8'h04, 8'h00, 0, 8'h00, 8'h08, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"SHL R",     8'h93, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h08, 8'h08, 0, 8'h01, 0, 8'h00, 7},
    '{"SHL M",     8'h94, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h08, 8'h10, 0, 8'h01, 0, 8'h00, 9},
    '{"SHL #04h",  8'h96, 8'h04, 8'h06, 8'h00, 0, 8'h00, 8'h08, 8'h00, 0, 8'h02, 0, 8'h00, 8},
    '{"STA 10h",   8'h50, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h06, 8'h00, 0, 8'h02, 1, 8'h06, 9}
  };
  ex_t ex2 [7] = '{
    '{"STA M",     8'h54, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h06, 8'h10, 0, 8'h01, 1, 8'h06, 7},
    '{"STR 10h",   8'h58, 8'h10, 8'h00, 8'h06, 0, 8'h04, 8'h00, 8'h06, 0, 8'h02, 1, 8'h06, 9},
    '{"STR M",     8'h5C, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h06, 8'h10, 0, 8'h01, 1, 8'h10, 7},
    '{"SUB 10h",   8'h68, 8'h10, 8'h06, 8'h00, 0, 8'h04, 8'h02, 8'h00, 0, 8'h02, 0, 8'h00, 9},
    '{"SUB A",     8'h6A, 8'h00, 8'h06, 8'h00, 0, 8'h00, 8'h00, 8'h00, 0, 8'h01, 0, 8'h00, 4},
    '{"SUB R",     8'h6B, 8'h00, 8'h06, 8'h04, 0, 8'h00, 8'h02, 8'h04, 0, 8'h01, 0, 8'h00, 4},
    '{"SUB M",     8'h6C, 8'h00, 8'h06, 8'h10, 0, 8'h04, 8'h02, 8'h10, 0, 8'h01, 0, 8'h00, 7}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit at_boundary();
    return dut.ir == 8'h00 && dut.u_ctl.mip == 3'd0;
  endfunction

  // reset, run the set-up routine, and stop at the boundary before address `start`
  task automatic setup(input ex_t e, input logic [7:0] start);
    int guard;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'h00; port_out[i] = 8'h00; end
    port_writes = 0;
    mem[8'h00] = 8'h20; mem[8'h01] = 8'hE0;                     // JMP E0h
    mem[8'hE0] = 8'h46; mem[8'hE1] = e.a;                       // LDA #a
    mem[8'hE2] = 8'h4E; mem[8'hE3] = e.r;                       // LDR #r
    mem[8'hE4] = 8'h3E; mem[8'hE5] = e.z ? e.a : ~e.a;          // CMP: Z = z
    mem[8'hE6] = 8'h20; mem[8'hE7] = start;                     // JMP start
    mem[8'h10] = e.m10; port_in10 = e.m10;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    guard = 0;
    do begin @(posedge clk); #1; guard++; end while (!(at_boundary() && dut.u_dp.ip == 8'hE0) && guard < 100);
    // the routine is running from E0h: now place the instruction under test
    mem[8'h00] = e.op; mem[8'h01] = e.b2;
    guard = 0;
    do begin @(posedge clk); #1; guard++; end while (!(at_boundary() && dut.u_dp.ip == start) && guard < 100);
    check(dut.u_dp.a == e.a && dut.u_dp.r == e.r && dut.z == e.z,
          $sformatf("%s: starting state A=%h R=%h Z=%b", e.name, dut.u_dp.a, dut.u_dp.r, dut.z));
  endtask

  task automatic run(input ex_t e);
    int n;
    setup(e, 8'h00);
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!at_boundary() && n < 20);
    check(n == e.clocks, $sformatf("%s: %0d clocks, expected %0d", e.name, n, e.clocks));
    check(dut.u_dp.a == e.ea, $sformatf("%s: A=%h, expected %h", e.name, dut.u_dp.a, e.ea));
    check(dut.u_dp.r == e.er && r_monitor == e.er, $sformatf("%s: R=%h, expected %h", e.name, dut.u_dp.r, e.er));
    check(dut.z == e.ez, $sformatf("%s: Z=%b, expected %b", e.name, dut.z, e.ez));
    check(dut.u_dp.ip == e.eip, $sformatf("%s: IP=%h, expected %h", e.name, dut.u_dp.ip, e.eip));
    case (e.wr)
      1: check(mem[8'h10] == e.ewr && port_writes == 0, $sformatf("%s: memory 10h=%h", e.name, mem[8'h10]));
      2: check(port_out[8'h10] == e.ewr && port_writes == 1 && mem[8'h10] == e.m10,
               $sformatf("%s: port 10h=%h, %0d port writes", e.name, port_out[8'h10], port_writes));
      default: check(mem[8'h10] == e.m10 && port_writes == 0, $sformatf("%s: unexpected write", e.name));
    endcase
  endtask

  initial begin
    ex_t f;
    for (int i = 0; i < N; i++) run(ex[i]);
    for (int i = 0; i < 7; i++) run(ex2[i]);
    // FETCH: address 06h holds 54h; from IP = 06h three clocks give IR = 54h, IP = 07h
    f = ex[0]; f.name = "FETCH";
    setup(f, 8'h06);
    mem[8'h06] = 8'h54;
    repeat (3) @(posedge clk);
    #1;
    check(dut.ir == 8'h54 && dut.u_dp.ip == 8'h07 && dut.u_ctl.mip == 3'd0,
          $sformatf("FETCH: IR=%h IP=%h", dut.ir, dut.u_dp.ip));
    $display("examples run: %0d", N + 7 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
