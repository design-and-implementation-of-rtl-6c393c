// tb_p8_sub_walkthrough: the instruction cycle of SUB 1Ah followed clock by
// clock on the whole CPU at its default configuration.
//
// Starting state: IP = 07h, A = 13h, memory 07h = 68h (SUB direct), 08h = 1Ah,
// 1Ah = 11h.  A short prologue (LDA #13h; JMP 07h) sets that state up from
// reset.  The nine clocks of the instruction (three FETCH words, six execute
// words) must step the control store through addresses 000h, 001h, 002h,
// 680h ... 685h and back to 000h, and after each clock the registers must hold
// what that step puts in them: AR <- IP, DR <- 68h and IP -> 08h, IR <- 68h,
// AR <- IP, DR <- 1Ah and IP -> 09h, OR <- 1Ah, AR <- OR, DR <- 11h, and
// finally A <- 13h - 11h = 02h with IR cleared to 00h.  MEMR must be asserted
// exactly in the five words that read memory.
module tb_p8_sub_walkthrough;
  logic clk = 0, rst_n;
  logic [7:0] addr_o, data_i, data_o, r_monitor;
  logic addr_oe, data_oe, memr, memw, ior, iow;
  int checks = 0, failures = 0;
  logic [7:0] mem [256];

  p8_cpu dut (.clk(clk), .rst_n(rst_n), .addr_o(addr_o), .addr_oe(addr_oe), .data_i(data_i),
              .data_o(data_o), .data_oe(data_oe), .memr(memr), .memw(memw), .ior(ior),
              .iow(iow), .r_monitor(r_monitor));

  always #5 clk = ~clk;
  assign data_i = memr ? mem[addr_o] : 8'h00;
  always @(posedge clk) if (rst_n && memw) mem[addr_o] <= data_o;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [11:0] exp_cs [10] = '{12'h000, 12'h001, 12'h002, 12'h680, 12'h681, 12'h682,
                               12'h683, 12'h684, 12'h685, 12'h000};
  bit          exp_memr [9] = '{1, 1, 0, 1, 1, 0, 1, 1, 0};

  initial begin
    logic [11:0] cs;
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
    mem[8'h00] = 8'h46; mem[8'h01] = 8'h13;   // LDA #13h
    mem[8'h02] = 8'h20; mem[8'h03] = 8'h07;   // JMP 07h
    mem[8'h07] = 8'h68; mem[8'h08] = 8'h1A;   // SUB 1Ah
    mem[8'h09] = 8'h20; mem[8'h0A] = 8'h09;   // JMP 09h
    mem[8'h1A] = 8'h11;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // run the prologue until the SUB is about to be fetched
    while (!(dut.u_dp.ip == 8'h07 && dut.ir == 8'h00 && dut.u_ctl.mip == 3'd0)) @(posedge clk) #1;
    check(dut.u_dp.a == 8'h13, "A = 13h before SUB");
    for (int step = 0; step < 9; step++) begin
      cs = {dut.ir, dut.u_ctl.a3, dut.u_ctl.mip};
      check(cs == exp_cs[step], $sformatf("step %0d CS address %h, expected %h", step + 1, cs, exp_cs[step]));
      check(memr == exp_memr[step], $sformatf("step %0d MEMR %b", step + 1, memr));
      @(posedge clk) #1;
      case (step)
        0: check(dut.u_dp.ar == 8'h07 && addr_o == 8'h07, "step 1: AR <- IP (07h)");
        1: check(dut.u_dp.dr_in == 8'h68 && dut.u_dp.ip == 8'h08, "step 2: DR <- 68h, IP -> 08h");
        2: check(dut.ir == 8'h68, "step 3: IR <- 68h");
        3: check(dut.u_dp.ar == 8'h08, "step 4: AR <- IP (08h)");
        4: check(dut.u_dp.dr_in == 8'h1A && dut.u_dp.ip == 8'h09, "step 5: DR <- 1Ah, IP -> 09h");
        5: check(dut.u_dp.opr == 8'h1A, "step 6: OR <- 1Ah");
        6: check(dut.u_dp.ar == 8'h1A, "step 7: AR <- OR (1Ah)");
        7: check(dut.u_dp.dr_in == 8'h11, "step 8: DR <- 11h");
        8: check(dut.u_dp.a == 8'h02 && dut.ir == 8'h00, "step 9: A <- 02h, IR <- 00h");
        default: ;
      endcase
      check(memw == 1'b0 && iow == 1'b0 && ior == 1'b0, $sformatf("step %0d: no write or port strobe", step + 1));
    end
    cs = {dut.ir, dut.u_ctl.a3, dut.u_ctl.mip};
    check(cs == exp_cs[9], "next instruction starts at CS address 000h");
    check(dut.z == 1'b0 && r_monitor == 8'h00, "Z and R untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
