// tb_p8_control: the control unit sequencing through FETCH and through both
// branches of "jump if not zero", with IR and Z driven by the testbench.
//  - after reset MIP = 0 and the word at 000h (AR <- IP, MEMR) is presented
//  - FETCH takes three clocks; its last word loads IR and restarts MIP
//  - JNZ (28h) with Z = 0: A3 = 0 and the three words listed for it in the
//    design, then IR reset and MIP back to 0; with Z = 1: A3 = 1 and the one
//    word of the skip path
//  - MEMR follows the word; the AR output enable follows one clock later
module tb_p8_control;
  import p8_pkg::*;
  logic clk = 0, rst, z;
  logic [7:0] ir;
  p8_cw_t cw;
  p8_strobe_t stb;
  logic addr_out, data_out, memw, iow, a3;
  logic [2:0] mip;
  int checks = 0, failures = 0, cycles = 0;

  p8_control dut (.clk(clk), .rst(rst), .ir(ir), .z(z), .cw(cw), .stb(stb),
                  .addr_out(addr_out), .data_out(data_out), .memw(memw), .iow(iow),
                  .mip(mip), .a3(a3));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s (cycle %0d, mip %0d, word %h)", what, cycles, mip, cw);
    end
  endtask

  // the testbench plays IR: load on ir_load, clear on ir_reset
  always @(posedge clk) begin
    if (rst || stb.ir_reset) ir <= 8'h00;
    else if (stb.ir_load) ir <= next_op;
  end
  logic [7:0] next_op;

  task automatic run_fetch();
    check(mip == 0 && ir == 8'h00, "fetch starts at 000h");
    check(cw.memr && !cw.ip_out_n && cw.ar_load, "fetch word 0");
    @(posedge clk); #1;
    check(mip == 1 && addr_out, "fetch word 1, AR enabled");
    check(cw.drin_load && cw.ip_inc, "fetch word 1 loads DR, counts IP");
    @(posedge clk); #1;
    check(mip == 2 && cw.ir_load && !cw.drin_out_n, "fetch word 2 loads IR");
    @(posedge clk); #1;
    check(mip == 0 && ir == next_op, "MIP restarted, opcode in IR");
  endtask

  initial begin
    rst = 1; z = 0; next_op = 8'h28;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    // Z = 0: jump taken
    run_fetch();
    check(a3 == 1'b0 && 32'(cw) == 32'h0940_2564, "JNZ Z=0 word 0");
    @(posedge clk); #1;
    check(mip == 1 && 32'(cw) == 32'h0940_65C4, "JNZ Z=0 word 1");
    @(posedge clk); #1;
    check(mip == 2 && 32'(cw) == 32'h0940_5511, "JNZ Z=0 word 2");
    @(posedge clk); #1;
    check(mip == 0 && ir == 8'h00, "back to FETCH");
    // Z = 1: not taken
    z = 1;
    run_fetch();
    check(a3 == 1'b1 && 32'(cw) == 32'h0940_7551, "JNZ Z=1 word");
    @(posedge clk); #1;
    check(mip == 0 && ir == 8'h00, "back to FETCH after skip");
    // A3 stays low for an instruction that is not conditional, whatever Z
    next_op = 8'h68;
    run_fetch();
    check(a3 == 1'b0 && cw.cond_en == 1'b0, "A3 low for SUB with Z=1");
    repeat (6) @(posedge clk);
    #1;
    check(mip == 0 && ir == 8'h00, "SUB direct took six words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
