// tb_p8_pipeline: random microwords into the PAL 1 / PAL 3 logic.
// Load strobes must follow their control bits in the same clock (AR load held
// off in reset); the MIP load must be the exclusive OR of IR reset and IR
// load; A3 must be Z and C27; the AR and DR(OUT) output enables (active-low
// bits C4, C8) and MEMW and IOW must appear one clock after the word that
// carries them, and be low after reset.
module tb_p8_pipeline;
  import p8_pkg::*;
  logic clk = 0, rst, cond_en, z;
  p8_cw_t cw;
  p8_strobe_t stb;
  logic mip_load, zero_branch, addr_out, data_out, memw, iow;
  logic [3:0] exp_lat;
  int checks = 0, failures = 0, cycles = 0;

  p8_pipeline dut (.clk(clk), .rst(rst), .cw(cw), .cond_en(cond_en), .latched_zero(z),
                   .stb(stb), .mip_load(mip_load), .zero_branch(zero_branch),
                   .addr_out(addr_out), .data_out(data_out), .memw(memw), .iow(iow));

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
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    rst = 1; cw = p8_cw_t'(32'hFFFF_FFFF); cond_en = 0; z = 0;
    @(posedge clk); #1;
    check({addr_out, data_out, memw, iow} == 4'b0000, "reset clears latched outputs");
    check(stb.ar_load == 1'b0, "AR load gated in reset");
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      cw = p8_cw_t'($urandom);
      cond_en = 1'($urandom); z = 1'($urandom);
      #1;
      check(stb.ar_load == cw.ar_load && stb.dri_load == cw.drin_load &&
            stb.dro_load == cw.drout_load && stb.or_load == cw.or_load &&
            stb.a_load == cw.a_load && stb.r_load == cw.r_load &&
            stb.z_load == cw.z_load && stb.ir_load == cw.ir_load &&
            stb.ir_reset == cw.ir_reset, "load strobes");
      check(mip_load == (cw.ir_reset != cw.ir_load), "MIP load");
      check(zero_branch == (z & cond_en), "A3");
      exp_lat = {~cw.ar_out_n, ~cw.drout_out_n, cw.memw, cw.iow};
      @(posedge clk); #1;
      check({addr_out, data_out, memw, iow} == exp_lat, "latched outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
