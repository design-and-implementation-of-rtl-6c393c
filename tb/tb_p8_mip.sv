// tb_p8_mip: the microinstruction pointer counts once per clock, wraps at 8,
// returns to zero the clock after load, and stays at zero in reset.
module tb_p8_mip;
  logic clk = 0, rst, load;
  logic [2:0] mip, ref_m;
  int checks = 0, failures = 0, cycles = 0;

  p8_mip dut (.clk(clk), .rst(rst), .load(load), .mip(mip));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    rst = 1; load = 0; ref_m = 0;
    repeat (2) @(posedge clk);
    #1; checks++; if (mip !== 3'd0) failures++;
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      int r;
      r = $urandom % 12;
      rst  = (r == 0);
      load = (r == 1) || (r == 2);
      ref_m = (rst || load) ? 3'd0 : ref_m + 3'd1;
      @(posedge clk); #1;
      checks++;
      if (mip !== ref_m) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d mip=%0d exp=%0d", n, mip, ref_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
