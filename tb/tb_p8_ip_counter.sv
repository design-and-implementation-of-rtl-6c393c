// tb_p8_ip_counter: random clear / load / count commands against a reference
// counter kept in the testbench (clear over load over count), 8-bit wrap.
module tb_p8_ip_counter;
  logic clk = 0, clear, load_n, inc;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0, cycles = 0;

  p8_ip_counter dut (.clk(clk), .clear(clear), .load_n(load_n), .inc(inc), .d(d), .q(q));

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
    clear = 1; load_n = 1; inc = 0; d = 0; ref_q = 0;
    @(posedge clk); #1;
    clear = 0;
    checks++; if (q !== 8'h00) failures++;
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = $urandom % 16;
      clear  = (r == 0);
      load_n = !(r inside {[1:3]});
      inc    = (r >= 2);
      d      = 8'($urandom);
      if (clear) ref_q = 0;
      else if (!load_n) ref_q = d;
      else if (inc) ref_q = ref_q + 1;
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d q=%h exp=%h", n, q, ref_q);
      end
    end
    // wrap-around
    clear = 0; load_n = 0; inc = 0; d = 8'hFF; @(posedge clk); #1;
    load_n = 1; inc = 1; @(posedge clk); #1;
    checks++; if (q !== 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
