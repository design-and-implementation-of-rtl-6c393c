// tb_p8_reset_sync: the synchronised reset is the inverted external reset
// delayed by exactly one clock.
module tb_p8_reset_sync;
  logic clk = 0, rst_n_i, rst, prev;
  int checks = 0, failures = 0, cycles = 0;

  p8_reset_sync dut (.clk(clk), .rst_n_i(rst_n_i), .rst(rst));

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
    rst_n_i = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 500; n++) begin
      prev = rst_n_i;
      rst_n_i = ($urandom % 3) != 0;
      #2;
      checks++;
      if (rst !== ~prev) failures++;          // not yet changed before the edge
      @(posedge clk); #1;
      checks++;
      if (rst !== ~rst_n_i) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
