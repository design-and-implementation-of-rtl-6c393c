// tb_p8_datapath: the datapath driven one microword per clock.
//
// First a directed run of the register transfers of the instruction-cycle
// example (A = 13h, subtract 11h read through DR(IN): A = 02h), then random
// microwords: each clock picks one internal-bus source (DR(IN), A or R), one
// address-bus source (IP or OR), one ALU operation or none, and random load
// enables; a reference model of the registers kept in the testbench predicts
// every register after every clock.
module tb_p8_datapath;
  import p8_pkg::*;
  logic clk = 0, rst;
  p8_cw_t cw;
  p8_strobe_t stb;
  logic [7:0] data_i, addr_o, data_o, ir, a, r, ip, r_monitor;
  logic z;
  int checks = 0, failures = 0, cycles = 0;

  p8_datapath dut (.clk(clk), .rst(rst), .cw(cw), .stb(stb), .data_i(data_i),
                   .addr_o(addr_o), .data_o(data_o), .ir(ir), .z(z), .a(a), .r(r),
                   .ip(ip), .r_monitor(r_monitor));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // strobes as the pipeline forms them
  always_comb begin
    stb.ar_load  = cw.ar_load;   stb.dri_load = cw.drin_load; stb.dro_load = cw.drout_load;
    stb.or_load  = cw.or_load;   stb.a_load   = cw.a_load;    stb.r_load   = cw.r_load;
    stb.z_load   = cw.z_load;    stb.ir_load  = cw.ir_load;   stb.ir_reset = cw.ir_reset;
  end

  // reference state
  logic [7:0] m_a, m_r, m_dri, m_dro, m_or, m_ar, m_ip, m_ir;
  logic       m_z;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  task automatic step(input logic [31:0] logical);
    logic [7:0] ib, ab, f;
    p8_cw_t w;
    w = p8_cw_t'(logical ^ CW_ACTIVE_LOW);
    cw = w;
    ib = !w.drin_out_n ? m_dri : !w.a_out_n ? m_a : !w.r_out_n ? m_r : 8'h00;
    ab = !w.ip_out_n ? m_ip : !w.or_out_n ? m_or : 8'h00;
    f = w.pass ? ib : w.add ? m_a + ib : w.sub ? m_a - ib : w.dec ? m_a - 8'd1 :
        w.lor ? (m_a | ib) : w.inv ? ~ib : w.shl ? {m_a[6:0], 1'b0} :
        w.cmp ? m_a - ib - 8'd1 : m_a;
    @(posedge clk);
    if (w.a_load) m_a = f;
    if (w.r_load) m_r = ib;
    if (w.drin_load) m_dri = data_i;
    if (w.drout_load) m_dro = ib;
    if (w.or_load) m_or = ib;
    if (w.ar_load) m_ar = ab;
    if (w.z_load) m_z = (f == 8'hFF);
    if (!w.ip_load_n) m_ip = ib; else if (w.ip_inc) m_ip = m_ip + 8'd1;
    if (w.ir_reset) m_ir = 8'h00; else if (w.ir_load) m_ir = ib;
    #1;
    check(a == m_a && r == m_r && r_monitor == m_r, "A/R");
    check(data_o == m_dro && addr_o == m_ar, "DR(OUT)/AR");
    check(ip == m_ip && ir == m_ir && z == m_z, "IP/IR/Z");
  endtask

  initial begin
    rst = 1; cw = p8_cw_t'(CW_ACTIVE_LOW); data_i = 0;
    m_a = 0; m_r = 0; m_dri = 0; m_dro = 0; m_or = 0; m_ar = 0; m_ip = 0; m_ir = 0; m_z = 0;
    repeat (2) @(posedge clk);
    #1; rst = 0;
    check(a == 0 && r == 0 && ip == 0 && ir == 0 && z == 0, "reset");
    // directed: A = 13h; A <- A - 11h
    data_i = 8'h13; step(U_DRIN_LOAD); step(U_DRIN_OUT | U_PASS | U_A_LOAD);
    data_i = 8'h11; step(U_DRIN_LOAD); step(U_DRIN_OUT | U_SUB | U_A_LOAD);
    check(a == 8'h02, "SUB example result 02h");
    step(U_DRIN_OUT | U_R_LOAD);                    // R = 11h
    step(U_R_OUT | U_CMP | U_Z_LOAD);               // 02h vs 11h
    check(z == 1'b0 && a == 8'h02, "compare unequal");
    step(U_DRIN_OUT | U_PASS | U_A_LOAD);           // A = 11h
    step(U_R_OUT | U_CMP | U_Z_LOAD);
    check(z == 1'b1 && a == 8'h11, "compare equal");
    step(U_R_OUT | U_OR_LOAD); step(U_OR_OUT | U_AR_LOAD);
    check(addr_o == 8'h11, "AR <- OR <- R");
    step(U_IP_INC); step(U_IP_INC); step(U_IP_OUT | U_AR_LOAD);
    check(addr_o == 8'h02, "AR <- IP");
    step(U_A_OUT | U_DROUT_LOAD);
    check(data_o == 8'h11, "DR(OUT) <- A");
    step(U_DRIN_OUT | U_IR_LOAD);
    check(ir == 8'h11, "IR <- DR");
    step(U_IR_RESET);
    check(ir == 8'h00, "IR reset");
    // random microwords
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] u;
      int k;
      u = '0;
      k = $urandom % 3;
      u |= (k == 0) ? U_DRIN_OUT : (k == 1) ? U_A_OUT : U_R_OUT;
      u |= ($urandom % 2) ? U_IP_OUT : U_OR_OUT;
      k = $urandom % 9;
      case (k)
        1: u |= U_PASS; 2: u |= U_ADD; 3: u |= U_SUB; 4: u |= U_DEC;
        5: u |= U_LOR;  6: u |= U_INV; 7: u |= U_SHL; 8: u |= U_CMP;
        default: ;
      endcase
      u |= $urandom & (U_A_LOAD | U_R_LOAD | U_DRIN_LOAD | U_DROUT_LOAD | U_OR_LOAD |
                       U_AR_LOAD | U_Z_LOAD | U_IP_INC | U_IR_LOAD);
      if ($urandom % 8 == 0) u |= U_IP_LOAD;
      if ($urandom % 8 == 0) u |= U_IR_RESET;
      data_i = 8'($urandom);
      step(u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
