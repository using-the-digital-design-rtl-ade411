// tb_gc_addr_slice: random control words and inputs into one address slice;
// the six register bits, the ALU sum and carry, the operand bit and the
// equality chain are compared with a one-bit model after every cycle.
`timescale 1ns/1ps
module tb_gc_addr_slice;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gc_ctrl_t ctrl;
  logic root_b, mem_b, c_b, a_up2, cin, eq_in;
  logic cout, eq_out, opa_b, alu_b, md_b, ma_b, h_b, d_b, u_b, a_b;
  logic mMD, mMA, mH, mD, mU, mA;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_addr_slice dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y, s, co, opa;
    ctrl = CTRL_NOP;
    {root_b, mem_b, c_b, a_up2, cin, eq_in} = '0;
    {mMD, mMA, mH, mD, mU, mA} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ctrl.alu_op = alu_op_e'($urandom_range(0, 3));
      ctrl.alu_a  = alu_a_e'($urandom_range(0, 3));
      ctrl.alu_b  = alu_b_e'($urandom_range(0, 1));
      ctrl.h_sel  = h_sel_e'($urandom_range(0, 2));
      ctrl.d_sel  = d_sel_e'($urandom_range(0, 2));
      ctrl.md_sel = md_sel_e'($urandom_range(0, 4));
      ctrl.ma_sel = ma_sel_e'($urandom_range(0, 4));
      ctrl.u_sel  = ua_sel_e'($urandom_range(0, 2));
      ctrl.a_sel  = ua_sel_e'($urandom_range(0, 2));
      {root_b, mem_b, c_b, a_up2, cin, eq_in} = 6'($urandom);
      #1;
      opa = (ctrl.alu_a == ALU_A_U) ? mU : (ctrl.alu_a == ALU_A_A) ? mA
          : (ctrl.alu_a == ALU_A_PTRH) ? mH : mD;
      x = (ctrl.alu_op == ALU_BTOW) ? a_up2 : opa;
      y = (ctrl.alu_op == ALU_ADD || ctrl.alu_op == ALU_ADDINC) ? ((ctrl.alu_b == ALU_B_C) ? c_b : mD) : 1'b0;
      {co, s} = 2'(x) + 2'(y) + 2'(cin);
      chk(opa_b == opa && alu_b == s && cout == co, "alu bit");
      chk(eq_out == (eq_in && (mU == mA)), "eq chain");
      @(posedge clk);
      begin
        logic nMD, nMA, nH, nD, nU, nA;
        nH  = (ctrl.h_sel == H_ROOT) ? root_b : (ctrl.h_sel == H_MEM) ? mem_b : mH;
        nD  = (ctrl.d_sel == D_MEM) ? mem_b : (ctrl.d_sel == D_CELL_ALU) ? s : mD;
        nMD = (ctrl.md_sel == MD_D || ctrl.md_sel == MD_CELL_HD) ? mD
            : (ctrl.md_sel == MD_CELL_HA || ctrl.md_sel == MD_FWD_A) ? mA : mMD;
        nMA = (ctrl.ma_sel == MA_U) ? mU : (ctrl.ma_sel == MA_A) ? mA
            : (ctrl.ma_sel == MA_PTRH) ? mH : (ctrl.ma_sel == MA_ALU) ? s : mMA;
        nU  = (ctrl.u_sel == UA_ZERO) ? 1'b0 : (ctrl.u_sel == UA_ALU) ? s : mU;
        nA  = (ctrl.a_sel == UA_ZERO) ? 1'b0 : (ctrl.a_sel == UA_ALU) ? s : mA;
        {mMD, mMA, mH, mD, mU, mA} = {nMD, nMA, nH, nD, nU, nA};
      end
      #1 chk({md_b, ma_b, h_b, d_b, u_b, a_b} == {mMD, mMA, mH, mD, mU, mA}, "registers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
