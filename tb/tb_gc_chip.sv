// tb_gc_chip: one sixteen-slice chip against a byte-wide model. Random
// control words and chain inputs; the ALU byte with its carry out, the
// btow shift through a_up2_in, the equality chain, opa_low and all register
// fields (tag and pointer byte) are checked every cycle.
`timescale 1ns/1ps
module tb_gc_chip;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gc_ctrl_t ctrl;
  logic [15:0] root, mem_rdata, md, h, d;
  logic [7:0] c, alu_y, ma, u, a;
  logic [1:0] a_up2_in, opa_low;
  logic cin, cout, eq_in, eq_out;
  logic [15:0] mH, mD, mMD;
  logic [7:0] mMA, mU, mA;
  int checks = 0, failures = 0, n_btow = 0, n_cout = 0;

  always #5 clk = ~clk;

  gc_chip dut (.*);

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
    logic [7:0] opa, x, y, s;
    logic co;
    ctrl = CTRL_NOP;
    root = '0; mem_rdata = '0; c = '0; a_up2_in = '0; cin = 0; eq_in = 1;
    mH = '0; mD = '0; mMD = '0; mMA = '0; mU = '0; mA = '0;
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
      if (i % 30 == 0) begin ctrl.u_sel = UA_ZERO; ctrl.a_sel = UA_ZERO; end
      root = 16'($urandom); mem_rdata = 16'($urandom); c = 8'($urandom);
      a_up2_in = 2'($urandom); cin = 1'($urandom); eq_in = ($urandom_range(0, 7) != 0);
      #1;
      opa = (ctrl.alu_a == ALU_A_U) ? mU : (ctrl.alu_a == ALU_A_A) ? mA
          : (ctrl.alu_a == ALU_A_PTRH) ? mH[7:0] : mD[7:0];
      x = (ctrl.alu_op == ALU_BTOW) ? {a_up2_in, opa[7:2]} : opa;
      y = (ctrl.alu_op == ALU_ADD || ctrl.alu_op == ALU_ADDINC)
          ? ((ctrl.alu_b == ALU_B_C) ? c : mD[7:0]) : 8'h00;
      {co, s} = 9'(x) + 9'(y) + 9'(cin);
      if (ctrl.alu_op == ALU_BTOW) n_btow++;
      if (co) n_cout++;
      chk(alu_y == s && cout == co, $sformatf("alu %0h/%b expected %0h/%b", alu_y, cout, s, co));
      chk(opa_low == opa[1:0], "opa_low");
      chk(eq_out == (eq_in && mU == mA), "eq chain");
      @(posedge clk);
      begin
        logic [15:0] nH, nD, nMD;
        logic [7:0] nMA, nU, nA;
        nH = (ctrl.h_sel == H_ROOT) ? root : (ctrl.h_sel == H_MEM) ? mem_rdata : mH;
        nD = (ctrl.d_sel == D_MEM) ? mem_rdata : (ctrl.d_sel == D_CELL_ALU) ? {mD[15:8], s} : mD;
        unique case (ctrl.md_sel)
          MD_D:       nMD = mD;
          MD_CELL_HA: nMD = {mH[15:8], mA};
          MD_CELL_HD: nMD = {mH[15:8], mD[7:0]};
          MD_FWD_A:   nMD = {TAG_FWD, mA};
          default:    nMD = mMD;
        endcase
        nMA = (ctrl.ma_sel == MA_U) ? mU : (ctrl.ma_sel == MA_A) ? mA
            : (ctrl.ma_sel == MA_PTRH) ? mH[7:0] : (ctrl.ma_sel == MA_ALU) ? s : mMA;
        nU = (ctrl.u_sel == UA_ZERO) ? 8'h00 : (ctrl.u_sel == UA_ALU) ? s : mU;
        nA = (ctrl.a_sel == UA_ZERO) ? 8'h00 : (ctrl.a_sel == UA_ALU) ? s : mA;
        mH = nH; mD = nD; mMD = nMD; mMA = nMA; mU = nU; mA = nA;
      end
      #1 chk(h == mH && d == mD && md == mMD && ma == mMA && u == mU && a == mA,
             $sformatf("registers h %0h/%0h d %0h/%0h md %0h/%0h", h, mH, d, mD, md, mMD));
    end
    chk(n_btow > 100 && n_cout > 100, "btow and carry out exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
