// tb_gc_datapath: drives random control words into the data path and checks
// every register (H, D, MD, MA, U, A, C, R, flip), the memory channel and the
// status flags against a register-transfer model kept in the testbench.
`timescale 1ns/1ps
module tb_gc_datapath;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gc_ctrl_t ctrl;
  content_t root, mem_rdata, mem_wdata;
  gc_status_t status;
  addr_t mem_addr, avl;
  logic mem_space, mem_re, mem_we, r, flip;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_datapath dut (.*);

  // model state
  content_t mH, mD, mMD;
  addr_t mMA, mU, mA, mC;
  logic mR, mF;

  function automatic content_t mk(tag_t t, addr_t p);
    content_t c;
    c.tag = t;
    c.ptr = p;
    return c;
  endfunction

  function automatic addr_t alu(gc_ctrl_t k);
    addr_t x, z;
    unique case (k.alu_a)
      ALU_A_U: x = mU;
      ALU_A_A: x = mA;
      ALU_A_PTRH: x = mH.ptr;
      ALU_A_PTRD: x = mD.ptr;
    endcase
    z = (k.alu_b == ALU_B_C) ? mC : mD.ptr;
    unique case (k.alu_op)
      ALU_INC: return x + 1;
      ALU_ADD: return x + z;
      ALU_ADDINC: return x + z + 1;
      ALU_BTOW: return addr_t'((longint'(x) + 3) / 4);
    endcase
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic gc_ctrl_t rand_ctrl();
    gc_ctrl_t k;
    k.alu_op = alu_op_e'($urandom_range(0, 3));
    k.alu_a  = alu_a_e'($urandom_range(0, 3));
    k.alu_b  = alu_b_e'($urandom_range(0, 1));
    k.h_sel  = h_sel_e'($urandom_range(0, 2));
    k.d_sel  = d_sel_e'($urandom_range(0, 2));
    k.md_sel = md_sel_e'($urandom_range(0, 4));
    k.ma_sel = ma_sel_e'($urandom_range(0, 4));
    k.u_sel  = ua_sel_e'($urandom_range(0, 2));
    k.a_sel  = ua_sel_e'($urandom_range(0, 2));
    k.c_sel  = c_sel_e'($urandom_range(0, 3));
    k.r_sel  = r_sel_e'($urandom_range(0, 2));
    k.flip   = ($urandom_range(0, 7) == 0);
    k.mem_op = mem_op_e'($urandom_range(0, 4));
    return k;
  endfunction

  task automatic compare();
    chk(dut.h_q == mH, $sformatf("H %0h exp %0h", dut.h_q, mH));
    chk(dut.d_q == mD, $sformatf("D %0h exp %0h", dut.d_q, mD));
    chk(mem_wdata == mMD, $sformatf("MD %0h exp %0h", mem_wdata, mMD));
    chk(mem_addr == mMA, $sformatf("MA %0h exp %0h", mem_addr, mMA));
    chk(dut.u_q == mU, "U");
    chk(avl == mA, "A");
    chk(dut.c_q == mC, "C");
    chk(r == mR && flip == mF, "R / flip");
    chk(status.h_pointer == mH.tag[7] && status.h_tag == mH.tag
        && status.h_bvec_head == (mH.tag == 8'h21) && status.d_fwd == (mD.tag == 8'h40)
        && status.c_is_m1 == (mC == 24'hFFFFFF) && status.u_eq_a == (mU == mA), "status");
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gc_ctrl_t k;
    addr_t y;
    ctrl = CTRL_NOP; root = '0; mem_rdata = '0;
    mH = '0; mD = '0; mMD = '0; mMA = '0; mU = '0; mA = '0; mC = '0; mR = 0; mF = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare();
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      k = rand_ctrl();
      // small values now and then so U = A and C = -1 happen
      if (i % 50 == 0) begin k.u_sel = UA_ZERO; k.a_sel = UA_ZERO; end
      ctrl = k;
      root = content_t'($urandom);
      mem_rdata = ($urandom_range(0, 3) == 0) ? mk(8'h40, addr_t'($urandom))
                : ($urandom_range(0, 3) == 0) ? mk(8'h21, addr_t'($urandom)) : content_t'($urandom);
      #1;
      // memory channel this cycle
      chk(mem_re == (k.mem_op inside {MEM_RD_OLD, MEM_RD_NEW}), "mem_re");
      chk(mem_we == (k.mem_op inside {MEM_WR_OLD, MEM_WR_NEW}), "mem_we");
      chk(mem_space == ((k.mem_op inside {MEM_RD_NEW, MEM_WR_NEW}) ? ~mF : mF), "mem_space");
      y = alu(k);
      @(posedge clk);
      // parallel update of the model, all from the old values
      begin
        content_t nH, nD, nMD;
        addr_t nMA, nU, nA, nC;
        nH = k.h_sel == H_ROOT ? root : k.h_sel == H_MEM ? mem_rdata : mH;
        nD = k.d_sel == D_MEM ? mem_rdata : k.d_sel == D_CELL_ALU ? mk(mD.tag, y) : mD;
        unique case (k.md_sel)
          MD_HOLD: nMD = mMD;
          MD_D: nMD = mD;
          MD_CELL_HA: nMD = mk(mH.tag, mA);
          MD_CELL_HD: nMD = mk(mH.tag, mD.ptr);
          MD_FWD_A: nMD = mk(8'h40, mA);
          default: nMD = mMD;
        endcase
        unique case (k.ma_sel)
          MA_HOLD: nMA = mMA;
          MA_U: nMA = mU;
          MA_A: nMA = mA;
          MA_PTRH: nMA = mH.ptr;
          MA_ALU: nMA = y;
          default: nMA = mMA;
        endcase
        nU = k.u_sel == UA_ZERO ? '0 : k.u_sel == UA_ALU ? y : mU;
        nA = k.a_sel == UA_ZERO ? '0 : k.a_sel == UA_ALU ? y : mA;
        nC = k.c_sel == C_LOAD_ALU ? y : k.c_sel == C_LOAD_PTRD ? mD.ptr
           : k.c_sel == C_DEC ? mC - 1 : mC;
        mH = nH; mD = nD; mMD = nMD; mMA = nMA; mU = nU; mA = nA; mC = nC;
        if (k.r_sel == R_SET) mR = 1; else if (k.r_sel == R_CLEAR) mR = 0;
        if (k.flip) mF = ~mF;
      end
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
