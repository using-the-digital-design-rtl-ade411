// tb_gc_control: walks the controller through every path of the collector
// (idle wait, start, scan of an immediate and of a byte vector header,
// forwarded pointer, pair, vector and byte vector copies with their loops,
// unmoved byte vector, finish and flip) by presenting status flags, and
// compares the sequence of states, their memory operations and key register
// selections with the serialized schedule written out by hand. It also checks
// the serialization rules on every cycle: a memory access is always preceded
// by a cycle that loaded MA, and a store by one that loaded MD.
`timescale 1ns/1ps
module tb_gc_control;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  gc_status_t status;
  gc_ctrl_t ctrl;
  gc_state_e state;
  int checks = 0, failures = 0;
  gc_ctrl_t prev_ctrl;
  int rule_checks = 0;

  always #5 clk = ~clk;

  gc_control dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // serialization rules
  always @(posedge clk) if (rst_n) begin
    if (ctrl.mem_op != MEM_NONE) begin
      chk(prev_ctrl.ma_sel != MA_HOLD, $sformatf("access in %s without MA setup", state.name()));
      rule_checks++;
    end
    if (ctrl.mem_op inside {MEM_WR_OLD, MEM_WR_NEW})
      chk(prev_ctrl.md_sel != MD_HOLD, $sformatf("store in %s without MD setup", state.name()));
    prev_ctrl <= ctrl;
  end

  // Expect the current state and its memory operation, then clock.
  task automatic expect_step(gc_state_e s, mem_op_e m);
    #1;
    chk(state == s, $sformatf("state %s expected %s", state.name(), s.name()));
    chk(ctrl.mem_op == m, $sformatf("%s mem_op %s expected %s", s.name(), ctrl.mem_op.name(), m.name()));
    @(posedge clk);
    #1;
  endtask

  task automatic set_h(tag_t t);
    status.h_tag = t;
    status.h_pointer = t[7];
    status.h_bvec_head = (t == TAG_BVEC_HEAD);
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    status = '0;
    prev_ctrl = CTRL_NOP;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // idle: R is set while GO is low
    #1 chk(state == S_IDLE && ctrl.r_sel == R_SET, "idle sets R");
    repeat (2) expect_step(S_IDLE, MEM_NONE);
    go = 1'b1;
    #1 chk(ctrl.h_sel == H_ROOT && ctrl.u_sel == UA_ZERO && ctrl.a_sel == UA_ZERO
           && ctrl.r_sel == R_CLEAR, "idle start actions");
    expect_step(S_IDLE, MEM_NONE);
    // Next on an immediate: U <- inc U, back to Driver
    set_h(TAG_FIXNUM);
    #1 chk(ctrl.u_sel == UA_ALU && ctrl.alu_op == ALU_INC, "immediate inc U");
    expect_step(S_NEXT, MEM_NONE);
    // Driver reads the next word of new space
    status.u_eq_a = 0;
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // byte vector header: two ALU steps
    set_h(TAG_BVEC_HEAD);
    #1 chk(ctrl.alu_op == ALU_BTOW && ctrl.c_sel == C_LOAD_ALU, "bvh btow into C");
    expect_step(S_NEXT, MEM_NONE);
    #1 chk(ctrl.alu_op == ALU_ADDINC && ctrl.u_sel == UA_ALU, "bvh addinc U");
    expect_step(S_NEXT_BVH, MEM_NONE);
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // forwarded pointer
    set_h(TAG_PAIR);
    expect_step(S_NEXT, MEM_NONE);
    expect_step(S_NEXT_RD, MEM_RD_OLD);
    status.d_fwd = 1;
    #1 chk(ctrl.md_sel == MD_CELL_HD && ctrl.ma_sel == MA_U, "forward: MD <- cell H D");
    expect_step(S_TYPE, MEM_NONE);
    expect_step(S_TYPE_FWD_WR, MEM_WR_NEW);
    status.d_fwd = 0;
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // pair copy: Type, Pair1, Pair2 / Pair2.2, Pair3
    expect_step(S_NEXT, MEM_NONE);
    expect_step(S_NEXT_RD, MEM_RD_OLD);
    #1 chk(ctrl.md_sel == MD_FWD_A && ctrl.ma_sel == MA_PTRH, "pair: forward old cell");
    expect_step(S_TYPE, MEM_NONE);
    expect_step(S_TYPE_PAIR_WR, MEM_WR_OLD);
    expect_step(S_PAIR1, MEM_NONE);
    expect_step(S_PAIR1_WR, MEM_WR_NEW);
    expect_step(S_PAIR2, MEM_NONE);
    expect_step(S_PAIR2_RD, MEM_RD_OLD);
    expect_step(S_PAIR2_2, MEM_NONE);
    #1 chk(ctrl.a_sel == UA_ALU, "PAIR2.2 increments A");
    expect_step(S_PAIR2_2_WR, MEM_WR_NEW);
    #1 chk(ctrl.u_sel == UA_ALU && ctrl.a_sel == UA_HOLD && ctrl.md_sel == MD_D, "PAIR3: U <- inc U, MD <- D");
    expect_step(S_PAIR3, MEM_NONE);
    #1 chk(ctrl.a_sel == UA_ALU && ctrl.alu_a == ALU_A_A && ctrl.u_sel == UA_HOLD, "PAIR3 store: A <- inc A");
    expect_step(S_PAIR3_WR, MEM_WR_NEW);
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // vector of one element: Vec then two Vloop passes
    set_h(TAG_VEC);
    expect_step(S_NEXT, MEM_NONE);
    expect_step(S_NEXT_RD, MEM_RD_OLD);
    #1 chk(ctrl.c_sel == C_LOAD_PTRD, "vec: C <- ptr D");
    expect_step(S_TYPE, MEM_NONE);
    expect_step(S_TYPE_VEC_WR, MEM_WR_NEW);
    expect_step(S_VEC, MEM_NONE);
    expect_step(S_VEC_1, MEM_WR_NEW);
    #1 chk(ctrl.c_sel == C_DEC && ctrl.ma_sel == MA_ALU && ctrl.alu_op == ALU_ADD, "VEC.2");
    expect_step(S_VEC_2, MEM_NONE);
    expect_step(S_VEC_3, MEM_RD_OLD);
    status.c_is_m1 = 0;
    expect_step(S_VLOOP, MEM_NONE);
    expect_step(S_VLOOP_WR, MEM_WR_NEW);
    expect_step(S_VLOOP_2, MEM_NONE);
    expect_step(S_VLOOP_3, MEM_RD_OLD);
    status.c_is_m1 = 1;
    expect_step(S_VLOOP, MEM_NONE);
    #1 chk(ctrl.a_sel == UA_ALU && ctrl.alu_op == ALU_ADDINC, "vloop end: A <- addinc A (ptr D)");
    expect_step(S_VLOOP_FWD_WR, MEM_WR_OLD);
    status.c_is_m1 = 0;
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // byte vector copy, one body word
    set_h(TAG_BVEC);
    expect_step(S_NEXT, MEM_NONE);
    expect_step(S_NEXT_RD, MEM_RD_OLD);
    expect_step(S_TYPE, MEM_NONE);
    #1 chk(ctrl.d_sel == D_CELL_ALU && ctrl.c_sel == C_LOAD_ALU && ctrl.alu_op == ALU_BTOW, "bvec btow");
    expect_step(S_TYPE_BVEC_WR, MEM_WR_NEW);
    expect_step(S_BVEC, MEM_NONE);
    #1 chk(ctrl.u_sel == UA_ALU, "BVEC store: U <- inc U");
    expect_step(S_BVEC_1, MEM_WR_NEW);
    expect_step(S_BVEC_2, MEM_NONE);
    expect_step(S_BVEC_3, MEM_RD_OLD);
    expect_step(S_BLOOP, MEM_NONE);
    expect_step(S_BLOOP_WR, MEM_WR_NEW);
    expect_step(S_BLOOP_2, MEM_NONE);
    expect_step(S_BLOOP_3, MEM_RD_OLD);
    status.c_is_m1 = 1;
    expect_step(S_BLOOP, MEM_NONE);
    #1 chk(ctrl.a_sel == UA_ALU && ctrl.alu_op == ALU_ADDINC && ctrl.alu_b == ALU_B_C, "bloop end: A <- addinc A C");
    expect_step(S_BLOOP_FWD_WR, MEM_WR_OLD);
    status.c_is_m1 = 0;
    expect_step(S_DRIVER, MEM_NONE);
    expect_step(S_DRIVER_RD, MEM_RD_NEW);
    // unmoved byte vector: Type skips it
    set_h(TAG_FBVEC);
    expect_step(S_NEXT, MEM_NONE);
    expect_step(S_NEXT_RD, MEM_RD_OLD);
    #1 chk(ctrl.u_sel == UA_ALU, "fbvec: U <- inc U");
    expect_step(S_TYPE, MEM_NONE);
    // finish: U = A flips the semispaces and raises R
    status.u_eq_a = 1;
    #1 chk(ctrl.flip && ctrl.r_sel == R_SET, "driver done flips and sets R");
    expect_step(S_DRIVER, MEM_NONE);
    repeat (3) expect_step(S_SHOW_AVL, MEM_NONE);
    go = 1'b0;
    expect_step(S_SHOW_AVL, MEM_NONE);
    expect_step(S_IDLE, MEM_NONE);
    chk(rule_checks > 20, "serialization rules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
