// tb_gc_chipset: the three-chip data path against the register-level one.
//
// Both organisations get the same random control words, root and memory
// data each cycle (with U and A zeroed now and then so the equality chain
// sees both outcomes, and small C values so C = -1 occurs); every output and
// the H, D, U pointer fields must agree on every cycle. The register-level
// data path is itself checked against a transfer model by tb_gc_datapath.
`timescale 1ns/1ps
module tb_gc_chipset;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gc_ctrl_t ctrl;
  content_t root, mem_rdata;
  gc_status_t st_s, st_f;
  addr_t addr_s, addr_f, avl_s, avl_f;
  content_t wd_s, wd_f;
  logic sp_s, sp_f, re_s, re_f, we_s, we_f, r_s, r_f, fl_s, fl_f;
  int checks = 0, failures = 0;
  int n_eq = 0, n_m1 = 0, n_carry = 0;

  always #5 clk = ~clk;

  gc_chipset dut (
    .clk, .rst_n, .ctrl, .root, .status(st_s), .mem_addr(addr_s), .mem_space(sp_s),
    .mem_re(re_s), .mem_we(we_s), .mem_wdata(wd_s), .mem_rdata, .r(r_s), .flip(fl_s), .avl(avl_s)
  );
  gc_datapath ref_dp (
    .clk, .rst_n, .ctrl, .root, .status(st_f), .mem_addr(addr_f), .mem_space(sp_f),
    .mem_re(re_f), .mem_we(we_f), .mem_wdata(wd_f), .mem_rdata, .r(r_f), .flip(fl_f), .avl(avl_f)
  );

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

  task automatic compare(string when);
    chk(st_s == st_f, {when, " status"});
    chk(addr_s == addr_f && sp_s == sp_f && re_s == re_f && we_s == we_f, {when, " memory control"});
    chk(wd_s == wd_f, $sformatf("%s MD %0h vs %0h", when, wd_s, wd_f));
    chk(r_s == r_f && fl_s == fl_f && avl_s == avl_f, {when, " r / flip / avl"});
    chk(dut.h_ptr == ref_dp.h_q.ptr && dut.d_ptr == ref_dp.d_q.ptr && dut.u_q == ref_dp.u_q
        && dut.alu_y == ref_dp.alu_y, $sformatf("%s H/D/U/ALU", when));
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gc_ctrl_t k;
    ctrl = CTRL_NOP; root = '0; mem_rdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare("reset");
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      k = rand_ctrl();
      if (i % 40 == 0) begin k.u_sel = UA_ZERO; k.a_sel = UA_ZERO; end
      if (i % 40 == 1) begin k.c_sel = C_LOAD_PTRD; k.d_sel = D_HOLD; end
      ctrl = k;
      root = content_t'($urandom);
      mem_rdata = ($urandom_range(0, 1) == 0) ? content_t'($urandom)
                : content_t'({8'($urandom_range(0, 255)), 24'($urandom_range(0, 3))});
      #1 compare("before edge");
      if (st_s.u_eq_a) n_eq++;
      if (st_s.c_is_m1) n_m1++;
      if (dut.carry[1] && dut.carry[2]) n_carry++;
      @(posedge clk);
      #1 compare("after edge");
    end
    chk(n_eq > 10 && n_m1 > 0 && n_carry > 10, $sformatf("corners: eq %0d m1 %0d carry %0d", n_eq, n_m1, n_carry));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
