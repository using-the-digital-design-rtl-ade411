// tb_gc_tag_slice: random selections into one tag slice (both values of the
// constant fwd bit, one instance each); MD, H and D are compared with a
// one-bit model after every cycle.
`timescale 1ns/1ps
module tb_gc_tag_slice;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  gc_ctrl_t ctrl;
  logic root_b, mem_b;
  logic [1:0] md_b, h_b, d_b, mMD, mH, mD;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_tag_slice #(.FWD_BIT(1'b0)) dut0 (.clk, .rst_n, .ctrl, .root_b, .mem_b,
                                       .md_b(md_b[0]), .h_b(h_b[0]), .d_b(d_b[0]));
  gc_tag_slice #(.FWD_BIT(1'b1)) dut1 (.clk, .rst_n, .ctrl, .root_b, .mem_b,
                                       .md_b(md_b[1]), .h_b(h_b[1]), .d_b(d_b[1]));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = CTRL_NOP;
    {root_b, mem_b} = '0;
    mMD = '0; mH = '0; mD = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ctrl.h_sel  = h_sel_e'($urandom_range(0, 2));
      ctrl.d_sel  = d_sel_e'($urandom_range(0, 2));
      ctrl.md_sel = md_sel_e'($urandom_range(0, 4));
      {root_b, mem_b} = 2'($urandom);
      @(posedge clk);
      for (int j = 0; j < 2; j++) begin
        logic nMD, nH, nD;
        nH  = (ctrl.h_sel == H_ROOT) ? root_b : (ctrl.h_sel == H_MEM) ? mem_b : mH[j];
        nD  = (ctrl.d_sel == D_MEM) ? mem_b : mD[j];
        nMD = (ctrl.md_sel == MD_D) ? mD[j]
            : (ctrl.md_sel == MD_CELL_HA || ctrl.md_sel == MD_CELL_HD) ? mH[j]
            : (ctrl.md_sel == MD_FWD_A) ? 1'(j) : mMD[j];
        mH[j] = nH; mD[j] = nD; mMD[j] = nMD;
      end
      #1;
      checks++;
      if ({md_b, h_b, d_b} != {mMD, mH, mD}) begin
        failures++;
        if (failures < 20) $display("FAIL: cycle %0d md %b h %b d %b", i, md_b, h_b, d_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
