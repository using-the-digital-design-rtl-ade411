// tb_gc_count: drives random hold / load / decrement commands into the C
// counter and compares C and the C = -1 flag with a model after each clock,
// including counting down through zero to -1.
`timescale 1ns/1ps
module tb_gc_count;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  c_sel_e sel;
  addr_t load_alu, load_ptrd, c, model;
  logic c_is_m1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gc_count dut (.clk, .rst_n, .sel, .load_alu, .load_ptrd, .c, .c_is_m1);

  task automatic step(c_sel_e s, addr_t la, addr_t lp);
    @(negedge clk);
    sel = s; load_alu = la; load_ptrd = lp;
    @(posedge clk);
    unique case (s)
      C_HOLD:      model = model;
      C_LOAD_ALU:  model = la;
      C_LOAD_PTRD: model = lp;
      C_DEC:       model = model - 1;
    endcase
    #1;
    checks++;
    if (c != model || c_is_m1 != (model == 24'hFFFFFF)) begin
      failures++;
      $display("FAIL: sel %s c %0h expected %0h m1 %b", s.name(), c, model, c_is_m1);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    sel = C_HOLD; load_alu = '0; load_ptrd = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(C_LOAD_PTRD, 24'h0, 24'd3);
    repeat (5) step(C_DEC, addr_t'($urandom), addr_t'($urandom));   // 3,2,1,0 -> -1
    step(C_HOLD, '0, '0);
    step(C_LOAD_ALU, 24'd1, 24'd9);
    repeat (3) step(C_DEC, '0, '0);
    for (int i = 0; i < 2000; i++) begin
      k = $urandom_range(0, 3);
      step(c_sel_e'(k), addr_t'($urandom_range(0, 4)), addr_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
