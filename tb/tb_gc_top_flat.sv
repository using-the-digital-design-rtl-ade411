// tb_gc_top_flat: the end-to-end collector test of tb_gc_top, run on the
// register-level organisation of the data path (SLICED = 0) instead of the
// three-chip one. Same heap generator, reference model and checks.
`timescale 1ns/1ps
module tb_gc_top_flat;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic r, flip, mem_space, mem_re, mem_we;
  content_t root, mem_wdata, mem_rdata;
  addr_t avl, mem_addr;
  gc_state_e state;
  int checks = 0, failures = 0;

  gc_top #(.SLICED(1'b0)) dut (.*);

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "gc_top_tb_body.svh"

endmodule
