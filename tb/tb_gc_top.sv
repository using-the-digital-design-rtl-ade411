// tb_gc_top: end-to-end test of the collector at its full default size
// (24-bit addresses, three-chip bit-sliced data path).
//
// Builds a random heap of pairs, vectors and byte vectors in physical
// semispace 0 (with garbage, shared and cyclic structure, immediates, and
// pointers to a fixed area of unmoved byte vectors), rooted in a vector.
// It runs a collection through the go/r handshake, then two more on the
// result, each one copying the live heap to the other semispace. After each collection the whole
// memory, the avl output and the cycle count are compared with a reference:
// a direct, unserialized execution of the collector's specification on a
// copy of the memory. The expected cycle count is the number of serialized
// states each function call of the specification expands into.
// Every mechanism (pair, vector, byte vector copy, forwarded pointer,
// unmoved byte vector, byte vector body skip, immediate skip, vector loop,
// semispace flip, idle wait) is counted and must occur.
`timescale 1ns/1ps
module tb_gc_top;
  import gc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic r, flip, mem_space, mem_re, mem_we;
  content_t root, mem_wdata, mem_rdata;
  addr_t avl, mem_addr;
  gc_state_e state;
  int checks = 0, failures = 0;

  gc_top dut (.*);

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "gc_top_tb_body.svh"

endmodule
