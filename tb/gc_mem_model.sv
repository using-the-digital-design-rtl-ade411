// gc_mem_model: behavioural model of the heap memory (both semispaces).
//
// Sparse storage indexed by {space, address}, so the full 24-bit address
// space costs nothing until it is written. Stores are taken on the rising
// clock edge; read data is sampled on the falling edge from the address the
// collector holds for the whole access cycle, so it is ready for the next
// rising edge. Unwritten words read as zero. Testbenches load and inspect
// the contents directly through the `mem` array.
`timescale 1ns/1ps
module gc_mem_model
  import gc_pkg::*;
(
  input  logic     clk,
  input  addr_t    addr,
  input  logic     space,
  input  logic     re,
  input  logic     we,
  input  content_t wdata,
  output content_t rdata
);

  content_t mem [logic [ADDR_W:0]];
  int unsigned n_reads, n_writes;

  initial begin
    rdata    = '0;
    n_reads  = 0;
    n_writes = 0;
  end

  always @(posedge clk) begin
    if (we) begin
      mem[{space, addr}] = wdata;
      n_writes++;
    end
  end

  always @(negedge clk) begin
    if (re) begin
      rdata <= mem.exists({space, addr}) ? mem[{space, addr}] : '0;
      n_reads++;
    end
  end

endmodule
