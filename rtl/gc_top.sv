// gc_top: stop-and-copy garbage collector, serialized for one memory channel.
//
// The collector copies every cell reachable from the root word from the old
// semispace into the new one (Cheney scan: U scans the copied words, A
// allocates), leaves forwarding words behind, then flips the semispaces.
// gc_control sequences the work; the data path holds the registers, the ALU
// and the COUNT unit and drives the memory channel. SLICED selects how the
// data path is built: 1 (default) is the realization as three identical
// bit-slice chips (gc_chipset), 0 the register-level organisation
// (gc_datapath). Both behave identically, cycle for cycle.
//
// Interface
//   go / r     handshake with the allocator: r high in idle; raise go to
//              collect; r rises again when the collection is done (avl then
//              holds the first free word of the new space); drop go to
//              return to idle.
//   root       the root word *H*, sampled on the cycle go is seen in idle.
//   mem_*      one access per cycle at most: mem_re or mem_we with mem_addr,
//              mem_space (physical semispace 0/1) and mem_wdata; read data
//              is returned combinationally on mem_rdata in the same cycle.
//   flip       which physical semispace currently holds the live heap.
//   state      the control point, for observation.
// Widths: 24-bit addresses (the document's), 8-bit tags.
module gc_top
  import gc_pkg::*;
#(
  parameter bit SLICED = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      go,
  output logic      r,
  input  content_t  root,
  output addr_t     avl,
  output logic      flip,
  output addr_t     mem_addr,
  output logic      mem_space,
  output logic      mem_re,
  output logic      mem_we,
  output content_t  mem_wdata,
  input  content_t  mem_rdata,
  output gc_state_e state
);

  gc_ctrl_t   ctrl;
  gc_status_t status;

  gc_control u_control (
    .clk, .rst_n, .go, .status, .ctrl, .state
  );

  if (SLICED) begin : g_sliced
    gc_chipset u_datapath (
      .clk, .rst_n, .ctrl, .root, .status,
      .mem_addr, .mem_space, .mem_re, .mem_we, .mem_wdata, .mem_rdata,
      .r, .flip, .avl
    );
  end else begin : g_flat
    gc_datapath u_datapath (
      .clk, .rst_n, .ctrl, .root, .status,
      .mem_addr, .mem_space, .mem_re, .mem_we, .mem_wdata, .mem_rdata,
      .r, .flip, .avl
    );
  end

endmodule
