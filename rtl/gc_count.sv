// gc_count: the C register encapsulated as a counter (COUNT).
//
// C is only ever loaded or decremented, so it lives in its own unit rather
// than going through the ALU. Each clock it holds, loads one of two sources
// (the ALU result or the pointer field of D) or counts down by one. It flags
// C = -1 (all ones), the loop exit test of the vector copy loops.
// One-cycle latency: c and c_is_m1 change on the clock edge after the
// command. The reset value (0) is this design's choice.
module gc_count
  import gc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  c_sel_e sel,
  input  addr_t  load_alu,
  input  addr_t  load_ptrd,
  output addr_t  c,
  output logic   c_is_m1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else begin
      unique case (sel)
        C_HOLD:      c <= c;
        C_LOAD_ALU:  c <= load_alu;
        C_LOAD_PTRD: c <= load_ptrd;
        C_DEC:       c <= c - addr_t'(1);
      endcase
    end
  end

  assign c_is_m1 = (c == '1);

endmodule
