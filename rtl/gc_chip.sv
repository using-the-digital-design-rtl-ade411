// gc_chip: one data path chip of the collector, sixteen bit slices.
//
// A chip holds eight address slices (one byte of the pointer field of MD,
// H, D and of MA, U, A, with one byte of the ALU) and eight tag slices (the
// whole tag field of MD, H and D). All chips are identical; a 24-bit
// collector uses three, chained least significant first, and only one of
// them has its tag field in use.
//
// Chains between chips: the ALU carry (cin/cout), the U = A equality
// (eq_in/eq_out), and the two lowest bits of ALU operand a (opa_low) that
// the chip below needs for btow, which shifts the operand right by two
// (a_up2_in receives them from the chip above; zero at the top chip).
// Bus bits: [7:0] pointer byte, [15:8] tag field. Registers update on the
// rising edge; the chains ripple combinationally through all chips.
// Sixteen slices, full tag plus eight address bits per chip, three chips
// for 24 bits: from the document. Pin grouping: this design's own.
module gc_chip
  import gc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  gc_ctrl_t    ctrl,
  input  logic [15:0] root,
  input  logic [15:0] mem_rdata,
  input  logic [7:0]  c,
  input  logic [1:0]  a_up2_in,
  output logic [1:0]  opa_low,
  input  logic        cin,
  output logic        cout,
  input  logic        eq_in,
  output logic        eq_out,
  output logic [7:0]  alu_y,
  output logic [15:0] md,
  output logic [7:0]  ma,
  output logic [15:0] h,
  output logic [15:0] d,
  output logic [7:0]  u,
  output logic [7:0]  a
);

  logic [8:0] carry, eq;
  logic [9:0] opa;      // operand a bits, with the two bits from above

  assign carry[0] = cin;
  assign eq[0]    = eq_in;
  assign opa[9:8] = a_up2_in;

  for (genvar i = 0; i < 8; i++) begin : g_addr
    gc_addr_slice u_slice (
      .clk, .rst_n, .ctrl,
      .root_b(root[i]), .mem_b(mem_rdata[i]), .c_b(c[i]), .a_up2(opa[i+2]),
      .cin(carry[i]), .cout(carry[i+1]), .eq_in(eq[i]), .eq_out(eq[i+1]),
      .opa_b(opa[i]), .alu_b(alu_y[i]),
      .md_b(md[i]), .ma_b(ma[i]), .h_b(h[i]), .d_b(d[i]), .u_b(u[i]), .a_b(a[i])
    );
  end

  for (genvar i = 0; i < 8; i++) begin : g_tag
    gc_tag_slice #(.FWD_BIT(TAG_FWD[i])) u_slice (
      .clk, .rst_n, .ctrl,
      .root_b(root[8+i]), .mem_b(mem_rdata[8+i]),
      .md_b(md[8+i]), .h_b(h[8+i]), .d_b(d[8+i])
    );
  end

  assign cout    = carry[8];
  assign eq_out  = eq[8];
  assign opa_low = opa[1:0];

endmodule
