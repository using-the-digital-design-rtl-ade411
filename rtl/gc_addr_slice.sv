// gc_addr_slice: one bit of the address part of the bit-sliced data path.
//
// Holds bit i of the six registers that have an address field (MD, H, D, MA,
// U, A), their selection logic, and one bit of the ALU: a full adder whose
// first operand is bit i of U, A, ptr H or ptr D (or, for btow, the operand
// bit two places up, a_up2, which is the shift right by two), and whose
// second operand is bit i of C or ptr D. Carry and the U = A equality run
// through the slices as ripple chains (cin/cout, eq_in/eq_out). The
// register transfers are exactly those of gc_datapath restricted to one bit.
// Organisation into one-bit projections follows the document; the operand
// and chain wiring of a slice is this design's own. Registers update on the
// rising clock edge; the chains are combinational.
module gc_addr_slice
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  gc_ctrl_t ctrl,
  input  logic     root_b,
  input  logic     mem_b,
  input  logic     c_b,      // bit i of C (from COUNT)
  input  logic     a_up2,    // ALU operand a, bit i+2 (for btow)
  input  logic     cin,
  output logic     cout,
  input  logic     eq_in,
  output logic     eq_out,
  output logic     opa_b,    // ALU operand a, bit i (to the slice two below)
  output logic     alu_b,
  output logic     md_b,
  output logic     ma_b,
  output logic     h_b,
  output logic     d_b,
  output logic     u_b,
  output logic     a_b
);

  logic x, y;

  always_comb begin
    unique case (ctrl.alu_a)
      ALU_A_U:    opa_b = u_b;
      ALU_A_A:    opa_b = a_b;
      ALU_A_PTRH: opa_b = h_b;
      ALU_A_PTRD: opa_b = d_b;
    endcase
    x = (ctrl.alu_op == ALU_BTOW) ? a_up2 : opa_b;
    y = (ctrl.alu_op inside {ALU_ADD, ALU_ADDINC})
        ? ((ctrl.alu_b == ALU_B_C) ? c_b : d_b) : 1'b0;
    alu_b = x ^ y ^ cin;
    cout  = (x & y) | (cin & (x ^ y));
  end

  assign eq_out = eq_in & (u_b == a_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_b <= 1'b0; ma_b <= 1'b0; h_b <= 1'b0; d_b <= 1'b0; u_b <= 1'b0; a_b <= 1'b0;
    end else begin
      unique case (ctrl.h_sel)
        H_ROOT:  h_b <= root_b;
        H_MEM:   h_b <= mem_b;
        default: h_b <= h_b;
      endcase
      unique case (ctrl.d_sel)
        D_MEM:      d_b <= mem_b;
        D_CELL_ALU: d_b <= alu_b;
        default:    d_b <= d_b;
      endcase
      unique case (ctrl.md_sel)
        MD_D:       md_b <= d_b;
        MD_CELL_HA: md_b <= a_b;
        MD_CELL_HD: md_b <= d_b;
        MD_FWD_A:   md_b <= a_b;
        default:    md_b <= md_b;
      endcase
      unique case (ctrl.ma_sel)
        MA_U:    ma_b <= u_b;
        MA_A:    ma_b <= a_b;
        MA_PTRH: ma_b <= h_b;
        MA_ALU:  ma_b <= alu_b;
        default: ma_b <= ma_b;
      endcase
      unique case (ctrl.u_sel)
        UA_ZERO: u_b <= 1'b0;
        UA_ALU:  u_b <= alu_b;
        default: u_b <= u_b;
      endcase
      unique case (ctrl.a_sel)
        UA_ZERO: a_b <= 1'b0;
        UA_ALU:  a_b <= alu_b;
        default: a_b <= a_b;
      endcase
    end
  end

endmodule
