// gc_chipset: the collector's data path as a set of identical bit-slice chips.
//
// Same ports and same cycle behaviour as gc_datapath, realised the way the
// VLSI collector was: N_CHIPS = ADDR_W/8 copies of gc_chip (three for the
// 24-bit address space), each carrying one byte of every address-wide
// register and one byte of the ALU, chained by carry, equality and the
// btow shift bits. Chip 0 (least significant byte) is the one whose tag
// field is used; the tag inputs of the other chips are tied low and their
// tag outputs are left unused, as in the document's chip set.
//
// Logic outside the chips (in the document's realization, the part next to
// the external controller): the COUNT unit holding C, the ALU carry-in
// (1 for inc and addinc, the "round up" bit for btow), the R and semispace
// bits, memory channel decoding, and the tag tests for the controller.
// Because the carry and equality ripple through all three chips in one
// cycle, this is the slow path of the design.
module gc_chipset
  import gc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  gc_ctrl_t   ctrl,
  input  content_t   root,
  output gc_status_t status,
  output addr_t      mem_addr,
  output logic       mem_space,
  output logic       mem_re,
  output logic       mem_we,
  output content_t   mem_wdata,
  input  content_t   mem_rdata,
  output logic       r,
  output logic       flip,
  output addr_t      avl
);

  localparam int unsigned N_CHIPS = ADDR_W / 8;

  addr_t c_q, alu_y, h_ptr, d_ptr, u_q, a_q;
  tag_t  h_tag, d_tag, md_tag;
  logic  c_is_m1;
  logic [N_CHIPS:0] carry, eq;
  logic [1:0] opa_low [N_CHIPS];
  logic [1:0] a_up2   [N_CHIPS];
  logic [7:0] unused_tag_bits [N_CHIPS];   // tag fields of the chips not in use

  // ALU carry into the least significant slice
  always_comb begin
    unique case (ctrl.alu_op)
      ALU_INC, ALU_ADDINC: carry[0] = 1'b1;
      ALU_ADD:             carry[0] = 1'b0;
      ALU_BTOW:            carry[0] = |opa_low[0];   // round up a partial word
    endcase
  end
  assign eq[0] = 1'b1;

  for (genvar k = 0; k < N_CHIPS; k++) begin : g_chip
    logic [15:0] md_k, h_k, d_k;
    logic [15:0] root_k, mem_k;

    assign root_k = {(k == 0) ? root.tag : tag_t'(0), root.ptr[8*k +: 8]};
    assign mem_k  = {(k == 0) ? mem_rdata.tag : tag_t'(0), mem_rdata.ptr[8*k +: 8]};
    if (k == N_CHIPS - 1) begin : g_top
      assign a_up2[k] = 2'b00;
    end else begin : g_mid
      assign a_up2[k] = opa_low[k+1];
    end

    gc_chip u_chip (
      .clk, .rst_n, .ctrl,
      .root(root_k), .mem_rdata(mem_k), .c(c_q[8*k +: 8]),
      .a_up2_in(a_up2[k]), .opa_low(opa_low[k]),
      .cin(carry[k]), .cout(carry[k+1]), .eq_in(eq[k]), .eq_out(eq[k+1]),
      .alu_y(alu_y[8*k +: 8]),
      .md(md_k), .ma(mem_addr[8*k +: 8]), .h(h_k), .d(d_k),
      .u(u_q[8*k +: 8]), .a(a_q[8*k +: 8])
    );

    assign h_ptr[8*k +: 8]         = h_k[7:0];
    assign d_ptr[8*k +: 8]         = d_k[7:0];
    assign mem_wdata.ptr[8*k +: 8] = md_k[7:0];
    if (k == 0) begin : g_tag_used
      assign h_tag  = h_k[15:8];
      assign d_tag  = d_k[15:8];
      assign md_tag = md_k[15:8];
      assign unused_tag_bits[k] = '0;
    end else begin : g_tag_unused
      assign unused_tag_bits[k] = md_k[15:8] ^ h_k[15:8] ^ d_k[15:8];
    end
  end

  assign mem_wdata.tag = md_tag;

  gc_count u_count (
    .clk, .rst_n, .sel(ctrl.c_sel), .load_alu(alu_y), .load_ptrd(d_ptr),
    .c(c_q), .c_is_m1
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= 1'b0;
      flip <= 1'b0;
    end else begin
      unique case (ctrl.r_sel)
        R_SET:   r <= 1'b1;
        R_CLEAR: r <= 1'b0;
        default: r <= r;
      endcase
      if (ctrl.flip) flip <= ~flip;
    end
  end

  always_comb begin
    mem_re    = (ctrl.mem_op == MEM_RD_OLD) || (ctrl.mem_op == MEM_RD_NEW);
    mem_we    = (ctrl.mem_op == MEM_WR_OLD) || (ctrl.mem_op == MEM_WR_NEW);
    mem_space = ((ctrl.mem_op == MEM_RD_NEW) || (ctrl.mem_op == MEM_WR_NEW)) ? ~flip : flip;
  end

  always_comb begin
    status.h_pointer   = is_pointer(h_tag);
    status.h_bvec_head = (h_tag == TAG_BVEC_HEAD);
    status.d_fwd       = (d_tag == TAG_FWD);
    status.h_tag       = h_tag;
    status.c_is_m1     = c_is_m1;
    status.u_eq_a      = eq[N_CHIPS];
  end

  assign avl = a_q;

  assert property (@(posedge clk) !(mem_re && mem_we));

endmodule
