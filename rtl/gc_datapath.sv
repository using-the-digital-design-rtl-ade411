// gc_datapath: registers, ALU, COUNT and memory channel of the collector.
//
// Holds the registers of the specification: H and D (heap words), U (scan
// pointer), A (allocation pointer), R (ready flag to the allocator), plus the
// memory address and data registers MA and MD that serialization added, the
// C register inside the COUNT unit, and the bit that says which physical
// semispace is currently "old". Every clock each register does what the
// control word ctrl selects (its "selection combination"); the one ALU
// serves whichever arithmetic operation the state needs.
//
// Memory channel: one operation per state. A state first loads MA (and MD
// for a store); the following state performs the access with MA/MD, so the
// memory sees registered address and data. Reads are sampled from mem_rdata
// at the end of the access cycle (the memory must return data within the
// cycle, asynchronously). mem_space is the physical semispace: old space is
// `flip`, new space is its complement; MFLIP toggles the bit.
//
// Status (pointer?, bvec-head?, fwd tag, tag of H, C = -1, U = A) is
// combinational from the registers. avl shows A, the first free word of the
// new space, which after a collection is where allocation resumes.
// Register set, operations and the MA/MD scheme follow the document; the
// memory interface signals, reset values and encodings are this design's.
module gc_datapath
  import gc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  gc_ctrl_t   ctrl,
  input  content_t   root,       // *H*: the root word loaded into H on GO
  output gc_status_t status,
  // memory channel
  output addr_t      mem_addr,
  output logic       mem_space,
  output logic       mem_re,
  output logic       mem_we,
  output content_t   mem_wdata,
  input  content_t   mem_rdata,
  // allocator side
  output logic       r,
  output logic       flip,
  output addr_t      avl
);

  content_t h_q, d_q, md_q;
  addr_t    ma_q, u_q, a_q, c_q;
  addr_t    alu_a, alu_b, alu_y;
  logic     c_is_m1;

  // ALU operand selection
  always_comb begin
    unique case (ctrl.alu_a)
      ALU_A_U:    alu_a = u_q;
      ALU_A_A:    alu_a = a_q;
      ALU_A_PTRH: alu_a = h_q.ptr;
      ALU_A_PTRD: alu_a = d_q.ptr;
    endcase
    unique case (ctrl.alu_b)
      ALU_B_C:    alu_b = c_q;
      ALU_B_PTRD: alu_b = d_q.ptr;
    endcase
  end

  gc_alu u_alu (.op(ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  gc_count u_count (
    .clk, .rst_n, .sel(ctrl.c_sel), .load_alu(alu_y), .load_ptrd(d_q.ptr),
    .c(c_q), .c_is_m1
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q  <= '0;
      d_q  <= '0;
      md_q <= '0;
      ma_q <= '0;
      u_q  <= '0;
      a_q  <= '0;
      r    <= 1'b0;
      flip <= 1'b0;
    end else begin
      unique case (ctrl.h_sel)
        H_HOLD: h_q <= h_q;
        H_ROOT: h_q <= root;
        H_MEM:  h_q <= mem_rdata;
        default: h_q <= h_q;
      endcase
      unique case (ctrl.d_sel)
        D_HOLD:     d_q <= d_q;
        D_MEM:      d_q <= mem_rdata;
        D_CELL_ALU: d_q <= '{tag: d_q.tag, ptr: alu_y};
        default:    d_q <= d_q;
      endcase
      unique case (ctrl.md_sel)
        MD_HOLD:    md_q <= md_q;
        MD_D:       md_q <= d_q;
        MD_CELL_HA: md_q <= '{tag: h_q.tag, ptr: a_q};
        MD_CELL_HD: md_q <= '{tag: h_q.tag, ptr: d_q.ptr};
        MD_FWD_A:   md_q <= '{tag: TAG_FWD, ptr: a_q};
        default:    md_q <= md_q;
      endcase
      unique case (ctrl.ma_sel)
        MA_HOLD: ma_q <= ma_q;
        MA_U:    ma_q <= u_q;
        MA_A:    ma_q <= a_q;
        MA_PTRH: ma_q <= h_q.ptr;
        MA_ALU:  ma_q <= alu_y;
        default: ma_q <= ma_q;
      endcase
      unique case (ctrl.u_sel)
        UA_HOLD: u_q <= u_q;
        UA_ZERO: u_q <= '0;
        UA_ALU:  u_q <= alu_y;
        default: u_q <= u_q;
      endcase
      unique case (ctrl.a_sel)
        UA_HOLD: a_q <= a_q;
        UA_ZERO: a_q <= '0;
        UA_ALU:  a_q <= alu_y;
        default: a_q <= a_q;
      endcase
      unique case (ctrl.r_sel)
        R_HOLD:  r <= r;
        R_SET:   r <= 1'b1;
        R_CLEAR: r <= 1'b0;
        default: r <= r;
      endcase
      if (ctrl.flip) flip <= ~flip;
    end
  end

  // Memory channel: the access always uses the registered MA and MD.
  always_comb begin
    mem_addr  = ma_q;
    mem_wdata = md_q;
    mem_re    = (ctrl.mem_op == MEM_RD_OLD) || (ctrl.mem_op == MEM_RD_NEW);
    mem_we    = (ctrl.mem_op == MEM_WR_OLD) || (ctrl.mem_op == MEM_WR_NEW);
    mem_space = ((ctrl.mem_op == MEM_RD_NEW) || (ctrl.mem_op == MEM_WR_NEW)) ? ~flip : flip;
  end

  always_comb begin
    status.h_pointer   = is_pointer(h_q.tag);
    status.h_bvec_head = (h_q.tag == TAG_BVEC_HEAD);
    status.d_fwd       = (d_q.tag == TAG_FWD);
    status.h_tag       = h_q.tag;
    status.c_is_m1     = c_is_m1;
    status.u_eq_a      = (u_q == a_q);
  end

  assign avl = a_q;

  // A store and a load never share a state.
  assert property (@(posedge clk) !(mem_re && mem_we));

endmodule
