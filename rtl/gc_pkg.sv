// gc_pkg: types and constants shared by the stop-and-copy garbage collector.
//
// A heap word (a "content") is a tag field above a pointer field. The 24-bit
// pointer field is the collector's address space; the 8-bit tag field is what
// is left of the sixteen bit slices of one data path chip once its eight
// address bits are taken. The tag codes themselves, and the number of bytes
// per heap word used by btow, are this design's own choices.
//
// The control word (gc_ctrl_t) is the "selection combination" of every
// register: the controller produces one per clock, the data path obeys it.
package gc_pkg;

  localparam int unsigned ADDR_W     = 24;  // pointer / address field
  localparam int unsigned TAG_W      = 8;   // tag field
  localparam int unsigned WORD_W     = TAG_W + ADDR_W;
  localparam int unsigned BYTE_SHIFT = 2;   // log2(bytes per heap word) used by btow

  // Tag codes. Bit 7 set marks a pointer; the low bits name the object kind.
  localparam logic [TAG_W-1:0] TAG_PAIR      = 8'h80;  // pointer to a two-word pair
  localparam logic [TAG_W-1:0] TAG_VEC       = 8'h81;  // pointer to a vector
  localparam logic [TAG_W-1:0] TAG_BVEC      = 8'h82;  // pointer to a byte vector
  localparam logic [TAG_W-1:0] TAG_FBVEC     = 8'h83;  // pointer to a byte vector that is not moved
  localparam logic [TAG_W-1:0] TAG_FWD       = 8'h40;  // forwarding word left in old space
  localparam logic [TAG_W-1:0] TAG_VEC_HEAD  = 8'h20;  // vector header, pointer field = length
  localparam logic [TAG_W-1:0] TAG_BVEC_HEAD = 8'h21;  // byte vector header, pointer field = bytes
  localparam logic [TAG_W-1:0] TAG_FIXNUM    = 8'h00;  // any other immediate

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TAG_W-1:0]  tag_t;

  typedef struct packed {
    tag_t  tag;
    addr_t ptr;
  } content_t;

  function automatic logic is_pointer(tag_t t);
    return t[TAG_W-1];
  endfunction

  // Round a byte count up to whole heap words (no overflow at the top of the range).
  function automatic addr_t btow(addr_t bytes);
    return (bytes >> BYTE_SHIFT) + addr_t'(|bytes[BYTE_SHIFT-1:0]);
  endfunction

  // ALU functions and operand choices.
  typedef enum logic [1:0] {ALU_INC, ALU_ADD, ALU_ADDINC, ALU_BTOW} alu_op_e;
  typedef enum logic [1:0] {ALU_A_U, ALU_A_A, ALU_A_PTRH, ALU_A_PTRD} alu_a_e;
  typedef enum logic       {ALU_B_C, ALU_B_PTRD} alu_b_e;

  // Register selections.
  typedef enum logic [1:0] {H_HOLD, H_ROOT, H_MEM} h_sel_e;
  typedef enum logic [1:0] {D_HOLD, D_MEM, D_CELL_ALU} d_sel_e;   // D_CELL_ALU: (cell D alu)
  typedef enum logic [2:0] {MD_HOLD, MD_D, MD_CELL_HA, MD_CELL_HD, MD_FWD_A} md_sel_e;
  typedef enum logic [2:0] {MA_HOLD, MA_U, MA_A, MA_PTRH, MA_ALU} ma_sel_e;
  typedef enum logic [1:0] {UA_HOLD, UA_ZERO, UA_ALU} ua_sel_e;   // for U and for A
  typedef enum logic [1:0] {C_HOLD, C_LOAD_ALU, C_LOAD_PTRD, C_DEC} c_sel_e;
  typedef enum logic [1:0] {R_HOLD, R_SET, R_CLEAR} r_sel_e;
  // Memory operation of the current state: the access uses MA (and MD).
  typedef enum logic [2:0] {MEM_NONE, MEM_RD_OLD, MEM_RD_NEW, MEM_WR_OLD, MEM_WR_NEW} mem_op_e;

  typedef struct packed {
    alu_op_e alu_op;
    alu_a_e  alu_a;
    alu_b_e  alu_b;
    h_sel_e  h_sel;
    d_sel_e  d_sel;
    md_sel_e md_sel;
    ma_sel_e ma_sel;
    ua_sel_e u_sel;
    ua_sel_e a_sel;
    c_sel_e  c_sel;
    r_sel_e  r_sel;
    logic    flip;      // toggle the roles of the semispaces (MFLIP)
    mem_op_e mem_op;
  } gc_ctrl_t;

  localparam gc_ctrl_t CTRL_NOP = '{
    alu_op: ALU_INC, alu_a: ALU_A_U, alu_b: ALU_B_C,
    h_sel: H_HOLD, d_sel: D_HOLD, md_sel: MD_HOLD, ma_sel: MA_HOLD,
    u_sel: UA_HOLD, a_sel: UA_HOLD, c_sel: C_HOLD, r_sel: R_HOLD,
    flip: 1'b0, mem_op: MEM_NONE};

  // Status the data path reports to the controller.
  typedef struct packed {
    logic h_pointer;    // (pointer? H)
    logic h_bvec_head;  // (bvec-head? H)
    logic d_fwd;        // (eq? fwd (tag D))
    tag_t h_tag;        // (tag H), for the case in Type
    logic c_is_m1;      // (= C -1)
    logic u_eq_a;       // (= U A)
  } gc_status_t;

  // Serialized control points. Names follow the functions of the
  // specification; a suffix marks a state added by serialization.
  typedef enum logic [5:0] {
    S_IDLE, S_DRIVER, S_DRIVER_RD, S_SHOW_AVL,
    S_NEXT, S_NEXT_RD, S_NEXT_BVH,
    S_TYPE, S_TYPE_FWD_WR, S_TYPE_PAIR_WR, S_TYPE_VEC_WR, S_TYPE_BVEC_WR,
    S_PAIR1, S_PAIR1_WR, S_PAIR2, S_PAIR2_RD, S_PAIR2_2, S_PAIR2_2_WR,
    S_PAIR3, S_PAIR3_WR,
    S_VEC, S_VEC_1, S_VEC_2, S_VEC_3,
    S_VLOOP, S_VLOOP_FWD_WR, S_VLOOP_WR, S_VLOOP_2, S_VLOOP_3,
    S_BVEC, S_BVEC_1, S_BVEC_2, S_BVEC_3,
    S_BLOOP, S_BLOOP_FWD_WR, S_BLOOP_WR, S_BLOOP_2, S_BLOOP_3
  } gc_state_e;

endpackage
