// gc_control: serialized control of the stop-and-copy collector.
//
// A Moore/Mealy state machine with one state per control point of the
// serialized specification. The twelve functions of the collector (Idle,
// Driver, Show-avl, Next, Type, Pair1-3, Vec, Vloop, Bvec, Bloop) were
// expanded under two rules: at most one memory operation and one ALU
// operation per state, and every memory operation split in two states, the
// first loading MA (and MD for a store), the second doing the access. The
// expansion gives 38 states; each of them emits one control word (gc_ctrl_t)
// selecting what every register loads, which may depend on the status flags
// of the data path in the same cycle.
//
// Handshake with the allocator: in IDLE, R is raised while GO is low; GO high
// starts a collection (R drops). When the scan pointer U meets the
// allocation pointer A the semispaces are flipped, R rises and the machine
// waits in SHOW_AVL until GO falls.
//
// The split of Pair2 into PAIR2 / PAIR2.2 and of Vec's read into VEC.2 /
// VEC.3 follow the document's own examples. The Bloop function is completed
// here by analogy with Vloop. The order of the remaining split actions is
// this design's own.
module gc_control
  import gc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  gc_status_t status,
  output gc_ctrl_t   ctrl,
  output gc_state_e  state
);

  gc_state_e nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= nxt;
  end

  always_comb begin
    ctrl = CTRL_NOP;
    nxt  = state;
    unique case (state)
      // (Idle): wait for GO, then H <- *H*, U <- 0, A <- 0, R <- false
      S_IDLE: begin
        if (go) begin
          ctrl.h_sel = H_ROOT;
          ctrl.u_sel = UA_ZERO;
          ctrl.a_sel = UA_ZERO;
          ctrl.r_sel = R_CLEAR;
          nxt = S_NEXT;
        end else begin
          ctrl.r_sel = R_SET;
        end
      end
      // (Driver): done when U = A, else H <- RN[U]
      S_DRIVER: begin
        if (status.u_eq_a) begin
          ctrl.flip  = 1'b1;
          ctrl.r_sel = R_SET;
          nxt = S_SHOW_AVL;
        end else begin
          ctrl.ma_sel = MA_U;
          nxt = S_DRIVER_RD;
        end
      end
      S_DRIVER_RD: begin
        ctrl.mem_op = MEM_RD_NEW;
        ctrl.h_sel  = H_MEM;
        nxt = S_NEXT;
      end
      S_SHOW_AVL: if (!go) nxt = S_IDLE;
      // (Next): follow a pointer, skip a byte vector body, or step over a word
      S_NEXT: begin
        if (status.h_pointer) begin
          ctrl.ma_sel = MA_PTRH;
          nxt = S_NEXT_RD;
        end else if (status.h_bvec_head) begin
          ctrl.alu_op = ALU_BTOW;            // C is dead here: hold btow(ptr H)
          ctrl.alu_a  = ALU_A_PTRH;
          ctrl.c_sel  = C_LOAD_ALU;
          nxt = S_NEXT_BVH;
        end else begin
          ctrl.alu_op = ALU_INC;
          ctrl.alu_a  = ALU_A_U;
          ctrl.u_sel  = UA_ALU;
          nxt = S_DRIVER;
        end
      end
      S_NEXT_RD: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_TYPE;
      end
      S_NEXT_BVH: begin                      // U <- addinc U (btow (ptr H))
        ctrl.alu_op = ALU_ADDINC;
        ctrl.alu_a  = ALU_A_U;
        ctrl.alu_b  = ALU_B_C;
        ctrl.u_sel  = UA_ALU;
        nxt = S_DRIVER;
      end
      // (Type): already forwarded, or copy by the kind of H
      S_TYPE: begin
        if (status.d_fwd) begin
          ctrl.ma_sel = MA_U;
          ctrl.md_sel = MD_CELL_HD;
          nxt = S_TYPE_FWD_WR;
        end else begin
          unique case (status.h_tag)
            TAG_PAIR: begin
              ctrl.ma_sel = MA_PTRH;
              ctrl.md_sel = MD_FWD_A;
              nxt = S_TYPE_PAIR_WR;
            end
            TAG_VEC: begin
              ctrl.ma_sel = MA_U;
              ctrl.md_sel = MD_CELL_HA;
              ctrl.c_sel  = C_LOAD_PTRD;
              nxt = S_TYPE_VEC_WR;
            end
            TAG_BVEC: begin
              ctrl.ma_sel = MA_A;
              ctrl.md_sel = MD_D;
              nxt = S_TYPE_BVEC_WR;
            end
            default: begin                   // fbvec: left in place
              ctrl.alu_op = ALU_INC;
              ctrl.alu_a  = ALU_A_U;
              ctrl.u_sel  = UA_ALU;
              nxt = S_DRIVER;
            end
          endcase
        end
      end
      S_TYPE_FWD_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_U;
        ctrl.u_sel  = UA_ALU;
        nxt = S_DRIVER;
      end
      S_TYPE_PAIR_WR: begin
        ctrl.mem_op = MEM_WR_OLD;
        nxt = S_PAIR1;
      end
      S_TYPE_VEC_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_U;
        ctrl.u_sel  = UA_ALU;
        nxt = S_VEC;
      end
      S_TYPE_BVEC_WR: begin                  // D <- cell D (btow (ptr D)), C <- same
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_BTOW;
        ctrl.alu_a  = ALU_A_PTRD;
        ctrl.c_sel  = C_LOAD_ALU;
        ctrl.d_sel  = D_CELL_ALU;
        nxt = S_BVEC;
      end
      // (Pair1) WN[A] <- D
      S_PAIR1: begin
        ctrl.ma_sel = MA_A;
        ctrl.md_sel = MD_D;
        nxt = S_PAIR1_WR;
      end
      S_PAIR1_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        nxt = S_PAIR2;
      end
      // (Pair2) D <- Ro[inc ptr H]; then PAIR2.2: WN[U] <- cell H A, A <- inc A
      S_PAIR2: begin
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_PTRH;
        ctrl.ma_sel = MA_ALU;
        nxt = S_PAIR2_RD;
      end
      S_PAIR2_RD: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_PAIR2_2;
      end
      S_PAIR2_2: begin
        ctrl.ma_sel = MA_U;
        ctrl.md_sel = MD_CELL_HA;
        nxt = S_PAIR2_2_WR;
      end
      S_PAIR2_2_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_A;
        ctrl.a_sel  = UA_ALU;
        nxt = S_PAIR3;
      end
      // (Pair3) WN[A] <- D, U <- inc U, A <- inc A
      S_PAIR3: begin
        ctrl.ma_sel = MA_A;
        ctrl.md_sel = MD_D;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_U;
        ctrl.u_sel  = UA_ALU;
        nxt = S_PAIR3_WR;
      end
      S_PAIR3_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_A;
        ctrl.a_sel  = UA_ALU;
        nxt = S_DRIVER;
      end
      // (Vec) WN[A] <- D (header); VEC.2: MA <- add (ptr H) C, C <- dcr C; VEC.3: D <- Ro[MA]
      S_VEC: begin
        ctrl.ma_sel = MA_A;
        ctrl.md_sel = MD_D;
        nxt = S_VEC_1;
      end
      S_VEC_1: begin
        ctrl.mem_op = MEM_WR_NEW;
        nxt = S_VEC_2;
      end
      S_VEC_2: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.alu_a  = ALU_A_PTRH;
        ctrl.alu_b  = ALU_B_C;
        ctrl.ma_sel = MA_ALU;
        ctrl.c_sel  = C_DEC;
        nxt = S_VEC_3;
      end
      S_VEC_3: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_VLOOP;
      end
      // (Vloop) copy elements from the top down; at C = -1 forward the header
      S_VLOOP: begin
        if (status.c_is_m1) begin
          ctrl.ma_sel = MA_PTRH;
          ctrl.md_sel = MD_FWD_A;
          nxt = S_VLOOP_FWD_WR;
        end else begin
          ctrl.alu_op = ALU_ADDINC;
          ctrl.alu_a  = ALU_A_A;
          ctrl.alu_b  = ALU_B_C;
          ctrl.ma_sel = MA_ALU;
          ctrl.md_sel = MD_D;
          nxt = S_VLOOP_WR;
        end
      end
      S_VLOOP_FWD_WR: begin                  // A <- addinc A (ptr D)
        ctrl.mem_op = MEM_WR_OLD;
        ctrl.alu_op = ALU_ADDINC;
        ctrl.alu_a  = ALU_A_A;
        ctrl.alu_b  = ALU_B_PTRD;
        ctrl.a_sel  = UA_ALU;
        nxt = S_DRIVER;
      end
      S_VLOOP_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        nxt = S_VLOOP_2;
      end
      S_VLOOP_2: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.alu_a  = ALU_A_PTRH;
        ctrl.alu_b  = ALU_B_C;
        ctrl.ma_sel = MA_ALU;
        ctrl.c_sel  = C_DEC;
        nxt = S_VLOOP_3;
      end
      S_VLOOP_3: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_VLOOP;
      end
      // (Bvec) WN[U] <- cell H A, U <- inc U; then read the last body word
      S_BVEC: begin
        ctrl.ma_sel = MA_U;
        ctrl.md_sel = MD_CELL_HA;
        nxt = S_BVEC_1;
      end
      S_BVEC_1: begin
        ctrl.mem_op = MEM_WR_NEW;
        ctrl.alu_op = ALU_INC;
        ctrl.alu_a  = ALU_A_U;
        ctrl.u_sel  = UA_ALU;
        nxt = S_BVEC_2;
      end
      S_BVEC_2: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.alu_a  = ALU_A_PTRH;
        ctrl.alu_b  = ALU_B_PTRD;
        ctrl.ma_sel = MA_ALU;
        ctrl.c_sel  = C_DEC;
        nxt = S_BVEC_3;
      end
      S_BVEC_3: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_BLOOP;
      end
      // (Bloop) as Vloop; at C = -1 the header holds a byte count: C <- btow (ptr D)
      S_BLOOP: begin
        if (status.c_is_m1) begin
          ctrl.ma_sel = MA_PTRH;
          ctrl.md_sel = MD_FWD_A;
          ctrl.alu_op = ALU_BTOW;
          ctrl.alu_a  = ALU_A_PTRD;
          ctrl.c_sel  = C_LOAD_ALU;
          nxt = S_BLOOP_FWD_WR;
        end else begin
          ctrl.alu_op = ALU_ADDINC;
          ctrl.alu_a  = ALU_A_A;
          ctrl.alu_b  = ALU_B_C;
          ctrl.ma_sel = MA_ALU;
          ctrl.md_sel = MD_D;
          nxt = S_BLOOP_WR;
        end
      end
      S_BLOOP_FWD_WR: begin                  // A <- addinc A C
        ctrl.mem_op = MEM_WR_OLD;
        ctrl.alu_op = ALU_ADDINC;
        ctrl.alu_a  = ALU_A_A;
        ctrl.alu_b  = ALU_B_C;
        ctrl.a_sel  = UA_ALU;
        nxt = S_DRIVER;
      end
      S_BLOOP_WR: begin
        ctrl.mem_op = MEM_WR_NEW;
        nxt = S_BLOOP_2;
      end
      S_BLOOP_2: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.alu_a  = ALU_A_PTRH;
        ctrl.alu_b  = ALU_B_C;
        ctrl.ma_sel = MA_ALU;
        ctrl.c_sel  = C_DEC;
        nxt = S_BLOOP_3;
      end
      S_BLOOP_3: begin
        ctrl.mem_op = MEM_RD_OLD;
        ctrl.d_sel  = D_MEM;
        nxt = S_BLOOP;
      end
      default: nxt = S_IDLE;
    endcase
  end

endmodule
