// gc_tag_slice: one bit of the tag field of the bit-sliced data path.
//
// Only MD, H and D carry a tag, so a tag slice holds one bit of each of them
// and no arithmetic. (cell X Y) takes its tag from X: MD loads the H tag bit
// for (cell H A) and (cell H D), and the constant bit FWD_BIT of the fwd tag
// for (cell fwd A); D keeps its own tag bit when its pointer field is
// replaced by an ALU result. Registers update on the rising clock edge.
// The slice split follows the document; the contents are this design's
// reading of the register transfers.
module gc_tag_slice
  import gc_pkg::*;
#(
  parameter bit FWD_BIT = 1'b0   // this bit of the fwd tag
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gc_ctrl_t ctrl,
  input  logic     root_b,
  input  logic     mem_b,
  output logic     md_b,
  output logic     h_b,
  output logic     d_b
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_b <= 1'b0; h_b <= 1'b0; d_b <= 1'b0;
    end else begin
      unique case (ctrl.h_sel)
        H_ROOT:  h_b <= root_b;
        H_MEM:   h_b <= mem_b;
        default: h_b <= h_b;
      endcase
      unique case (ctrl.d_sel)
        D_MEM:   d_b <= mem_b;
        default: d_b <= d_b;            // D_CELL_ALU keeps the tag
      endcase
      unique case (ctrl.md_sel)
        MD_D:       md_b <= d_b;
        MD_CELL_HA: md_b <= h_b;
        MD_CELL_HD: md_b <= h_b;
        MD_FWD_A:   md_b <= FWD_BIT;
        default:    md_b <= md_b;
      endcase
    end
  end

endmodule
