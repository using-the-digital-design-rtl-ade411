// gc_alu: the one address arithmetic unit of the serialized collector.
//
// Serialization leaves at most one arithmetic operation per state, so a single
// combinational unit serves every inc, add, addinc and btow of the
// specification; the controller picks the function and the operands.
//   ALU_INC     y = a + 1
//   ALU_ADD     y = a + b
//   ALU_ADDINC  y = a + b + 1
//   ALU_BTOW    y = ceil(a / bytes-per-word)   (b unused)
// All results wrap modulo 2**ADDR_W. The operation set follows the
// specification; sharing one adder (carry-in for the "inc" forms) and the
// bytes-per-word value are this design's own choices. Purely combinational.
module gc_alu
  import gc_pkg::*;
(
  input  alu_op_e op,
  input  addr_t   a,
  input  addr_t   b,
  output addr_t   y
);

  addr_t add_b;
  logic  cin;

  always_comb begin
    add_b = '0;
    cin   = 1'b0;
    unique case (op)
      ALU_INC:    begin add_b = '0; cin = 1'b1; end
      ALU_ADD:    begin add_b = b;  cin = 1'b0; end
      ALU_ADDINC: begin add_b = b;  cin = 1'b1; end
      ALU_BTOW:   begin add_b = '0; cin = 1'b0; end
    endcase
  end

  always_comb begin
    if (op == ALU_BTOW) y = btow(a);
    else                y = a + add_b + addr_t'(cin);
  end

endmodule
