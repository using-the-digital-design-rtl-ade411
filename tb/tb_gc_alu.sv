// tb_gc_alu: checks every ALU function against integer arithmetic on random
// and corner operands (wrap-around at 2**24, btow of exact multiples).
`timescale 1ns/1ps
module tb_gc_alu;
  import gc_pkg::*;

  alu_op_e op;
  addr_t a, b, y;
  int checks = 0, failures = 0;

  gc_alu dut (.op, .a, .b, .y);

  function automatic longint expect_y(alu_op_e o, longint x, longint z);
    longint m = 64'd1 << ADDR_W;
    unique case (o)
      ALU_INC:    return (x + 1) % m;
      ALU_ADD:    return (x + z) % m;
      ALU_ADDINC: return (x + z + 1) % m;
      ALU_BTOW:   return (x + 3) / 4;          // four bytes per heap word
    endcase
  endfunction

  task automatic try(alu_op_e o, addr_t x, addr_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (longint'(y) != expect_y(o, longint'(x), longint'(z))) begin
      failures++;
      $display("FAIL: op %s a %0h b %0h y %0h", o.name(), x, z, y);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [4] = '{ALU_INC, ALU_ADD, ALU_ADDINC, ALU_BTOW};
    foreach (ops[i]) begin
      try(ops[i], '0, '0);
      try(ops[i], '1, '0);
      try(ops[i], '1, '1);
      try(ops[i], 24'd4, 24'd1);
      try(ops[i], 24'd5, 24'hFFFFFE);
      for (int k = 0; k < 500; k++) try(ops[i], addr_t'($urandom), addr_t'($urandom));
    end
    for (int n = 0; n < 64; n++) try(ALU_BTOW, addr_t'(n), '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
