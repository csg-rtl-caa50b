// fu_tb: self-checking test of the four library functional units (comparator, adder,
// subtractor, multiplier) at 16 bits. Random and corner operands are applied to all four units
// at once and each result is compared with an arithmetic reference computed here in 32 bits.
module fu_tb;
  import csg_pkg::*;
  logic [15:0] a, b, y_cmp, y_add, y_sub, y_mul;
  int checks = 0, failures = 0;

  fu #(.OP(FU_CMP)) u_cmp (.a, .b, .y(y_cmp));
  fu #(.OP(FU_ADD)) u_add (.a, .b, .y(y_add));
  fu #(.OP(FU_SUB)) u_sub (.a, .b, .y(y_sub));
  fu #(.OP(FU_MUL)) u_mul (.a, .b, .y(y_mul));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic apply(logic [15:0] va, logic [15:0] vb);
    int unsigned ia, ib;
    a = va; b = vb;
    #1;
    ia = va; ib = vb;
    check("cmp", y_cmp, (ia > ib) ? 16'd1 : 16'd0);
    check("add", y_add, 16'((ia + ib) % 65536));
    check("sub", y_sub, 16'((ia + 65536 - ib) % 65536));
    check("mul", y_mul, 16'((ia * ib) % 65536));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'd0, 16'd0);
    apply(16'd5, 16'd3);
    apply(16'd3, 16'd5);
    apply(16'd7, 16'd7);
    apply(16'hffff, 16'h0001);
    apply(16'h0001, 16'hffff);
    apply(16'hffff, 16'hffff);
    apply(16'h8000, 16'h7fff);
    for (int i = 0; i < 500; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
