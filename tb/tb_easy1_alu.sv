// tb_easy1_alu: self-checking test of the Easy I ALU.
// Drives every operation code with directed corner values and 2000 random
// operand pairs and compares the result with the operation table.
module tb_easy1_alu;
  import easy1_pkg::*;

  alu_op_e     op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  easy1_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [15:0] expect_y(logic [2:0] o, logic [15:0] aa, logic [15:0] bb);
    case (o)
      3'd0: return aa;
      3'd1: return 16'hFFFF ^ bb;
      3'd2: return aa & bb;
      3'd3: return 16'((32'(aa) + 32'(bb)) % 65536);
      3'd4: return {1'b0, bb[15:1]};
      default: return 16'h0000;
    endcase
  endfunction

  task automatic check(logic [2:0] o, logic [15:0] aa, logic [15:0] bb);
    op = alu_op_e'(o); a = aa; b = bb;
    #1;
    checks++;
    if (y !== expect_y(o, aa, bb)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, aa, bb, y, expect_y(o, aa, bb));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner values: two's complement negate, overflow, sign shift
    check(3'd3, 16'd1, 16'hFFFB);      // -5 + 1 = -4
    check(3'd3, 16'h7FFF, 16'd1);
    check(3'd4, 16'h0000, 16'h8001);   // logical shift: zero enters bit 15
    check(3'd1, 16'h1234, 16'h0004);
    check(3'd2, 16'h0000, 16'hFFFF);   // andi 0 clears AC
    for (int o = 0; o < 8; o++)
      for (int n = 0; n < 250; n++)
        check(3'(o), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
