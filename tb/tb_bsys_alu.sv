// tb_bsys_alu: self-checking test of the programmable ALU.
// Drives random operands through add, subtract, move and bitwise function
// tables and compares against integer arithmetic, including the carry out.
module tb_bsys_alu;
  import bsys_pkg::*;

  logic [7:0] a, b, r, cr;
  logic [3:0] cg, cp;
  logic       cin, cout;
  int checks = 0, failures = 0;

  bsys_alu #(.W(8)) dut (.a, .b, .cin, .cr, .cg, .cp, .r, .cout);

  task automatic check(input string what, input logic [8:0] got, input logic [8:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%02h b=%02h cin=%0b got=%03h exp=%03h", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      // add with carry
      cr = CR_SUM; cg = CG_ADD; cp = CP_ADD; #1;
      check("add", {cout, r}, 9'(a) + 9'(b) + 9'(cin));
      // subtract: a + ~b + cin, carry out = no borrow
      cr = CR_DIFF; cg = CG_SUB; cp = CP_SUB; #1;
      check("sub", {cout, r}, 9'(a) + 9'(8'(~b)) + 9'(cin));
      // move a, carry forced to one
      cr = CR_A; cg = CG_ONE; cp = CP_NONE; #1;
      check("mov", {cout, r}, {1'b1, a});
      // and / or / xor, carry passed through unchanged
      cr = CR_AND; cg = CG_ZERO; cp = CP_ALL; #1;
      check("and", {cout, r}, {cin, a & b});
      cr = CR_OR; #1;
      check("or", {cout, r}, {cin, a | b});
      cr = CR_XOR; cp = CP_NONE; #1;
      check("xor", {cout, r}, {1'b0, a ^ b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
