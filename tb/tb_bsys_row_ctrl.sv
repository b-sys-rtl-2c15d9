// tb_bsys_row_ctrl: self-checking test of a row's control circuitry.
// Random instructions are started and the pins are then scrambled; in each
// phase the register word line must select A, B and then R (with that address's
// side), the flag line must select C in CB and Z in CRI, and the function bits
// must be those of the captured instruction.
module tb_bsys_row_ctrl;
  import bsys_pkg::*;

  logic clk = 0, rst_n = 0, init_n = 1;
  instr_t instr = '0;
  logic rdy, ca, cb, cri, side_west, obey;
  logic [NREGS-1:0]  reg_wl;
  logic [NFLAGS-1:0] flag_sel;
  logic [7:0] fn_cr;
  logic [3:0] fn_cg, fn_cp;
  int checks = 0, failures = 0;

  bsys_row_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic check_fn(input instr_t i);
    check("cr", fn_cr, i.cr);
    check("cg", fn_cg, i.cg);
    check("cp", fn_cp, i.cp);
    check("obey", obey, i.obey);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle word line", reg_wl, 0);
    check("idle rdy", rdy, 1);
    for (int n = 0; n < 1000; n++) begin
      instr_t i;
      i = instr_t'({$urandom, $urandom});
      instr = i; init_n = 0;
      @(negedge clk);
      init_n = 1; instr = instr_t'({$urandom, $urandom});
      check("CA", ca, 1);
      check("CA word", reg_wl, NREGS'(1) << i.a.num);
      check("CA side", side_west, i.a.west);
      check("CA rdy", rdy, 0);
      check_fn(i);
      @(negedge clk);
      check("CB", cb, 1);
      check("CB word", reg_wl, NREGS'(1) << i.b.num);
      check("CB side", side_west, i.b.west);
      check("CB flag", flag_sel, NFLAGS'(1) << i.c);
      check_fn(i);
      @(negedge clk);
      check("CRI", cri, 1);
      check("CRI word", reg_wl, NREGS'(1) << i.r.num);
      check("CRI side", side_west, i.r.west);
      check("CRI flag", flag_sel, NFLAGS'(1) << i.z);
      check("CRI rdy", rdy, 1);
      check_fn(i);
      if (n % 2) @(negedge clk);  // idle gap every other instruction
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
