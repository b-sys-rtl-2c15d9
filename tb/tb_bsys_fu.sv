// tb_bsys_fu: self-checking test of one functional unit driven phase by phase.
// Each random case loads A and B from the west or east bank input, latches a
// carry flag, runs an add or subtract and checks the result, the side of the
// write enable, the carry written to the Z flag and the context masking.
module tb_bsys_fu;
  import bsys_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ca = 0, cb = 0, cri = 0, side_west = 0, obey = 0;
  logic [NFLAGS-1:0] flag_sel = '0, flags;
  logic [7:0] fn_cr = '0;
  logic [3:0] fn_cg = '0, fn_cp = '0;
  data_t rd_west = '0, rd_east = '0, result;
  logic  we_west, we_east;
  int checks = 0, failures = 0, masked = 0;

  bsys_fu dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  logic [NFLAGS-1:0] exp_flags = '0;

  // One instruction: A from side sa, B from side sb, carry from flag c,
  // result to side sr, carry out to flag z.
  task automatic op(input bit sub, input bit sa, input bit sb, input bit sr,
                    input int c, input int z, input bit ob);
    data_t a, b;
    logic [8:0] sum;
    bit en;
    a = 8'($urandom);
    b = 8'($urandom);
    fn_cr = sub ? CR_DIFF : CR_SUM;
    fn_cg = sub ? CG_SUB : CG_ADD;
    fn_cp = sub ? CP_SUB : CP_ADD;
    obey = ob;
    // CA
    ca = 1; side_west = sa; flag_sel = '0;
    rd_west = sa ? a : 8'($urandom); rd_east = sa ? 8'($urandom) : a;
    @(negedge clk); ca = 0;
    // CB
    cb = 1; side_west = sb; flag_sel = NFLAGS'(1) << c;
    rd_west = sb ? b : 8'($urandom); rd_east = sb ? 8'($urandom) : b;
    @(negedge clk); cb = 0;
    // CRI
    cri = 1; side_west = sr; flag_sel = NFLAGS'(1) << z;
    rd_west = 8'($urandom); rd_east = 8'($urandom);
    sum = sub ? 9'(a) + 9'(8'(~b)) + 9'(exp_flags[c]) : 9'(a) + 9'(b) + 9'(exp_flags[c]);
    en = !ob || exp_flags[CONTEXT_FLAG];
    #1;
    check("result", result, sum[7:0]);
    check("we_west", we_west, en && sr);
    check("we_east", we_east, en && !sr);
    if (!en) masked++;
    @(negedge clk); cri = 0; flag_sel = '0;
    if (en) exp_flags[z] = sum[8];
    check("flags", flags, exp_flags);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("flags after reset", flags, 0);
    for (int n = 0; n < 3000; n++)
      op(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom),
         $urandom_range(NFLAGS-1), $urandom_range(NFLAGS-1), 1'($urandom));
    check("masked cases seen", masked > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
