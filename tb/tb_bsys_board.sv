// tb_bsys_board: self-checking test of the host instruction buffer.
// The host writes random instructions as three 16-bit words; the array's rdy is
// toggled at random. Each instruction must appear on instr exactly once, with
// init_n low for one cycle and only while rdy is high, in order; busy must be
// high from the third word until the instruction is issued.
module tb_bsys_board;
  import bsys_pkg::*;

  logic clk = 0, rst_n = 0, io_wr = 0, arr_rdy = 0;
  logic [1:0]  io_addr = '0;
  logic [15:0] io_wdata = '0;
  logic busy, init_n;
  instr_t instr;
  int checks = 0, failures = 0, stalls = 0, issued = 0;
  instr_t sent [$];

  bsys_board dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  // random array readiness
  always @(negedge clk) arr_rdy <= rst_n && ($urandom_range(3) == 0);

  // issue monitor
  always @(posedge clk) if (rst_n) begin
    if (!init_n) begin
      check("init only when ready", arr_rdy, 1);
      check("instruction sent", sent.size() > 0, 1);
      if (sent.size() > 0) check("instruction", instr, sent.pop_front());
      issued++;
    end
  end

  task automatic io(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk);
    io_wr = 1; io_addr = a; io_wdata = d;
    @(negedge clk);
    io_wr = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [47:0] w;
      instr_t i;
      w = {$urandom, $urandom};
      i = instr_t'(w[37:0]);
      io(2'd0, w[15:0]);
      io(2'd1, w[31:16]);
      io(2'd3, 16'($urandom));              // ignored address
      @(negedge clk);
      while (busy) begin stalls++; @(negedge clk); end
      sent.push_back(i);
      io(2'd2, {10'($urandom), w[37:32]});
      #1 check("busy after third word", busy || issued > 0, 1);
    end
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    check("all issued", issued, 500);
    check("stalls seen", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
