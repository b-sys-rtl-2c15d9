// tb_bsys_regbank: self-checking test of a 16 x 8 register bank.
// Random one-hot word selects with random writes; every read is compared with
// a plain array kept by the testbench. Also checks the cleared state after reset.
module tb_bsys_regbank;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] wl = '0;
  logic [7:0]  wdata = '0, rdata;
  logic [7:0]  mirror [16];
  int checks = 0, failures = 0;

  bsys_regbank #(.W(8), .NREGS(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    foreach (mirror[i]) mirror[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      wl = 16'(1) << i; #1;
      check("reset value", rdata, 0);
    end
    for (int n = 0; n < 4000; n++) begin
      int k;
      k = $urandom_range(15);
      @(negedge clk);
      wl = 16'(1) << k;
      we = 1'($urandom);
      wdata = 8'($urandom);
      #1 check("read", rdata, mirror[k]);
      @(posedge clk);
      if (we) mirror[k] = wdata;
    end
    @(negedge clk);
    we = 0; wl = '0; #1;
    check("no word selected", rdata, 0);
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
