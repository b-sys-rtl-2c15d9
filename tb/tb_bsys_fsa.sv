// tb_bsys_fsa: self-checking test of the phase automaton.
// Random init strobes; a cycle-level expectation (idle, CA, CB, CRI, with init
// accepted only in idle or CRI) is kept by the testbench and compared each cycle.
// Also checks that back-to-back instructions take three cycles each.
module tb_bsys_fsa;
  import bsys_pkg::*;

  logic clk = 0, rst_n = 0, init_n = 1;
  phase_e phase;
  logic load, rdy, ca, cb, cri;
  int checks = 0, failures = 0, started = 0, b2b = 0;
  int exp_state = 0;   // 0 idle, 1 CA, 2 CB, 3 CRI

  bsys_fsa dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      init_n = (n > 2000) ? 1'b0 : 1'($urandom_range(3) != 0);
      #1;
      check("phase", int'(phase), exp_state);
      check("ca",  ca,  exp_state == 1);
      check("cb",  cb,  exp_state == 2);
      check("cri", cri, exp_state == 3);
      check("rdy", rdy, exp_state == 0 || exp_state == 3);
      check("load", load, (exp_state == 0 || exp_state == 3) && !init_n);
      @(posedge clk);
      case (exp_state)
        0: if (!init_n) begin exp_state = 1; started++; end
        1: exp_state = 2;
        2: exp_state = 3;
        3: if (!init_n) begin exp_state = 1; started++; b2b++; end else exp_state = 0;
        default: ;
      endcase
    end
    // with init held low the automaton must start one instruction per 3 cycles
    begin
      int s0, dut_ca;
      s0 = started; dut_ca = 0;
      repeat (300) begin
        @(posedge clk);
        if (ca) dut_ca++;
        case (exp_state)
          0, 3: begin exp_state = 1; started++; end
          1: exp_state = 2;
          2: exp_state = 3;
          default: ;
        endcase
      end
      check("model starts in 300 cycles", started - s0, 100);
      check("CA phases in 300 cycles", dut_ca, 100);
    end
    check("back-to-back starts seen", b2b > 0, 1);
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
