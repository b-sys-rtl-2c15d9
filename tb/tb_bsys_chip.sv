// tb_bsys_chip: self-checking test of one B-SYS chip.
// 1. A value stream fed at the west end with "E0 <- W0" must leave the east end
//    NFU instructions later, and a stream fed at the east end with "W1 <- E1"
//    must leave the west end; both checked against the input sequence.
// 2. Random instructions (random sides, obey bits, flags and tables) with random
//    edge inputs, compared at both edges against the reference model.
// 3. Every register is then shifted out east and compared with the model.
// 4. Back-to-back instructions must take exactly three cycles each.
module tb_bsys_chip;
  import bsys_pkg::*;
  import bsys_ref_pkg::*;

  localparam int unsigned NFU = 47;

  logic clk = 0, rst_n = 0, init_n = 1;
  instr_t instr = '0;
  data_t  west_in = '0, east_in = '0, west_out, east_out;
  logic   west_in_wr = 0, east_in_wr = 0, west_out_wr, east_out_wr;
  logic   rdy, ca, cb, cri;
  int checks = 0, failures = 0, masked_out = 0;
  longint cycle = 0;

  bsys_chip #(.NFU(NFU), .ROW_FUS(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  bsys_ref model;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // Run one instruction; outputs are checked against the model in CRI.
  task automatic exec(input instr_t ins, input data_t win, input logic wwr,
                      input data_t ein, input logic ewr,
                      output data_t wo, output logic wo_wr, output data_t eo, output logic eo_wr);
    logic [7:0] m_wo, m_eo;
    logic       m_wwr, m_ewr;
    while (!rdy) @(negedge clk);
    instr = ins; init_n = 0;
    @(negedge clk);
    init_n = 1;
    west_in = win; west_in_wr = wwr; east_in = ein; east_in_wr = ewr;
    check("phase CA", ca, 1);
    @(negedge clk);
    check("phase CB", cb, 1);
    @(negedge clk);
    check("phase CRI", cri, 1);
    model.step(ins, win, wwr, ein, ewr, m_wo, m_wwr, m_eo, m_ewr);
    check("west_out_wr", west_out_wr, m_wwr);
    check("east_out_wr", east_out_wr, m_ewr);
    if (m_wwr) check("west_out", west_out, m_wo);
    if (m_ewr) check("east_out", east_out, m_eo);
    if (ins.obey && !(ins.r.west ? m_wwr : m_ewr)) masked_out++;
    wo = west_out; wo_wr = west_out_wr; eo = east_out; eo_wr = east_out_wr;
  endtask

  initial begin
    data_t  wo, eo;
    logic   wwr, ewr;
    data_t  sent [$];
    instr_t mv_e, mv_w;
    longint t0;

    model = new(NFU);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1a. eastward stream through all units
    mv_e = make_instr(CR_A, CG_ZERO, CP_NONE, west_reg(0), west_reg(0), east_reg(0), 3'd1, 3'd1, 1'b0);
    for (int k = 0; k < NFU + 20; k++) begin
      exec(mv_e, 8'(k * 7 + 3), 1'b1, 8'h00, 1'b0, wo, wwr, eo, ewr);
      check("east stream valid", ewr, 1);
      if (k >= NFU) check("east stream value", eo, 8'((k - NFU) * 7 + 3));
    end
    // 1b. westward stream through all units
    mv_w = make_instr(CR_A, CG_ZERO, CP_NONE, east_reg(1), east_reg(1), west_reg(1), 3'd1, 3'd1, 1'b0);
    for (int k = 0; k < NFU + 20; k++) begin
      exec(mv_w, 8'h00, 1'b0, 8'(k * 5 + 1), 1'b1, wo, wwr, eo, ewr);
      check("west stream valid", wwr, 1);
      if (k >= NFU) check("west stream value", wo, 8'((k - NFU) * 5 + 1));
    end

    // 2. random programs against the model, timed for throughput
    t0 = cycle;
    for (int k = 0; k < 600; k++)
      exec(random_instr(), 8'($urandom), 1'($urandom), 8'($urandom), 1'($urandom),
           wo, wwr, eo, ewr);
    check("cycles per instruction x600", cycle - t0, 3 * 600);

    // 3. shift every register out of the east end
    for (int r = 0; r < NREGS; r++) begin
      instr_t sh;
      sh = make_instr(CR_A, CG_ZERO, CP_NONE, west_reg(4'(r)), west_reg(4'(r)),
                      east_reg(4'(r)), 3'd1, 3'd1, 1'b0);
      for (int k = 0; k <= NFU; k++) exec(sh, 8'h00, 1'b1, 8'h00, 1'b0, wo, wwr, eo, ewr);
    end

    check("masked edge writes seen", masked_out > 0, 1);
    $display("masked edge writes: %0d", masked_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
