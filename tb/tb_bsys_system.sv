// tb_bsys_system: end-to-end test of the whole board at its default size
// (10 chips x 47 units = 470 processors), driven only through the host I/O
// port and the two stream ends.
//
// Every instruction is written as three 16-bit host words; the edge outputs of
// every instruction are compared with the reference model. The program:
//  1. streams two operand vectors in from the west end (E0 <- W0, E1 <- W1),
//  2. computes E2 <- min(W0, W1) in every unit: a subtract sets the context flag
//     from the carry, then E2 <- W0 unconditionally and E2 <- W1 under context,
//  3. streams the minima out of the east end and checks them against minima
//     computed directly from the input vectors,
//  4. streams a vector westward and checks it at the west end,
//  5. runs random instructions against the model.
// Mechanisms counted (each must occur): eastward and westward crossings of all
// chip boundaries, context-masked edge writes, host stalls on busy, and
// instructions issued while the previous one was still in its write phase.
// The host writes one word per cycle and skips words the board still holds.
module tb_bsys_system;
  import bsys_pkg::*;
  import bsys_ref_pkg::*;

  localparam int unsigned N = 470;   // units in the default array

  logic clk = 0, rst_n = 0;
  logic io_wr = 0;
  logic [1:0]  io_addr = '0;
  logic [15:0] io_wdata = '0;
  logic busy;
  data_t west_in = '0, east_in = '0, west_out, east_out;
  logic  west_in_wr = 0, east_in_wr = 0, west_out_wr, east_out_wr;
  logic  rdy, ca, cb, cri;

  bsys_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_masked = 0, n_stall = 0, n_b2b = 0, n_east_cross = 0, n_west_cross = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  typedef struct {
    instr_t i;
    data_t  win, ein;
    logic   wwr, ewr;
  } job_t;

  job_t   pending [$];     // written by the host, not yet finished
  data_t  east_seen [$];   // values that left the east end
  data_t  west_seen [$];   // values that left the west end
  bsys_ref model;

  // Instruction monitor: edge inputs are presented from CA to the end of CRI,
  // outputs are compared with the model in CRI.
  logic cri_q = 0;
  always @(negedge clk) begin
    if (ca && pending.size() > 0) begin
      west_in = pending[0].win; west_in_wr = pending[0].wwr;
      east_in = pending[0].ein; east_in_wr = pending[0].ewr;
      if (cri_q) n_b2b++;
    end
    if (cri) begin
      job_t j;
      logic [7:0] m_wo, m_eo;
      logic       m_wwr, m_ewr;
      j = pending.pop_front();
      model.step(j.i, j.win, j.wwr, j.ein, j.ewr, m_wo, m_wwr, m_eo, m_ewr);
      check("west_out_wr", west_out_wr, m_wwr);
      check("east_out_wr", east_out_wr, m_ewr);
      if (m_wwr) begin check("west_out", west_out, m_wo); west_seen.push_back(west_out); end
      if (m_ewr) begin check("east_out", east_out, m_eo); east_seen.push_back(east_out); end
      if (j.i.obey && !(j.i.r.west ? m_wwr : m_ewr)) n_masked++;
    end
    cri_q = cri;
  end

  // One host write per cycle; called at a falling edge.
  task automatic host_write(input logic [1:0] a, input logic [15:0] d);
    io_wr = 1; io_addr = a; io_wdata = d;
    @(negedge clk);
    io_wr = 0;
  endtask

  // The board keeps the first two words, so the host skips unchanged ones.
  logic [15:0] last_w0 = '0, last_w1 = '0;

  task automatic send(input instr_t i, input data_t win = '0, input logic wwr = 1'b0,
                      input data_t ein = '0, input logic ewr = 1'b0);
    logic [47:0] w;
    job_t j;
    w = 48'(i);
    if (w[15:0] != last_w0)  host_write(2'd0, w[15:0]);
    if (w[31:16] != last_w1) host_write(2'd1, w[31:16]);
    last_w0 = w[15:0];
    last_w1 = w[31:16];
    while (busy) begin n_stall++; @(negedge clk); end
    j.i = i; j.win = win; j.wwr = wwr; j.ein = ein; j.ewr = ewr;
    pending.push_back(j);
    host_write(2'd2, w[47:32]);
  endtask

  task automatic drain();
    while (pending.size() > 0) @(negedge clk);
  endtask

  instr_t mov_e [3], mov_w1, set_one, cmp, min_a, min_b;
  data_t  v0 [N], v1 [N], vw [N + 5];

  initial begin
    model = new(N);
    for (int k = 0; k < 3; k++)
      mov_e[k] = make_instr(CR_A, CG_ZERO, CP_NONE, west_reg(4'(k)), west_reg(4'(k)),
                            east_reg(4'(k)), 3'd1, 3'd1, 1'b0);
    mov_w1  = make_instr(CR_A, CG_ZERO, CP_NONE, east_reg(5), east_reg(5), west_reg(5),
                         3'd1, 3'd1, 1'b0);
    // flag 7 <- 1 (carry forced), result to scratch W15
    set_one = make_instr(CR_ZERO, CG_ONE, CP_NONE, west_reg(15), west_reg(15), west_reg(15),
                         3'd0, 3'd7, 1'b0);
    // context flag <- carry of W0 - W1 (1 when W0 >= W1), result to scratch W14
    cmp     = make_instr(CR_DIFF, CG_SUB, CP_SUB, west_reg(0), west_reg(1), west_reg(14),
                         3'd7, 3'(CONTEXT_FLAG), 1'b0);
    min_a   = make_instr(CR_A, CG_ZERO, CP_NONE, west_reg(0), west_reg(0), east_reg(2),
                         3'd1, 3'd1, 1'b0);
    min_b   = make_instr(CR_A, CG_ZERO, CP_NONE, west_reg(1), west_reg(1), east_reg(2),
                         3'd1, 3'd1, 1'b1);
    foreach (v0[k]) begin v0[k] = 8'($urandom); v1[k] = 8'($urandom); end
    foreach (vw[k]) vw[k] = 8'($urandom);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. load the operand vectors: after N steps bank j holds v[N-1-j]
    for (int k = 0; k < N; k++) send(mov_e[0], v0[k], 1'b1);
    for (int k = 0; k < N; k++) send(mov_e[1], v1[k], 1'b1);
    drain();
    east_seen.delete();
    // 2. minimum in every unit: unit f writes bank f+1 from bank f
    send(set_one);
    send(cmp);
    send(min_a);
    send(min_b);
    drain();
    east_seen.delete();
    // 3. stream the minima out east; output k is unit N-1-k's, built from v[k+1]
    for (int k = 0; k < N; k++) send(mov_e[2], 8'h00, 1'b1);
    drain();
    check("minima leaving east", east_seen.size(), N);
    for (int k = 0; k + 1 < N && k < east_seen.size(); k++)
      check("min(W0,W1)", east_seen[k], (v0[k+1] < v1[k+1]) ? v0[k+1] : v1[k+1]);
    n_east_cross += east_seen.size();
    // 4. westward stream through all chips
    west_seen.delete();
    for (int k = 0; k < N + 5; k++) send(mov_w1, 8'h00, 1'b0, vw[k], 1'b1);
    drain();
    for (int k = N; k < N + 5; k++)
      check("westward stream", west_seen[k], vw[k - N]);
    n_west_cross += west_seen.size() - N;
    // 5. random instructions
    for (int k = 0; k < 800; k++)
      send(random_instr(), 8'($urandom), 1'($urandom), 8'($urandom), 1'($urandom));
    drain();

    $display("mechanisms: east-out=%0d west-through=%0d masked=%0d stalls=%0d back-to-back=%0d",
             n_east_cross, n_west_cross, n_masked, n_stall, n_b2b);
    check("eastward transfer seen", n_east_cross > 0, 1);
    check("westward transfer seen", n_west_cross > 0, 1);
    check("context masking seen", n_masked > 0, 1);
    check("host stall seen", n_stall > 0, 1);
    check("back-to-back issue seen", n_b2b > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
