// tb_bsys_seqcmp: one-against-many sequence comparison on the full B-SYS board.
//
// The "one" DNA sequence s of 470 characters is streamed into register W3 of
// the 470 units, one character per unit. Target sequences then stream through
// from the west end, one column of the edit-distance table per step, and every
// unit computes its cell
//   D[i][j] = min(D[i-1][j-1] + (s_i != t_j), D[i-1][j] + 1, D[i][j-1] + 1)
// with 28 broadcast instructions per step. Distances exceed 8 bits, so they are
// kept as 16-bit register pairs, the carry passing between the halves through a
// flag. Registers (relative to each unit):
//   streams moving east: W0 target character, W1/W11 distance from the west
//     (low/high), W2 valid marker (bit 7), W9 start-of-sequence marker (bit 7)
//   local: W3 own character, W4/W12 own previous result, W5/W13 previous
//     distance from the west, W6/W14 X, W7/W15 Y, W10/W8 D-from-west + 1
//   flags: 0 context, 1 mismatch, 2 increment carry, 3 subtract carry,
//     6 constant 0, 7 constant 1.
// Instructions whose result is not needed rewrite their A register unchanged
// (result table "a"), so no scratch register is needed. A start column forces
// D[i][0] = i; units that hold no valid column yet are masked by the context
// flag. Each column's D[n][j] leaving the east end is compared with a
// dynamic-programming reference computed in the testbench.
module tb_bsys_seqcmp;
  import bsys_pkg::*;

  localparam int unsigned N    = 470;  // units of the default board
  localparam int unsigned NTGT = 2;

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

  int checks = 0, failures = 0, n_start = 0, n_masked_d = 0, n_valid_d = 0;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  typedef struct {
    instr_t i;
    data_t  win;
    logic   wwr;
    int     d_out;   // 1/2: the instruction sends distance low/high bytes east
  } job_t;

  job_t  pending [$];
  int    d_seen [$];
  data_t d_lo;

  always @(negedge clk) begin
    if (ca && pending.size() > 0) begin
      west_in = pending[0].win; west_in_wr = pending[0].wwr;
    end
    if (cri) begin
      job_t j;
      j = pending.pop_front();
      if (j.d_out == 1) begin
        if (east_out_wr) d_lo = east_out;
        else n_masked_d++;
      end
      if (j.d_out == 2 && east_out_wr) begin
        d_seen.push_back({east_out, d_lo});
        n_valid_d++;
      end
    end
  end

  logic [15:0] last_w0 = '0, last_w1 = '0;

  task automatic host_write(input logic [1:0] a, input logic [15:0] d);
    io_wr = 1; io_addr = a; io_wdata = d;
    @(negedge clk);
    io_wr = 0;
  endtask

  task automatic send(input instr_t i, input data_t win = '0, input logic wwr = 1'b0,
                      input int d_out = 0);
    logic [47:0] w;
    job_t j;
    w = 48'(i);
    if (w[15:0] != last_w0)  host_write(2'd0, w[15:0]);
    if (w[31:16] != last_w1) host_write(2'd1, w[31:16]);
    last_w0 = w[15:0];
    last_w1 = w[31:16];
    while (busy) @(negedge clk);
    j.i = i; j.win = win; j.wwr = wwr; j.d_out = d_out;
    pending.push_back(j);
    host_write(2'd2, w[47:32]);
  endtask

  localparam logic [7:0] CR_INC  = 8'b0101_1010;  // a ^ carry
  localparam logic [3:0] CP_A    = 4'b1100;       // propagate where a = 1
  localparam logic [3:0] CG_A    = 4'b1100;       // carry out = a[7]
  localparam logic [3:0] CG_NE   = 4'b0110;       // generate where a != b
  localparam logic [3:0] CP_EQ   = 4'b1001;       // propagate where a == b

  function automatic instr_t I(input logic [7:0] cr, input logic [3:0] cg, input logic [3:0] cp,
                               input regaddr_t a, input regaddr_t b, input regaddr_t r,
                               input int c, input int z, input bit obey);
    return make_instr(cr, cg, cp, a, b, r, 3'(c), 3'(z), obey);
  endfunction

  function automatic instr_t mov(input regaddr_t a, input regaddr_t r, input bit obey);
    return I(CR_A, CG_ZERO, CP_NONE, a, a, r, 1, 1, obey);
  endfunction

  // Column stream: distance, character, valid, start.
  typedef struct { logic [15:0] d; data_t t, v, st; } col_t;
  col_t cols [$];

  byte s [N];
  byte tg [NTGT][$];
  int  expd [$];

  function automatic byte base();
    case ($urandom_range(3)) 0: return "A"; 1: return "C"; 2: return "G"; default: return "T";
    endcase
  endfunction

  // Unit-cost edit distance, row by row over the target; appends D[N][j] for
  // every column j of target g (j = 0 included) to expd.
  task automatic ref_last_row(input int g);
    int prev [], cur [];
    prev = new[N + 1];
    cur  = new[N + 1];
    for (int i = 0; i <= N; i++) prev[i] = i;
    expd.push_back(int'(N));
    for (int j = 1; j <= tg[g].size(); j++) begin
      cur[0] = j;
      for (int i = 1; i <= N; i++) begin
        int best;
        best = prev[i-1] + ((s[i-1] != tg[g][j-1]) ? 1 : 0);
        if (prev[i] + 1 < best) best = prev[i] + 1;
        if (cur[i-1] + 1 < best) best = cur[i-1] + 1;
        cur[i] = best;
      end
      for (int i = 0; i <= N; i++) prev[i] = cur[i];
      expd.push_back(cur[N]);
    end
  endtask

  initial begin
    instr_t step [28];
    int p;

    // sequences: targets are mutated copies of parts of s
    foreach (s[k]) s[k] = base();
    // target 0: a 470-character copy of s with about one character in eight
    // substituted, deleted or inserted; target 1: 150 random characters
    for (int k = 0; k < N; k++) begin
      int u;
      u = $urandom_range(23);
      if (u == 0) continue;                      // deletion
      if (u == 1) tg[0].push_back(base());       // insertion
      tg[0].push_back(u == 2 ? base() : s[k]);   // substitution or copy
    end
    for (int k = 0; k < 150; k++) tg[1].push_back(base());
    // reference: last row of the edit-distance table, column by column
    for (int g = 0; g < NTGT; g++) ref_last_row(g);
    // column stream
    for (int g = 0; g < NTGT; g++) begin
      cols.push_back('{d: 16'd0, t: "N", v: 8'h80, st: 8'h80});
      for (int j = 1; j <= tg[g].size(); j++)
        cols.push_back('{d: 16'(j), t: tg[g][j-1], v: 8'h80, st: 8'h00});
    end
    repeat (N + 1) cols.push_back('{d: 16'd0, t: "N", v: 8'h00, st: 8'h00});

    // the per-column program
    p = 0;
    // flag1 <- (S != T), S rewritten unchanged
    step[p++] = I(CR_A, CG_NE, CP_EQ, west_reg(3), west_reg(0), west_reg(3), 6, 1, 0);
    // X <- Q + mismatch
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(5),  west_reg(5),  west_reg(6),  1, 2, 0);
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(13), west_reg(13), west_reg(14), 2, 2, 0);
    // Yd <- D from west + 1
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(1),  west_reg(1),  west_reg(10), 7, 2, 0);
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(11), west_reg(11), west_reg(8),  2, 2, 0);
    // X <- min(X, Yd)
    step[p++] = I(CR_A, CG_SUB, CP_SUB, west_reg(6),  west_reg(10), west_reg(6),  7, 3, 0);
    step[p++] = I(CR_A, CG_SUB, CP_SUB, west_reg(14), west_reg(8),  west_reg(14), 3, 0, 0);
    step[p++] = mov(west_reg(10), west_reg(6), 1);
    step[p++] = mov(west_reg(8),  west_reg(14), 1);
    // Y <- P + 1
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(4),  west_reg(4),  west_reg(7),  7, 2, 0);
    step[p++] = I(CR_INC, CG_ZERO, CP_A, west_reg(12), west_reg(12), west_reg(15), 2, 2, 0);
    // X <- min(X, Y)
    step[p++] = I(CR_A, CG_SUB, CP_SUB, west_reg(6),  west_reg(7),  west_reg(6),  7, 3, 0);
    step[p++] = I(CR_A, CG_SUB, CP_SUB, west_reg(14), west_reg(15), west_reg(14), 3, 0, 0);
    step[p++] = mov(west_reg(7),  west_reg(6), 1);
    step[p++] = mov(west_reg(15), west_reg(14), 1);
    // start column: X <- Yd
    step[p++] = I(CR_A, CG_A, CP_NONE, west_reg(9), west_reg(9), west_reg(9), 6, 0, 0);
    step[p++] = mov(west_reg(10), west_reg(6), 1);
    step[p++] = mov(west_reg(8),  west_reg(14), 1);
    // valid column: Q <- D from west, P <- X, send X east
    step[p++] = I(CR_A, CG_A, CP_NONE, west_reg(2), west_reg(2), west_reg(2), 6, 0, 0);
    step[p++] = mov(west_reg(1),  west_reg(5), 1);
    step[p++] = mov(west_reg(11), west_reg(13), 1);
    step[p++] = mov(west_reg(6),  west_reg(4), 1);
    step[p++] = mov(west_reg(14), west_reg(12), 1);
    if (p != 23) $fatal(1, "program length");
    step[23] = mov(west_reg(6),  east_reg(1), 1);
    step[24] = mov(west_reg(14), east_reg(11), 1);
    step[25] = mov(west_reg(0),  east_reg(0), 0);
    step[26] = mov(west_reg(2),  east_reg(2), 0);
    step[27] = mov(west_reg(9),  east_reg(9), 0);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // constants: flag 7 <- 1, flag 6 <- 0
    send(I(CR_A, CG_ONE,  CP_NONE, west_reg(3), west_reg(3), west_reg(3), 0, 7, 0));
    send(I(CR_A, CG_ZERO, CP_NONE, west_reg(3), west_reg(3), west_reg(3), 0, 6, 0));
    // load s: after N shifts unit i holds s[i]
    for (int k = 0; k < N; k++) send(mov(west_reg(3), east_reg(3), 0), s[N-1-k], 1'b1);

    // stream the columns
    foreach (cols[c]) begin
      if (cols[c].st[7]) n_start++;
      for (int k = 0; k < 23; k++) send(step[k]);
      send(step[23], cols[c].d[7:0],  1'b1, 1);
      send(step[24], cols[c].d[15:8], 1'b1, 2);
      send(step[25], cols[c].t,  1'b1);
      send(step[26], cols[c].v,  1'b1);
      send(step[27], cols[c].st, 1'b1);
    end
    while (pending.size() > 0) @(negedge clk);

    check("distances leaving east", d_seen.size(), expd.size());
    for (int k = 0; k < expd.size() && k < d_seen.size(); k++)
      check("D[n][j]", d_seen[k], expd[k]);
    begin
      int k = 0;
      for (int g = 0; g < NTGT; g++) begin
        k += tg[g].size() + 1;
        $display("target %0d (%0d chars): edit distance %0d, array %0d", g, tg[g].size(),
                 expd[k-1], (k-1 < d_seen.size()) ? int'(d_seen[k-1]) : -1);
      end
    end
    $display("start columns=%0d valid D outputs=%0d masked D outputs=%0d",
             n_start, n_valid_d, n_masked_d);
    check("start columns seen", n_start, NTGT);
    check("masked outputs seen", n_masked_d > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
