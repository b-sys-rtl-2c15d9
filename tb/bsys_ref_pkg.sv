// bsys_ref_pkg: instruction-level reference model of a linear B-SYS array,
// used by the testbenches. It keeps every register bank and flag as plain
// arrays and executes one broadcast instruction at a time: all units first
// read their operands and compute, then all writes are applied. The ALU is
// modelled bit by bit from the function tables (generate/propagate steer the
// carry, the result table sees a, b and the incoming carry). A chain of chips
// behaves exactly like one long array, so the same model serves a chip, the
// array and the whole board.
package bsys_ref_pkg;
  import bsys_pkg::*;

  class bsys_ref;
    int unsigned n;               // number of functional units
    logic [7:0]  bank [][NREGS];  // n+1 banks; bank f is west of unit f
    logic [7:0]  flg  [];         // flags of each unit

    function new(int unsigned nfu);
      n = nfu;
      bank = new[n + 1];
      flg  = new[n];
      foreach (bank[j]) foreach (bank[j][k]) bank[j][k] = '0;
      foreach (flg[f]) flg[f] = '0;
    endfunction

    static function void alu(input logic [7:0] a, input logic [7:0] b, input logic cin,
                             input instr_t i, output logic [7:0] r, output logic cout);
      logic c;
      int unsigned ab, abc;
      c = cin;
      for (int k = 0; k < 8; k++) begin
        ab  = {a[k], b[k]};
        abc = {a[k], b[k], c};
        r[k] = i.cr[abc];
        if (!i.cp[ab]) c = i.cg[ab];
      end
      cout = c;
    endfunction

    function logic [7:0] rd(int unsigned f, regaddr_t ra);
      return ra.west ? bank[f][ra.num] : bank[f+1][ra.num];
    endfunction

    // Execute one instruction; returns what leaves each end of the array.
    function void step(input instr_t i,
                       input logic [7:0] win, input logic win_wr,
                       input logic [7:0] ein, input logic ein_wr,
                       output logic [7:0] wout, output logic wout_wr,
                       output logic [7:0] eout, output logic eout_wr);
      logic [7:0] res [];
      logic       co  [];
      logic       en  [];
      res = new[n]; co = new[n]; en = new[n];
      for (int unsigned f = 0; f < n; f++) begin
        alu(rd(f, i.a), rd(f, i.b), flg[f][i.c], i, res[f], co[f]);
        en[f] = !i.obey || flg[f][CONTEXT_FLAG];
      end
      wout = res[0];   wout_wr = i.r.west && en[0];
      eout = res[n-1]; eout_wr = !i.r.west && en[n-1];
      for (int unsigned f = 0; f < n; f++) begin
        if (en[f]) begin
          if (i.r.west) bank[f][i.r.num]   = res[f];
          else          bank[f+1][i.r.num] = res[f];
          flg[f][i.z] = co[f];
        end
      end
      if (!i.r.west && win_wr) bank[0][i.r.num] = win;
      if (i.r.west && ein_wr)  bank[n][i.r.num] = ein;
    endfunction
  endclass

  // A random instruction drawn from useful operations and random tables.
  function automatic instr_t random_instr();
    instr_t i;
    int unsigned kind;
    i = instr_t'({$urandom, $urandom});
    kind = $urandom_range(5);
    unique case (kind)
      0: begin i.cr = CR_SUM;  i.cg = CG_ADD; i.cp = CP_ADD; end
      1: begin i.cr = CR_DIFF; i.cg = CG_SUB; i.cp = CP_SUB; end
      2: begin i.cr = CR_A;    i.cg = 4'($urandom); i.cp = 4'($urandom); end
      3: begin i.cr = CR_B;    i.cg = CG_ONE; i.cp = CP_NONE; end
      default: ;
    endcase
    return i;
  endfunction

endpackage
