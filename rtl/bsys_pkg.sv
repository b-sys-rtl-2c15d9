// bsys_pkg: shared types and constants of the B-SYS programmable systolic array.
//
// The 38-bit broadcast instruction holds, from bit 0 up: the context-obey
// bit "!" (bit 0), the 8-bit result function CR (bits 8:1), register
// addresses A (13:9), B (18:14) and R (23:19), the 4-bit
// generate and propagate functions CG (27:24) and CP (31:28), and the 3-bit flag
// addresses C (34:32) and Z (37:35). The field order and positions follow the
// original design. Inside a 5-bit register address, the placement of the bank-side bit
// is this design's choice: bit 4 is the "L" bit (1 = west/left bank, 0 = east
// bank, after the AL/BL/XL pin names), bits 3:0 the register number.
// The truth-table index conventions ({a,b,c} for CR, {a,b} for CG/CP) are also
// this design's choice; the constants below are common operations encoded with them.
package bsys_pkg;

  localparam int unsigned DATA_W  = 8;   // functional unit and register width
  localparam int unsigned NREGS   = 16;  // words per register bank
  localparam int unsigned NFLAGS  = 8;   // flags per functional unit
  localparam int unsigned INSTR_W = 38;  // instruction word width
  localparam int unsigned CONTEXT_FLAG = 0; // flag that gates "!" instructions (assumed)

  typedef logic [DATA_W-1:0] data_t;

  // 5-bit register address: side bit and register number.
  typedef struct packed {
    logic       west;   // 1: bank to the west (left), 0: bank to the east
    logic [3:0] num;    // register number within the bank
  } regaddr_t;

  // Instruction word; first member is the most significant (bit 37).
  typedef struct packed {
    logic [2:0] z;      // 37:35 flag written with the ALU Z output (carry out)
    logic [2:0] c;      // 34:32 flag read as carry in
    logic [3:0] cp;     // 31:28 propagate function of (a,b)
    logic [3:0] cg;     // 27:24 generate function of (a,b)
    regaddr_t   r;      // 23:19 result register
    regaddr_t   b;      // 18:14 operand B register
    regaddr_t   a;      // 13:9  operand A register
    logic [7:0] cr;     // 8:1   result function of (a,b,carry)
    logic       obey;   // 0     "!": obey the context flag
  } instr_t;

  // Execution phases of one instruction.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_CA   = 2'd1,   // read operand A (and nothing else)
    PH_CB   = 2'd2,   // read operand B and the carry-in flag
    PH_CRI  = 2'd3    // evaluate, write result register and Z flag
  } phase_e;

  // Function tables. CR is indexed by {a,b,c}, CG/CP by {a,b}.
  localparam logic [7:0] CR_SUM   = 8'b1001_0110; // a ^ b ^ c
  localparam logic [7:0] CR_DIFF  = 8'b0110_1001; // a ^ ~b ^ c
  localparam logic [7:0] CR_A     = 8'b1111_0000; // a
  localparam logic [7:0] CR_B     = 8'b1100_1100; // b
  localparam logic [7:0] CR_AND   = 8'b1100_0000; // a & b
  localparam logic [7:0] CR_OR    = 8'b1111_1100; // a | b
  localparam logic [7:0] CR_XOR   = 8'b0011_1100; // a ^ b
  localparam logic [7:0] CR_ZERO  = 8'b0000_0000;
  localparam logic [7:0] CR_ONES  = 8'b1111_1111;
  localparam logic [3:0] CG_ADD   = 4'b1000;      // a & b
  localparam logic [3:0] CP_ADD   = 4'b0110;      // a ^ b
  localparam logic [3:0] CG_SUB   = 4'b0100;      // a & ~b
  localparam logic [3:0] CP_SUB   = 4'b1001;      // ~(a ^ b)
  localparam logic [3:0] CG_ONE   = 4'b1111;      // carry out forced to 1
  localparam logic [3:0] CG_ZERO  = 4'b0000;
  localparam logic [3:0] CP_NONE  = 4'b0000;      // no propagation
  localparam logic [3:0] CP_ALL   = 4'b1111;      // carry in passes to carry out

  function automatic regaddr_t west_reg(input logic [3:0] n);
    return '{west: 1'b1, num: n};
  endfunction

  function automatic regaddr_t east_reg(input logic [3:0] n);
    return '{west: 1'b0, num: n};
  endfunction

  // Assemble an instruction.
  function automatic instr_t make_instr(input logic [7:0] cr, input logic [3:0] cg,
                                        input logic [3:0] cp, input regaddr_t a,
                                        input regaddr_t b, input regaddr_t r,
                                        input logic [2:0] c, input logic [2:0] z,
                                        input logic obey);
    instr_t i;
    i.cr = cr; i.cg = cg; i.cp = cp;
    i.a = a; i.b = b; i.r = r;
    i.c = c; i.z = z; i.obey = obey;
    return i;
  endfunction

endpackage
