// bsys_row_ctrl: the control circuitry of one row of a B-SYS chip.
//
// As in the original chip, each row has its own control: an FSA that
// generates the phase signals, a 4:16 decoder for the register banks and a 3:8
// decoder for the flags, plus row buffers for the 16 function bits (CR, CG, CP)
// of the instruction. Here the whole instruction is captured in a row register
// when the FSA accepts init (capturing it is this design's choice; it lets the
// host change the pins during execution). Then, phase by phase, one register
// decoder serves A (CA), B (CB) and R (CRI), and one flag decoder serves the
// carry-in flag C (CB, latched by the units with operand B) and the Z flag
// (CRI). side_west tells the units which bank the current phase uses.
// Every row receives the same pins, so all rows of a chip run in lock step.
module bsys_row_ctrl
  import bsys_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init_n,
  input  instr_t              instr,
  output logic                rdy,
  output logic                ca,
  output logic                cb,
  output logic                cri,
  output logic [NREGS-1:0]    reg_wl,     // one-hot register word line
  output logic                side_west,  // current phase uses the west bank
  output logic [NFLAGS-1:0]   flag_sel,   // one-hot flag line (C in CB, Z in CRI)
  output logic [7:0]          fn_cr,
  output logic [3:0]          fn_cg,
  output logic [3:0]          fn_cp,
  output logic                obey
);

  phase_e phase;
  logic   load;
  instr_t ir_q;
  regaddr_t cur;
  logic [2:0] flag_addr;

  bsys_fsa u_fsa (
    .clk, .rst_n, .init_n,
    .phase, .load, .rdy, .ca, .cb, .cri
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ir_q <= '0;
    else if (load) ir_q <= instr;
  end

  always_comb begin
    unique case (phase)
      PH_CA:   cur = ir_q.a;
      PH_CB:   cur = ir_q.b;
      default: cur = ir_q.r;
    endcase
    flag_addr = (phase == PH_CRI) ? ir_q.z : ir_q.c;
  end

  assign side_west = cur.west;

  bsys_decoder #(.N(4)) u_reg_dec (
    .sel(cur.num), .en(phase != PH_IDLE), .onehot(reg_wl)
  );

  bsys_decoder #(.N(3)) u_flag_dec (
    .sel(flag_addr), .en(phase == PH_CB || phase == PH_CRI), .onehot(flag_sel)
  );

  assign fn_cr = ir_q.cr;
  assign fn_cg = ir_q.cg;
  assign fn_cp = ir_q.cp;
  assign obey  = ir_q.obey;

endmodule
