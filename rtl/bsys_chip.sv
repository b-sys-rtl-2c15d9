// bsys_chip: one B-SYS chip, a 47-element slice of the linear SSR array.
//
// The chip holds NFU functional units, each with the register bank to its west,
// plus one more bank to the east of the last unit. That extra bank is a shadow
// copy of the first bank of the next chip, so operands are always read on chip.
// Units are grouped in rows of ROW_FUS (8, as on the floor-plan), each row with
// its own control; all rows see the same instruction pins and run in lock step.
//
// Data movement between chips follows the original chip: when an instruction writes
// its result to the east, the last unit writes the shadow bank and the same
// value leaves on east_out, while the first bank (west of unit 1) is written
// from west_in. Writing to the west is the mirror image (first unit writes
// bank 0 and drives west_out; the shadow bank takes east_in). Each side carries
// 8 data bits and a ninth mask line (*_wr): it is high in the write phase when
// the sending unit actually wrote, so a unit masked by its context flag masks
// the write on the neighbouring chip too. Separate in/out ports stand for the
// bidirectional pins (this design's choice).
//
// Timing: init_n low while rdy is high starts an instruction; it executes in
// three clock cycles (CA, CB, CRI), with bank and flag writes at the end of CRI.
// The edge outputs are valid during CRI. ca, cb, cri and rdy are status outputs.
module bsys_chip
  import bsys_pkg::*;
#(
  parameter int unsigned NFU     = 47,
  parameter int unsigned ROW_FUS = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init_n,
  input  instr_t instr,
  input  data_t  west_in,
  input  logic   west_in_wr,
  output data_t  west_out,
  output logic   west_out_wr,
  input  data_t  east_in,
  input  logic   east_in_wr,
  output data_t  east_out,
  output logic   east_out_wr,
  output logic   rdy,
  output logic   ca,
  output logic   cb,
  output logic   cri
);

  localparam int unsigned NROWS = (NFU + ROW_FUS - 1) / ROW_FUS;

  // Row control outputs.
  logic [NROWS-1:0]             r_rdy, r_ca, r_cb, r_cri, r_west, r_obey;
  logic [NROWS-1:0][NREGS-1:0]  r_wl;
  logic [NROWS-1:0][NFLAGS-1:0] r_flag;
  logic [NROWS-1:0][7:0]        r_cr;
  logic [NROWS-1:0][3:0]        r_cg, r_cp;

  // Units and banks.
  data_t              fu_result [NFU];
  logic [NFU-1:0]     fu_we_w, fu_we_e;
  data_t              bank_rd   [NFU+1];
  data_t              bank_wd   [NFU+1];
  logic [NFU:0]       bank_we;

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    bsys_row_ctrl u_ctrl (
      .clk, .rst_n, .init_n, .instr,
      .rdy(r_rdy[r]), .ca(r_ca[r]), .cb(r_cb[r]), .cri(r_cri[r]),
      .reg_wl(r_wl[r]), .side_west(r_west[r]), .flag_sel(r_flag[r]),
      .fn_cr(r_cr[r]), .fn_cg(r_cg[r]), .fn_cp(r_cp[r]), .obey(r_obey[r])
    );
  end

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    localparam int unsigned R = f / ROW_FUS;
    logic [NFLAGS-1:0] flags;
    bsys_fu u_fu (
      .clk, .rst_n,
      .ca(r_ca[R]), .cb(r_cb[R]), .cri(r_cri[R]),
      .side_west(r_west[R]), .flag_sel(r_flag[R]),
      .fn_cr(r_cr[R]), .fn_cg(r_cg[R]), .fn_cp(r_cp[R]), .obey(r_obey[R]),
      .rd_west(bank_rd[f]), .rd_east(bank_rd[f+1]),
      .result(fu_result[f]), .we_west(fu_we_w[f]), .we_east(fu_we_e[f]),
      .flags(flags)
    );
  end

  // Bank j lies west of unit j and east of unit j-1. Bank 0 also takes the
  // west input, bank NFU (the shadow bank) the east input.
  for (genvar j = 0; j <= NFU; j++) begin : g_bank
    localparam int unsigned R = (j < NFU) ? j / ROW_FUS : NROWS - 1;
    // The writer on each side: a unit, or the chip edge for the end banks.
    logic  from_east_fu, from_west_fu;
    data_t east_fu_data, west_fu_data;

    if (j < NFU) begin : g_has_east_fu
      assign from_east_fu = fu_we_w[j];
      assign east_fu_data = fu_result[j];
    end else begin : g_no_east_fu
      assign from_east_fu = r_cri[R] && r_west[R] && east_in_wr;
      assign east_fu_data = east_in;
    end

    if (j > 0) begin : g_has_west_fu
      assign from_west_fu = fu_we_e[j-1];
      assign west_fu_data = fu_result[j-1];
    end else begin : g_no_west_fu
      assign from_west_fu = r_cri[R] && !r_west[R] && west_in_wr;
      assign west_fu_data = west_in;
    end

    assign bank_we[j] = from_east_fu || from_west_fu;
    assign bank_wd[j] = from_east_fu ? east_fu_data : west_fu_data;

    bsys_regbank #(.W(DATA_W), .NREGS(NREGS)) u_bank (
      .clk, .rst_n, .wl(r_wl[R]), .rdata(bank_rd[j]),
      .we(bank_we[j]), .wdata(bank_wd[j])
    );
  end

  assign east_out    = fu_result[NFU-1];
  assign east_out_wr = fu_we_e[NFU-1];
  assign west_out    = fu_result[0];
  assign west_out_wr = fu_we_w[0];

  assign rdy = r_rdy[0];
  assign ca  = r_ca[0];
  assign cb  = r_cb[0];
  assign cri = r_cri[0];

  // Relative addressing keeps every bank to a single writer.
  a_rows_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (r_cri == '0 || r_cri == '1) && (r_ca == '0 || r_ca == '1));

endmodule
