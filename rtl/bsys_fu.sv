// bsys_fu: one 8-bit functional unit of the Systolic Shared Register array.
//
// The unit keeps no data registers of its own, only operand latches and eight
// flag bits, as in the original design. It reads both
// operands from the banks to its west or east through the 8-bit switches
// (rd_west / rd_east, chosen by side_west), latching A in phase CA and B with
// the carry-in flag in phase CB. In phase CRI the ALU evaluates; the result goes
// out on result with a write enable for the west or the east bank, and the ALU
// carry out is written to the flag selected by flag_sel. When the instruction's
// obey bit ("!") is set, the unit only writes if its context flag is set; the
// choice of flag 0 as the context flag, and that a masked unit writes neither
// the register nor the flag, are this design's.
// Interface: row control signals (ca, cb, cri, side_west, flag_sel, fn_*, obey);
// bank read data; result with we_west / we_east (valid in CRI only).
module bsys_fu
  import bsys_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ca,
  input  logic              cb,
  input  logic              cri,
  input  logic              side_west,
  input  logic [NFLAGS-1:0] flag_sel,
  input  logic [7:0]        fn_cr,
  input  logic [3:0]        fn_cg,
  input  logic [3:0]        fn_cp,
  input  logic              obey,
  input  data_t             rd_west,
  input  data_t             rd_east,
  output data_t             result,
  output logic              we_west,
  output logic              we_east,
  output logic [NFLAGS-1:0] flags
);

  data_t       lat_a, lat_b;
  logic        lat_c;
  data_t       operand;
  logic        cout;
  logic        enabled;
  logic [NFLAGS-1:0] flags_q;

  assign operand = side_west ? rd_west : rd_east;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_a <= '0;
      lat_b <= '0;
      lat_c <= 1'b0;
    end else begin
      if (ca) lat_a <= operand;
      if (cb) begin
        lat_b <= operand;
        lat_c <= |(flags_q & flag_sel);
      end
    end
  end

  bsys_alu #(.W(DATA_W)) u_alu (
    .a(lat_a), .b(lat_b), .cin(lat_c),
    .cr(fn_cr), .cg(fn_cg), .cp(fn_cp),
    .r(result), .cout(cout)
  );

  assign enabled = !obey || flags_q[CONTEXT_FLAG];
  assign we_west = cri && enabled &&  side_west;
  assign we_east = cri && enabled && !side_west;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags_q <= '0;
    else if (cri && enabled) begin
      for (int i = 0; i < NFLAGS; i++)
        if (flag_sel[i]) flags_q[i] <= cout;
    end
  end

  assign flags = flags_q;

  // Exactly one bank is written per unit, and only in the write phase.
  a_one_side: assert property (@(posedge clk) disable iff (!rst_n) !(we_west && we_east));
  a_flag_onehot: assert property (@(posedge clk) disable iff (!rst_n) (cri || cb) |-> $onehot(flag_sel));

endmodule
