// bsys_alu: the programmable 8-bit ALU of a B-SYS functional unit.
//
// As in the original B-SYS chip, the ALU is in the style of the OM1 ALU: per bit, two
// arbitrary 2-input functions of the operand bits (a,b) form a generate signal
// (table CG) and a propagate signal (table CP) that steer a Manchester carry
// chain, and an arbitrary 3-input function (table CR) of (a, b, incoming carry)
// forms the result bit. The carry chain is modelled as a pass chain: a bit that
// propagates passes its incoming carry on, any other bit drives its generate
// value (so "not generate and not propagate" kills the carry). The carry out of
// the top bit is the Z output, written to a flag by the functional unit.
// Table indexing ({a,b,c} for CR, {a,b} for CG/CP) is this design's choice.
//
// Interface: a, b operands; cin carry into bit 0; cr/cg/cp function tables;
// r result; cout carry out of bit W-1. Purely combinational.
module bsys_alu #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic [7:0]   cr,
  input  logic [3:0]   cg,
  input  logic [3:0]   cp,
  output logic [W-1:0] r,
  output logic         cout
);

  logic [W:0]   carry;
  logic [W-1:0] gen, prop;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign gen[i]     = cg[{a[i], b[i]}];
    assign prop[i]    = cp[{a[i], b[i]}];
    assign carry[i+1] = prop[i] ? carry[i] : gen[i];
    assign r[i]       = cr[{a[i], b[i], carry[i]}];
  end

  assign cout = carry[W];

endmodule
