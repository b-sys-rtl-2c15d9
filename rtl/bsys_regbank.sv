// bsys_regbank: one 16 x 8 shared register bank.
//
// A bank sits between two neighbouring functional units and is the only storage
// they have: the unit to its east addresses it as "west", the unit to its west
// as "east". Because every unit executes the same broadcast instruction with the
// same relative side, only one unit uses a bank in any phase, so one port is
// enough, as in the original design, which needs no dual-ported memory. The word is
// selected by a one-hot word line from the row's 4:16 decoder. Reads are
// combinational; a write happens at the clock edge when we is high. The clearing
// of all words by reset is this design's choice (the silicon has none).
// Interface: wl one-hot word select; rdata selected word; we, wdata write.
module bsys_regbank #(
  parameter int unsigned W     = 8,
  parameter int unsigned NREGS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREGS-1:0] wl,
  output logic [W-1:0]     rdata,
  input  logic             we,
  input  logic [W-1:0]     wdata
);

  logic [W-1:0] mem [NREGS];

  always_comb begin
    rdata = '0;
    for (int i = 0; i < NREGS; i++)
      if (wl[i]) rdata |= mem[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) mem[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < NREGS; i++)
        if (wl[i]) mem[i] <= wdata;
    end
  end

endmodule
