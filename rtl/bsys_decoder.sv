// bsys_decoder: binary to one-hot decoder.
//
// Each row of a B-SYS chip has two of these: a 4:16 decoder selecting one word
// of every register bank in the row, and a 3:8 decoder selecting one flag of
// every functional unit. The two decoders and their sizes are the original chip's;
// the enable input is this design's choice (all outputs low when en is low).
// Interface: sel (N bits), en; onehot (2**N bits). Combinational.
module bsys_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      sel,
  input  logic              en,
  output logic [(1<<N)-1:0] onehot
);

  always_comb begin
    onehot = '0;
    if (en) onehot[sel] = 1'b1;
  end

endmodule
