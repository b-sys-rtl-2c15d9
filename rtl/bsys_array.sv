// bsys_array: the linear B-SYS array, NCHIPS chips chained west to east.
//
// With the default of 10 chips of 47 units this is the 470-processor array of
// the prototype. All chips receive the same broadcast instruction and init
// strobe. Chip k's east data and mask lines feed chip k+1's west inputs and the
// other way round, so the shared bank at a chip boundary is kept as two copies
// (chip k's shadow bank and chip k+1's first bank) that are written together.
// The array's west and east ends are the data stream ports.
// Timing is that of one chip: three cycles per instruction, writes at the end
// of CRI; ca/cb/cri/rdy are taken from the first chip.
// The chaining and the duplicated boundary bank follow the original design;
// passing a result between chips within the same clock cycle is this design's
// simplification of the slower chip-to-chip signalling.
module bsys_array
  import bsys_pkg::*;
#(
  parameter int unsigned NCHIPS  = 10,
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

  // Link k joins chip k-1 (west) and chip k (east); links 0 and NCHIPS are the ends.
  data_t             ew_data [NCHIPS+1];   // eastward data
  logic [NCHIPS:0]   ew_wr;
  data_t             we_data [NCHIPS+1];   // westward data
  logic [NCHIPS:0]   we_wr;
  logic [NCHIPS-1:0] c_rdy, c_ca, c_cb, c_cri;

  assign ew_data[0]      = west_in;
  assign ew_wr[0]        = west_in_wr;
  assign we_data[NCHIPS] = east_in;
  assign we_wr[NCHIPS]   = east_in_wr;

  for (genvar k = 0; k < NCHIPS; k++) begin : g_chip
    bsys_chip #(.NFU(NFU), .ROW_FUS(ROW_FUS)) u_chip (
      .clk, .rst_n, .init_n, .instr,
      .west_in(ew_data[k]),     .west_in_wr(ew_wr[k]),
      .west_out(we_data[k]),    .west_out_wr(we_wr[k]),
      .east_in(we_data[k+1]),   .east_in_wr(we_wr[k+1]),
      .east_out(ew_data[k+1]),  .east_out_wr(ew_wr[k+1]),
      .rdy(c_rdy[k]), .ca(c_ca[k]), .cb(c_cb[k]), .cri(c_cri[k])
    );
  end

  assign west_out    = we_data[0];
  assign west_out_wr = we_wr[0];
  assign east_out    = ew_data[NCHIPS];
  assign east_out_wr = ew_wr[NCHIPS];
  assign rdy = c_rdy[0];
  assign ca  = c_ca[0];
  assign cb  = c_cb[0];
  assign cri = c_cri[0];

endmodule
