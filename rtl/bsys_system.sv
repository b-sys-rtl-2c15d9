// bsys_system: the B-SYS co-processor board, the top of the design.
//
// A host writes each broadcast instruction as three 16-bit I/O words into the
// board's buffer (bsys_board), which starts it on every chip of the linear
// array (bsys_array, by default 10 chips x 47 units = 470 processors) as soon
// as the array is ready. The array's two ends are brought out as the data
// stream ports (8 data bits plus a write/mask line per direction), to be fed
// and drained by the host. The phase signals of the first chip are brought out
// as status. An instruction occupies the array for three clock cycles; the
// board issues it in the cycle after the third host write at the earliest.
// The board-plus-chips structure, the ten chips and the three host words per
// instruction follow the original prototype; feeding the stream ports straight
// from the host (no buffering of data on the board) is this design's choice.
module bsys_system
  import bsys_pkg::*;
#(
  parameter int unsigned NCHIPS  = 10,
  parameter int unsigned NFU     = 47,
  parameter int unsigned ROW_FUS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_wr,
  input  logic [1:0]  io_addr,
  input  logic [15:0] io_wdata,
  output logic        busy,
  input  data_t       west_in,
  input  logic        west_in_wr,
  output data_t       west_out,
  output logic        west_out_wr,
  input  data_t       east_in,
  input  logic        east_in_wr,
  output data_t       east_out,
  output logic        east_out_wr,
  output logic        rdy,
  output logic        ca,
  output logic        cb,
  output logic        cri
);

  logic   init_n;
  instr_t instr;

  bsys_board u_board (
    .clk, .rst_n, .io_wr, .io_addr, .io_wdata, .busy,
    .arr_rdy(rdy), .init_n, .instr
  );

  bsys_array #(.NCHIPS(NCHIPS), .NFU(NFU), .ROW_FUS(ROW_FUS)) u_array (
    .clk, .rst_n, .init_n, .instr,
    .west_in, .west_in_wr, .west_out, .west_out_wr,
    .east_in, .east_in_wr, .east_out, .east_out_wr,
    .rdy, .ca, .cb, .cri
  );

endmodule
