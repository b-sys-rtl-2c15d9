// bsys_board: the host interface board that buffers instructions for the array.
//
// The original prototype board sits on a 16-bit ISA bus and needs three bus
// write cycles to pass one 38-bit instruction to the chips. Here io_addr 0 and 1
// take instruction bits 15:0 and 31:16 and io_addr 2 takes bits 37:32 (in its
// low six bits) and completes the instruction; the word order and addresses are
// this design's choice. A completed instruction is held as pending (busy high)
// until the array reports rdy, when the board lowers init_n for one cycle with
// the instruction on the instr pins. The host must not complete another
// instruction while busy; a write at address 3 is ignored.
// Interface: io_wr/io_addr/io_wdata host writes (one cycle each); busy status;
// init_n/instr to the chips, arr_rdy from the chips.
module bsys_board
  import bsys_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_wr,
  input  logic [1:0]  io_addr,
  input  logic [15:0] io_wdata,
  output logic        busy,
  input  logic        arr_rdy,
  output logic        init_n,
  output instr_t      instr
);

  logic [15:0] w0_q, w1_q;
  logic        pend_q;
  instr_t      instr_q;
  logic        issue;

  assign issue  = pend_q && arr_rdy;
  assign init_n = !issue;
  assign instr  = instr_q;
  assign busy   = pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0_q    <= '0;
      w1_q    <= '0;
      pend_q  <= 1'b0;
      instr_q <= '0;
    end else begin
      if (issue) pend_q <= 1'b0;
      if (io_wr) begin
        unique case (io_addr)
          2'd0: w0_q <= io_wdata;
          2'd1: w1_q <= io_wdata;
          2'd2: begin
            instr_q <= instr_t'({io_wdata[5:0], w1_q, w0_q});
            pend_q  <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (io_wr && io_addr == 2'd2) |-> (!pend_q || issue));

endmodule
