// ipdaec_mlc_memory: MLC memory protected by the IP-DAEC code.
//
// Write path: wr_data (32 bits) is encoded by ipdaec_encoder into 13 3-bit
// cells (11 data cells carrying data and the IP bit, 2 cells carrying the
// six SEC-DAEC parity bits) and stored in mlc_memory in the same cycle.
// Read path: rd_en reads a word; one clock later rd_valid is high and the
// word goes through the combinational ipdaec_decoder, giving rd_data,
// correct_data and rd_status in that same cycle. The encode / store / read /
// decode order is the document's; the one-cycle synchronous read is this
// design's choice.
//
// The inj_* port moves the level of one stored cell by a signed number of
// levels, to exercise the code with limited magnitude errors.
//
// Interface: clk, rst_n (async, active low);
//   wr_en, wr_addr, wr_data;  rd_en, rd_addr -> rd_valid, rd_data,
//   correct_data, rd_status;  inj_en, inj_addr, inj_cell, inj_delta.
module ipdaec_mlc_memory
  import ipdaec_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(DEPTH)-1:0]     wr_addr,
  input  data_t                        wr_data,
  input  logic                         rd_en,
  input  logic [$clog2(DEPTH)-1:0]     rd_addr,
  output logic                         rd_valid,
  output data_t                        rd_data,
  output logic                         correct_data,
  output dec_status_t                  rd_status,
  input  logic                         inj_en,
  input  logic [$clog2(DEPTH)-1:0]     inj_addr,
  input  logic [$clog2(N_CELLS)-1:0]   inj_cell,
  input  logic signed [3:0]            inj_delta
);

  codeword_t cw_wr, cw_rd;

  ipdaec_encoder u_enc (.data(wr_data), .cw(cw_wr));

  mlc_memory #(.DEPTH(DEPTH), .NCELL(N_CELLS), .B(BPC), .DW(4)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .we(wr_en), .waddr(wr_addr), .wdata(cw_wr),
    .re(rd_en), .raddr(rd_addr), .rvalid(rd_valid), .rdata(cw_rd),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_cell(inj_cell), .inj_delta(inj_delta)
  );

  ipdaec_decoder u_dec (
    .cw(cw_rd), .data(rd_data), .correct_data(correct_data), .status(rd_status)
  );

endmodule
