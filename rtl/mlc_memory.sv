// mlc_memory: word array of multilevel cells with a fault-injection port.
//
// Each word holds NCELL cells; each cell stores one of 2^B levels, the level
// number being the cell's bit pattern (binary mapping: level 5 <-> "101").
// Writes store a whole word. The read port is synchronous: rdata is the word
// at raddr one clock after re, with rvalid high in that cycle.
//
// The injection port models a limited magnitude error: when inj_en is high
// the level of cell inj_cell of word inj_addr moves by the signed amount
// inj_delta (for example +3 or -2 levels), saturating at the lowest and
// highest level. A write to the same word in the same cycle wins.
//
// The storage medium itself (phase-change, memristor) is outside the scope
// of this model; only its level behaviour is captured. Depth, read latency
// and the injection port are this design's choices.
//
// Interface: clk, rst_n (async, active low, clears the read register only),
// we/waddr/wdata, re/raddr -> rvalid/rdata, inj_en/inj_addr/inj_cell/inj_delta.
module mlc_memory #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NCELL = ipdaec_pkg::N_CELLS,
  parameter int unsigned B     = ipdaec_pkg::BPC,
  parameter int unsigned DW    = 4                // width of inj_delta
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [$clog2(DEPTH)-1:0]      waddr,
  input  logic [NCELL-1:0][B-1:0]       wdata,
  input  logic                          re,
  input  logic [$clog2(DEPTH)-1:0]      raddr,
  output logic                          rvalid,
  output logic [NCELL-1:0][B-1:0]       rdata,
  input  logic                          inj_en,
  input  logic [$clog2(DEPTH)-1:0]      inj_addr,
  input  logic [$clog2(NCELL)-1:0]      inj_cell,
  input  logic signed [DW-1:0]          inj_delta
);

  localparam int MAXLVL = (1 << B) - 1;

  logic [NCELL-1:0][B-1:0] mem [DEPTH];
  logic [B-1:0]            inj_level;

  // New level of the cell hit by an injected error, saturated to the range.
  always_comb begin
    int lvl;
    lvl = int'(mem[inj_addr][inj_cell]) + int'(inj_delta);
    if (lvl < 0)           inj_level = '0;
    else if (lvl > MAXLVL) inj_level = B'(MAXLVL);
    else                   inj_level = B'(lvl);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (inj_en && !(we && waddr == inj_addr) && int'(inj_cell) < int'(NCELL))
      mem[inj_addr][inj_cell] <= inj_level;
  end

  // An injection must name an existing cell.
  assert property (@(posedge clk) inj_en |-> int'(inj_cell) < int'(NCELL))
    else $error("mlc_memory: inj_cell %0d out of range", inj_cell);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= re;
      if (re) rdata <= mem[raddr];
    end
  end

endmodule
