// qbm: queueing buffer memory.
//
// N_BLK blocks of NBS words each, one word read or written per cycle
// (single-port synchronous RAM). Word a of block k is at address
// k*NBS + a. The layout of a block, which the buffer control unit
// maintains, follows the source design: the message characters first
// (words 0 .. NBS-3), then the word holding the block continuation bit
// (word NBS-2), then the linkage pointer to the next block (word NBS-1).
//
// en with we writes wdata at addr; en without we reads addr and rdata
// shows the word in the next cycle. Contents are not reset.
module qbm
  import smux_pkg::*;
#(
  parameter int unsigned N_BLK = N_BLK_DEF,
  parameter int unsigned NBS   = NBS_DEF,
  parameter int unsigned WIDTH = LB_WORD_W,
  localparam int unsigned DEPTH = N_BLK * NBS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
