// att: address translation table of the queueing buffer.
//
// One entry per channel (destination), as in the source design's table:
// the first block address (fba, the oldest block still queued for the
// channel), the final block address (lba, the block written last) and the
// buffer status bit b (1 while the channel has blocks queued). This design
// stores block numbers rather than word addresses (the word address of
// block k is k*NBS) and adds nblk, the number of blocks the channel holds,
// which the dynamic partitioning rule needs.
//
// Read: rd_ch selects the entry shown on rd_entry (combinational). Write:
// wr_en writes the whole entry wr_entry at wr_ch at the clock edge. The
// table also gives the b bits of all channels (busy) and the number of
// channels that hold no block (n_idle). Reset clears every entry.
module att
  import smux_pkg::*;
#(
  parameter int unsigned N_CH  = N_CH_DEF,
  parameter int unsigned N_BLK = N_BLK_DEF,
  localparam int unsigned CHW  = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned BW   = (N_BLK > 1) ? $clog2(N_BLK) : 1,
  localparam int unsigned NW   = $clog2(N_BLK + 1),
  localparam int unsigned ICW  = $clog2(N_CH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CHW-1:0]  rd_ch,
  output logic [BW-1:0]   rd_fba,
  output logic [BW-1:0]   rd_lba,
  output logic            rd_b,
  output logic [NW-1:0]   rd_nblk,
  input  logic            wr_en,
  input  logic [CHW-1:0]  wr_ch,
  input  logic [BW-1:0]   wr_fba,
  input  logic [BW-1:0]   wr_lba,
  input  logic            wr_b,
  input  logic [NW-1:0]   wr_nblk,
  output logic [N_CH-1:0] busy,
  output logic [ICW-1:0]  n_idle
);

  logic [BW-1:0] fba  [N_CH];
  logic [BW-1:0] lba  [N_CH];
  logic [NW-1:0] nblk [N_CH];
  logic [N_CH-1:0] b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) begin
        fba[i]  <= '0;
        lba[i]  <= '0;
        nblk[i] <= '0;
      end
      b <= '0;
    end else if (wr_en) begin
      fba[wr_ch]  <= wr_fba;
      lba[wr_ch]  <= wr_lba;
      nblk[wr_ch] <= wr_nblk;
      b[wr_ch]    <= wr_b;
    end
  end

  assign rd_fba  = fba[rd_ch];
  assign rd_lba  = lba[rd_ch];
  assign rd_b    = b[rd_ch];
  assign rd_nblk = nblk[rd_ch];
  assign busy    = b;

  always_comb begin
    n_idle = '0;
    for (int i = 0; i < N_CH; i++)
      if (nblk[i] == '0) n_idle = n_idle + 1'b1;
  end

  // A channel holds blocks exactly when its status bit is set.
  for (genvar i = 0; i < N_CH; i++) begin : g_chk
    a_b_matches_nblk: assert property (@(posedge clk) disable iff (!rst_n)
      b[i] == (nblk[i] != '0));
  end

endmodule
