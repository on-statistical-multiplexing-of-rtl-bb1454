// stat_mux_top: statistical multiplexer with dynamic buffer control.
//
// N_CH user terminals share one output channel. Instead of giving every
// terminal a fixed time slot, the multiplexer sends only the data that is
// there, in blocks tagged with the channel number, so idle terminals cost
// no output capacity. Each terminal writes characters (with an
// end-of-message mark) into its own line buffer at any time. A channel
// scanner picks a line buffer that has enough data, and the buffer control
// unit copies a block of it into the queueing buffer memory (QBM), which is
// shared by all channels and divided into N_BLK blocks of NBS words. The
// blocks of one channel form a linked list: the address translation table
// (ATT) keeps each channel's first and last block, the block available
// list (BAL) the free blocks, and the arrival order list (AOL) the order
// in which blocks were stored. The output process sends blocks in that
// order, each as a frame (channel number, data count, characters), through
// the output transmitter at one word per SERVICE cycles. When the QBM
// cannot take a channel's data, up to a block of it is parked in the
// waiting buffer. How many blocks one channel may hold depends on how many
// channels are active (dynamic partitioning, see buffer_control).
//
// Interface: in_valid[i]/in_word[i] per terminal (no back-pressure; a
// character that finds line buffer i full is lost and pulses lb_drop[i]);
// lb_level[i] the fill level of line buffer i;
// out_valid/out_word the output channel; ev the controller's event pulses;
// sys_error a sticky consistency error of the block lists. The structure
// (line buffers, scanner, waiting queue, ATT/QBM/BAL/AOL, controller,
// transmitter) follows the source design; widths, depths, the output rate
// and the frame format are this design's choices.
module stat_mux_top
  import smux_pkg::*;
#(
  parameter int unsigned N_CH     = N_CH_DEF,
  parameter int unsigned N_BLK    = N_BLK_DEF,
  parameter int unsigned NBS      = NBS_DEF,
  parameter int unsigned LB_DEPTH = LB_DEPTH_DEF,
  parameter int unsigned SERVICE  = SERVICE_DEF,
  parameter int unsigned TX_DEPTH = 2 * NBS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] in_valid,
  input  lb_word_t        in_word [N_CH],
  output logic [N_CH-1:0] lb_drop,
  output logic [$clog2(LB_DEPTH+1)-1:0] lb_level [N_CH],
  output logic            out_valid,
  output tx_word_t        out_word,
  output smux_ev_t        ev,
  output logic            sys_error
);

  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int unsigned BW  = (N_BLK > 1) ? $clog2(N_BLK) : 1;
  localparam int unsigned NW  = $clog2(N_BLK + 1);
  localparam int unsigned ICW = $clog2(N_CH + 1);
  localparam int unsigned QW  = qbm_width(N_BLK, NBS);
  localparam int unsigned QAW = $clog2(N_BLK * NBS);
  localparam int unsigned TCW = $clog2(TX_DEPTH + 1);

  // line buffers
  logic [N_CH-1:0] lb_req, lb_empty, lb_rd;
  lb_word_t        lb_dout [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_lb
    line_buffer #(.DEPTH(LB_DEPTH), .THRESHOLD(NBS - 2)) u_lb (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_word  (in_word[i]),
      .drop     (lb_drop[i]),
      .rd_en    (lb_rd[i]),
      .dout     (lb_dout[i]),
      .empty    (lb_empty[i]),
      .req      (lb_req[i]),
      .count    (lb_level[i])
    );
  end

  // scanner
  logic [N_CH-1:0] scan_req;
  logic            scan_valid, scan_advance;
  logic [CHW-1:0]  scan_ch;

  channel_scanner #(.N_CH(N_CH)) u_scan (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (scan_req),
    .advance     (scan_advance),
    .grant_valid (scan_valid),
    .grant_ch    (scan_ch)
  );

  // waiting buffer
  logic           wb_vacant, wb_full, wb_wr, wb_rd;
  lb_word_t       wb_dout, wb_din;
  logic [CHW-1:0] wb_tag, wb_wr_ch;

  waiting_buffer #(.N_CH(N_CH), .DEPTH(NBS - 2)) u_wb (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (wb_wr),
    .din    (wb_din),
    .wr_ch  (wb_wr_ch),
    .rd_en  (wb_rd),
    .dout   (wb_dout),
    .tag    (wb_tag),
    .vacant (wb_vacant),
    .full   (wb_full)
  );

  // address translation table
  logic [CHW-1:0]  att_rd_ch, att_wr_ch;
  logic [BW-1:0]   att_fba, att_lba, att_wr_fba, att_wr_lba;
  logic            att_b, att_wr, att_wr_b;
  logic [NW-1:0]   att_nblk, att_wr_nblk;
  logic [N_CH-1:0] att_busy;
  logic [ICW-1:0]  att_n_idle;

  att #(.N_CH(N_CH), .N_BLK(N_BLK)) u_att (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_ch    (att_rd_ch),
    .rd_fba   (att_fba),
    .rd_lba   (att_lba),
    .rd_b     (att_b),
    .rd_nblk  (att_nblk),
    .wr_en    (att_wr),
    .wr_ch    (att_wr_ch),
    .wr_fba   (att_wr_fba),
    .wr_lba   (att_wr_lba),
    .wr_b     (att_wr_b),
    .wr_nblk  (att_wr_nblk),
    .busy     (att_busy),
    .n_idle   (att_n_idle)
  );

  // block available list
  logic          bal_alloc, bal_any_free, bal_rel;
  logic [BW-1:0] bal_free_blk, bal_rel_blk;
  logic [NW-1:0] bal_n_free;

  bal #(.N_BLK(N_BLK)) u_bal (
    .clk      (clk),
    .rst_n    (rst_n),
    .alloc    (bal_alloc),
    .free_blk (bal_free_blk),
    .any_free (bal_any_free),
    .rel      (bal_rel),
    .rel_blk  (bal_rel_blk),
    .n_free   (bal_n_free)
  );

  // arrival order list
  logic           aol_push, aol_pop, aol_empty;
  logic [CHW-1:0] aol_push_ch, aol_head;

  aol #(.N_CH(N_CH), .N_BLK(N_BLK)) u_aol (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (aol_push),
    .push_ch (aol_push_ch),
    .pop     (aol_pop),
    .head    (aol_head),
    .empty   (aol_empty)
  );

  // queueing buffer memory
  logic           q_en, q_we;
  logic [QAW-1:0] q_addr;
  logic [QW-1:0]  q_wdata, q_rdata;

  qbm #(.N_BLK(N_BLK), .NBS(NBS), .WIDTH(QW)) u_qbm (
    .clk   (clk),
    .en    (q_en),
    .we    (q_we),
    .addr  (q_addr),
    .wdata (q_wdata),
    .rdata (q_rdata)
  );

  // output transmitter
  logic           tx_push;
  tx_word_t       tx_din;
  logic [TCW-1:0] tx_space;

  output_transmitter #(.DEPTH(TX_DEPTH), .SERVICE(SERVICE)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (tx_push),
    .din       (tx_din),
    .space     (tx_space),
    .out_valid (out_valid),
    .out_word  (out_word)
  );

  // buffer control unit
  buffer_control #(
    .N_CH(N_CH), .N_BLK(N_BLK), .NBS(NBS), .TX_DEPTH(TX_DEPTH)
  ) u_ctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .lb_req       (lb_req),
    .lb_empty     (lb_empty),
    .lb_dout      (lb_dout),
    .lb_rd        (lb_rd),
    .scan_req     (scan_req),
    .scan_valid   (scan_valid),
    .scan_ch      (scan_ch),
    .scan_advance (scan_advance),
    .wb_vacant    (wb_vacant),
    .wb_full      (wb_full),
    .wb_dout      (wb_dout),
    .wb_tag       (wb_tag),
    .wb_wr        (wb_wr),
    .wb_din       (wb_din),
    .wb_wr_ch     (wb_wr_ch),
    .wb_rd        (wb_rd),
    .att_rd_ch    (att_rd_ch),
    .att_fba      (att_fba),
    .att_lba      (att_lba),
    .att_b        (att_b),
    .att_nblk     (att_nblk),
    .att_n_idle   (att_n_idle),
    .att_wr       (att_wr),
    .att_wr_ch    (att_wr_ch),
    .att_wr_fba   (att_wr_fba),
    .att_wr_lba   (att_wr_lba),
    .att_wr_b     (att_wr_b),
    .att_wr_nblk  (att_wr_nblk),
    .bal_alloc    (bal_alloc),
    .bal_free_blk (bal_free_blk),
    .bal_any_free (bal_any_free),
    .bal_n_free   (bal_n_free),
    .bal_rel      (bal_rel),
    .bal_rel_blk  (bal_rel_blk),
    .aol_push     (aol_push),
    .aol_push_ch  (aol_push_ch),
    .aol_pop      (aol_pop),
    .aol_head     (aol_head),
    .aol_empty    (aol_empty),
    .q_en         (q_en),
    .q_we         (q_we),
    .q_addr       (q_addr),
    .q_wdata      (q_wdata),
    .q_rdata      (q_rdata),
    .tx_push      (tx_push),
    .tx_din       (tx_din),
    .tx_space     (tx_space),
    .ev_block_in  (ev.block_in),
    .ev_new_chain (ev.new_chain),
    .ev_append    (ev.append),
    .ev_overflow  (ev.overflow),
    .ev_limit     (ev.limit),
    .ev_wb_load   (ev.wb_load),
    .ev_wb_serve  (ev.wb_serve),
    .ev_block_out (ev.block_out),
    .ev_chain_end (ev.chain_end),
    .sys_error    (sys_error)
  );

  // A channel's status bit is set exactly while the AOL holds a block of
  // it or the output process is sending its block: the QBM is empty when
  // all status bits are 0.
  a_empty_consistent: assert property (@(posedge clk) disable iff (!rst_n)
    (att_busy == '0) |-> aol_empty);

endmodule
