// tb_buffer_control: directed test of the buffer control unit.
//
// The controller runs with the real line buffers, scanner, waiting buffer,
// ATT, BAL, AOL and QBM around it (four channels, six blocks of six words,
// so four data characters per block and at most three blocks per
// channel). The transmit queue is modelled here: the test holds the output
// process off by reporting no space, fills the QBM, inspects it, then lets
// the output run. Scenarios:
//   1 a 10-character message on channel 1 becomes a chain of three blocks:
//     checks data words, continuation words {count, C}, linkage pointers
//     and the ATT entry (first/last block, status bit, block count);
//   2 a message on channel 2 starts a second chain;
//   3 a further message on channel 1 exceeds its share: partition limit,
//     the characters go to the waiting buffer;
//   4 a message on channel 3 is not served while the waiting buffer waits;
//   5 output released: frames must come in arrival order 1,1,1,2, then the
//     waiting buffer block (1) and channel 3, with the right contents;
//   6 one block per channel, then two more: the seventh request finds the
//     BAL empty (overflow), then everything drains.
// Every frame's data is compared with what was sent on its channel, and at
// the end all blocks must be free, all status bits 0 and no error raised.
module tb_buffer_control;
  import smux_pkg::*;

  localparam int unsigned N_CH = 4, N_BLK = 6, NBS = 6, TX_DEPTH = 12, LB_DEPTH = 16;
  localparam int unsigned QW = qbm_width(N_BLK, NBS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- surroundings ----
  logic [N_CH-1:0] in_valid = '0, lb_drop, lb_req, lb_empty, lb_rd;
  lb_word_t        in_word [N_CH];
  lb_word_t        lb_dout [N_CH];

  for (genvar i = 0; i < N_CH; i++) begin : g_lb
    line_buffer #(.DEPTH(LB_DEPTH), .THRESHOLD(NBS - 2)) u_lb (
      .clk, .rst_n, .in_valid(in_valid[i]), .in_word(in_word[i]), .drop(lb_drop[i]),
      .rd_en(lb_rd[i]), .dout(lb_dout[i]), .empty(lb_empty[i]), .req(lb_req[i]), .count());
  end

  logic [N_CH-1:0] scan_req;
  logic scan_valid, scan_advance;
  logic [1:0] scan_ch;
  channel_scanner #(.N_CH(N_CH)) u_scan (.clk, .rst_n, .req(scan_req),
    .advance(scan_advance), .grant_valid(scan_valid), .grant_ch(scan_ch));

  logic wb_vacant, wb_full, wb_wr, wb_rd;
  lb_word_t wb_dout, wb_din;
  logic [1:0] wb_tag, wb_wr_ch;
  waiting_buffer #(.N_CH(N_CH), .DEPTH(NBS - 2)) u_wb (.clk, .rst_n, .wr_en(wb_wr),
    .din(wb_din), .wr_ch(wb_wr_ch), .rd_en(wb_rd), .dout(wb_dout), .tag(wb_tag),
    .vacant(wb_vacant), .full(wb_full));

  logic [1:0] att_rd_ch, att_wr_ch;
  logic [2:0] att_fba, att_lba, att_wr_fba, att_wr_lba, att_nblk, att_wr_nblk;
  logic att_b, att_wr, att_wr_b;
  logic [N_CH-1:0] att_busy;
  logic [2:0] att_n_idle;
  att #(.N_CH(N_CH), .N_BLK(N_BLK)) u_att (.clk, .rst_n, .rd_ch(att_rd_ch),
    .rd_fba(att_fba), .rd_lba(att_lba), .rd_b(att_b), .rd_nblk(att_nblk),
    .wr_en(att_wr), .wr_ch(att_wr_ch), .wr_fba(att_wr_fba), .wr_lba(att_wr_lba),
    .wr_b(att_wr_b), .wr_nblk(att_wr_nblk), .busy(att_busy), .n_idle(att_n_idle));

  logic bal_alloc, bal_any_free, bal_rel;
  logic [2:0] bal_free_blk, bal_rel_blk, bal_n_free;
  bal #(.N_BLK(N_BLK)) u_bal (.clk, .rst_n, .alloc(bal_alloc), .free_blk(bal_free_blk),
    .any_free(bal_any_free), .rel(bal_rel), .rel_blk(bal_rel_blk), .n_free(bal_n_free));

  logic aol_push, aol_pop, aol_empty;
  logic [1:0] aol_push_ch, aol_head;
  aol #(.N_CH(N_CH), .N_BLK(N_BLK)) u_aol (.clk, .rst_n, .push(aol_push),
    .push_ch(aol_push_ch), .pop(aol_pop), .head(aol_head), .empty(aol_empty));

  logic q_en, q_we;
  logic [5:0] q_addr;
  logic [QW-1:0] q_wdata, q_rdata;
  qbm #(.N_BLK(N_BLK), .NBS(NBS), .WIDTH(QW)) u_qbm (.clk, .en(q_en), .we(q_we),
    .addr(q_addr), .wdata(q_wdata), .rdata(q_rdata));

  logic tx_push;
  tx_word_t tx_din;
  logic [3:0] tx_space;
  logic hold = 1'b1;
  assign tx_space = hold ? 4'd0 : 4'(TX_DEPTH);

  logic ev_block_in, ev_new_chain, ev_append, ev_overflow, ev_limit, ev_wb_load,
        ev_wb_serve, ev_block_out, ev_chain_end, sys_error;

  buffer_control #(.N_CH(N_CH), .N_BLK(N_BLK), .NBS(NBS), .TX_DEPTH(TX_DEPTH)) dut (.*);

  // ---- bookkeeping ----
  int checks = 0, failures = 0;
  lb_word_t exp_q [N_CH][$];
  int frame_ch [$];
  int n_new = 0, n_app = 0, n_ovf = 0, n_lim = 0, n_wbl = 0, n_wbs = 0, n_end = 0;
  logic [7:0] seq [N_CH];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // frame monitor
  int fst = 0, fch = 0, flen = 0, fpos = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_new_chain) n_new++;
    if (ev_append)    n_app++;
    if (ev_overflow)  n_ovf++;
    if (ev_limit)     n_lim++;
    if (ev_wb_load)   n_wbl++;
    if (ev_wb_serve)  n_wbs++;
    if (ev_chain_end) n_end++;
    if (tx_push) begin
      check(!hold, "frame written while the transmit queue is full");
      case (fst)
        0: begin
          check(tx_din.kind == K_CHAN, "channel header expected");
          fch = tx_din.w.ch % N_CH;
          frame_ch.push_back(fch);
          fst = 1;
        end
        1: begin
          check(tx_din.kind == K_LEN && tx_din.w.ch >= 1 && tx_din.w.ch <= NBS - 2, "length header");
          flen = tx_din.w.ch;
          fpos = 0;
          fst = 2;
        end
        default: begin
          check(tx_din.kind == K_DATA, "data word expected");
          check(exp_q[fch].size() != 0 && tx_din.w == exp_q[fch].pop_front(),
                $sformatf("channel %0d data %0h", fch, tx_din.w.ch));
          fpos++;
          if (fpos == flen) fst = 0;
        end
      endcase
    end
  end

  // send one message of n characters on channel ch, one per cycle
  task automatic send(input int ch, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid[ch] = 1'b1;
      in_word[ch].ch = seq[ch];
      in_word[ch].eom = (i == n - 1);
      exp_q[ch].push_back(in_word[ch]);
      seq[ch]++;
    end
    @(negedge clk) in_valid[ch] = 1'b0;
  endtask

  function automatic logic [QW-1:0] word(input int blk, input int off);
    return u_qbm.mem[blk * NBS + off];
  endfunction

  task automatic check_att(input int ch, input int fba, input int lba, input int nblk);
    check(u_att.b[ch] == (nblk != 0), $sformatf("ATT ch%0d status bit", ch));
    check(u_att.nblk[ch] == nblk,
          $sformatf("ATT ch%0d block count %0d expected %0d", ch, u_att.nblk[ch], nblk));
    if (nblk != 0)
      check(u_att.fba[ch] == fba && u_att.lba[ch] == lba,
            $sformatf("ATT ch%0d first/last %0d/%0d expected %0d/%0d", ch,
                      u_att.fba[ch], u_att.lba[ch], fba, lba));
  endtask

  initial begin
    for (int i = 0; i < N_CH; i++) begin
      in_word[i] = '0;
      seq[i] = 8'(16 * i);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: chain of three blocks on channel 1
    send(1, 10);
    repeat (60) @(posedge clk);
    check_att(1, 0, 2, 3);
    for (int b = 0; b < 3; b++)
      for (int k = 0; k < (b < 2 ? 4 : 2); k++)
        check(word(b, k) == QW'({(b * 4 + k == 9), 8'(16 + b * 4 + k)}),
              $sformatf("block %0d word %0d", b, k));
    check(word(0, NBS - 2) == QW'({4'd4, 1'b1}) && word(0, NBS - 1) == 1, "block 0 continuation/link");
    check(word(1, NBS - 2) == QW'({4'd4, 1'b1}) && word(1, NBS - 1) == 2, "block 1 continuation/link");
    check(word(2, NBS - 2) == QW'({4'd2, 1'b0}) && word(2, NBS - 1) == 0, "block 2 continuation/link");
    check(n_new == 1 && n_app == 2, "one new chain, two appends");

    // 2: second chain on channel 2
    send(2, 3);
    repeat (40) @(posedge clk);
    check_att(2, 3, 3, 1);

    // 3: channel 1 over its share
    send(1, 4);
    repeat (40) @(posedge clk);
    check(n_lim >= 1 && n_wbl == 1, "partition limit sends data to the waiting buffer");
    check(!wb_vacant && wb_tag == 1, "waiting buffer holds channel 1");
    check_att(1, 0, 2, 3);

    // 4: channel 3 waits behind the waiting buffer
    send(3, 2);
    repeat (40) @(posedge clk);
    check_att(3, 0, 0, 0);

    // 5: release the output
    hold = 1'b0;
    repeat (300) @(posedge clk);
    check(frame_ch.size() == 6, $sformatf("%0d frames, expected 6", frame_ch.size()));
    if (frame_ch.size() == 6)
      check(frame_ch[0] == 1 && frame_ch[1] == 1 && frame_ch[2] == 1 && frame_ch[3] == 2 &&
            frame_ch[4] == 1 && frame_ch[5] == 3, "frames in arrival order");
    check(n_wbs == 1, "waiting buffer served");

    // 6: run the BAL empty
    hold = 1'b1;
    fork
      send(0, 4); send(1, 4); send(2, 4); send(3, 4);
    join
    repeat (80) @(posedge clk);
    fork
      send(0, 4); send(1, 4);
    join
    repeat (60) @(posedge clk);
    check(bal_n_free == 0, "all blocks in use");
    send(2, 4);
    repeat (40) @(posedge clk);
    check(n_ovf >= 1, "overflow with an empty block list");
    hold = 1'b0;
    repeat (400) @(posedge clk);

    // end state
    for (int i = 0; i < N_CH; i++) check(exp_q[i].size() == 0, $sformatf("channel %0d not drained", i));
    check(bal_n_free == N_BLK, "all blocks free");
    check(att_busy == '0, "all status bits 0");
    check(!sys_error, "no system error");
    check(n_end == n_new, "every chain ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
