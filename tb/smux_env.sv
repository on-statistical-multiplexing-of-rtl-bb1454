// smux_env: traffic generator and scoreboard for the whole multiplexer.
//
// Drives N_CH user terminals with bursty messages (random gaps, random
// message lengths) in four phases and checks everything that comes out of
// the output channel:
//   A  only channel 0 sends, faster than the output drains, so the channel
//      grows its share of the QBM up to the partitioning limit;
//   B  all channels send at full speed: the QBM runs out of blocks, data is
//      parked in the waiting buffer and line buffers overflow;
//   C  moderate random traffic on all channels;
//   D  no new traffic except one closing one-character message per channel
//      (sent when its line buffer has room), then the system drains.
// Scoreboard: every character a line buffer accepted (in_valid without
// lb_drop) is queued per channel; each output frame must be K_CHAN, K_LEN n
// (1 <= n <= NBS-2), then n K_DATA words equal to the channel's queued
// characters in order, and a character with the end-of-message mark must
// be the last of its frame. Output words must be at least SERVICE cycles
// apart. At the end all queues must be empty and sys_error low. Each
// mechanism (new chain, append, overflow, partition limit, waiting buffer
// load and service, chain end, line buffer drop, message spread over
// several blocks, channel at its maximum share) is counted and must have
// happened at least once. The mean delay of a character from entering its
// line buffer to leaving the output is printed in output word times.
module smux_env
  import smux_pkg::*;
#(
  parameter int unsigned N_CH     = 4,
  parameter int unsigned N_BLK    = 8,
  parameter int unsigned NBS      = 10,
  parameter int unsigned LB_DEPTH = 32,
  parameter int unsigned SERVICE  = 3,
  parameter int unsigned PHASE_A  = 400,
  parameter int unsigned PHASE_B  = 1500,
  parameter int unsigned PHASE_C  = 3000,
  parameter int unsigned MAX_MSG  = 40
) (
  input  logic            clk,
  output logic            rst_n,
  output logic [N_CH-1:0] in_valid,
  output lb_word_t        in_word [N_CH],
  input  logic [N_CH-1:0] lb_drop,
  input  logic [$clog2(LB_DEPTH+1)-1:0] lb_level [N_CH],
  input  logic            out_valid,
  input  tx_word_t        out_word,
  input  smux_ev_t        ev,
  input  logic            sys_error,
  input  int unsigned     max_nblk,   // largest block count of any channel
  output logic            done
);

  int checks = 0, failures = 0;

  // ---------------- stimulus ----------------
  typedef enum int {PH_A, PH_B, PH_C, PH_D} phase_e;
  phase_e phase;
  int unsigned cyc;
  int unsigned remain [N_CH];     // characters left in the current message
  logic [N_CH-1:0] closed;        // phase D closing message sent
  logic [7:0] seq [N_CH];         // running character value per channel

  task automatic fail(input string msg);
    failures++;
    if (failures <= 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc      <= 0;
      phase    <= PH_A;
      in_valid <= '0;
      closed   <= '0;
      for (int i = 0; i < N_CH; i++) begin
        remain[i]  <= 0;
        seq[i]     <= 8'(i * 64);
        in_word[i] <= '0;
      end
    end else begin
      cyc <= cyc + 1;
      if (phase == PH_A && cyc == PHASE_A) phase <= PH_B;
      if (phase == PH_B && cyc == PHASE_A + PHASE_B) phase <= PH_C;
      if (phase == PH_C && cyc == PHASE_A + PHASE_B + PHASE_C) phase <= PH_D;
      for (int i = 0; i < N_CH; i++) begin
        logic send;
        int unsigned len;
        send = 1'b0;
        len  = remain[i];
        unique case (phase)
          PH_A: send = (i == 0);
          PH_B: send = 1'b1;
          PH_C: send = ($urandom_range(99) < 12);
          PH_D: send = 1'b0;
        endcase
        if (phase != PH_D && send) begin
          if (len == 0) len = 1 + $urandom_range(MAX_MSG - 1);
          in_valid[i]   <= 1'b1;
          in_word[i].ch <= seq[i];
          in_word[i].eom <= (len == 1);
          seq[i]        <= seq[i] + 1'b1;
          remain[i]     <= len - 1;
        end else if (phase == PH_D && !closed[i] && cyc > PHASE_A + PHASE_B + PHASE_C + 2
                     && lb_level[i] < LB_DEPTH - 2) begin
          in_valid[i]    <= 1'b1;
          in_word[i].ch  <= seq[i];
          in_word[i].eom <= 1'b1;
          seq[i]         <= seq[i] + 1'b1;
          closed[i]      <= 1'b1;
          remain[i]      <= 0;
        end else begin
          in_valid[i] <= 1'b0;
        end
      end
    end
  end

  // ---------------- scoreboard ----------------
  lb_word_t    exp_q  [N_CH][$];
  longint      time_q [N_CH][$];
  int unsigned n_accepted = 0, n_sent = 0, n_frames = 0;
  longint      delay_sum = 0;
  int unsigned n_multi = 0, n_drop = 0, n_maxshare = 0;
  int unsigned cnt_new = 0, cnt_app = 0, cnt_ovf = 0, cnt_lim = 0,
               cnt_wbl = 0, cnt_wbs = 0, cnt_end = 0, cnt_in = 0, cnt_out = 0;
  longint      now = 0, last_out = -1000;

  typedef enum int {F_CHAN, F_LEN, F_DATA} fstate_e;
  fstate_e     fst = F_CHAN;
  int unsigned fch = 0, flen = 0, fpos = 0;
  logic        saw_eom = 1'b0;

  always @(posedge clk) begin
    now++;
    if (rst_n) begin
      for (int i = 0; i < N_CH; i++) begin
        if (in_valid[i] && !lb_drop[i]) begin
          exp_q[i].push_back(in_word[i]);
          time_q[i].push_back(now);
          n_accepted++;
        end
        if (lb_drop[i]) n_drop++;
      end
      if (ev.new_chain) cnt_new++;
      if (ev.append)    cnt_app++;
      if (ev.overflow)  cnt_ovf++;
      if (ev.limit)     cnt_lim++;
      if (ev.wb_load)   cnt_wbl++;
      if (ev.wb_serve)  cnt_wbs++;
      if (ev.chain_end) cnt_end++;
      if (ev.block_in)  cnt_in++;
      if (ev.block_out) cnt_out++;
      if (max_nblk == N_BLK - N_CH + 1) n_maxshare++;
      if (max_nblk > N_BLK - N_CH + 1) fail("a channel holds more than its maximum share");

      if (out_valid) begin
        checks++;
        if (now - last_out < SERVICE) fail("output words closer than the unit service interval");
        last_out = now;
        unique case (fst)
          F_CHAN: begin
            checks++;
            if (out_word.kind != K_CHAN || out_word.w.ch >= N_CH)
              fail($sformatf("expected channel header, got kind %0d value %0d",
                             out_word.kind, out_word.w.ch));
            fch = out_word.w.ch % N_CH;
            fst = F_LEN;
          end
          F_LEN: begin
            checks++;
            if (out_word.kind != K_LEN || out_word.w.ch == 0 || out_word.w.ch > NBS - 2)
              fail($sformatf("bad length header %0d", out_word.w.ch));
            flen = out_word.w.ch;
            fpos = 0;
            saw_eom = 1'b0;
            fst = (flen == 0) ? F_CHAN : F_DATA;
          end
          F_DATA: begin
            checks++;
            if (out_word.kind != K_DATA) fail("expected data word");
            if (saw_eom) fail("data after end of message inside a block");
            if (exp_q[fch].size() == 0) begin
              fail($sformatf("channel %0d: unexpected character", fch));
            end else begin
              lb_word_t e;
              e = exp_q[fch].pop_front();
              delay_sum += now - time_q[fch].pop_front();
              if (out_word.w != e)
                fail($sformatf("channel %0d: got %0h/%0b expected %0h/%0b", fch,
                               out_word.w.ch, out_word.w.eom, e.ch, e.eom));
            end
            saw_eom = out_word.w.eom;
            n_sent++;
            fpos++;
            if (fpos == flen) begin
              n_frames++;
              if (!saw_eom) n_multi++;
              fst = F_CHAN;
            end
          end
        endcase
      end
    end
  end

  // ---------------- sequencing ----------------
  function automatic bit all_empty();
    for (int i = 0; i < N_CH; i++) if (exp_q[i].size() != 0) return 0;
    return 1;
  endfunction

  task automatic expect_seen(input string what, input int unsigned n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) fail({what, " never happened"});
  endtask

  initial begin
    done  = 1'b0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (phase == PH_D && closed == '1);
    while (!all_empty()) @(posedge clk);
    repeat (4 * NBS * SERVICE + 50) @(posedge clk);
    checks++;
    if (!all_empty()) fail("characters left behind");
    checks++;
    if (sys_error) fail("sys_error raised");
    checks++;
    if (fst != F_CHAN) fail("output stopped inside a frame");
    checks++;
    if (cnt_in != cnt_out) fail($sformatf("blocks in %0d != blocks out %0d", cnt_in, cnt_out));
    $display("smux_env: accepted %0d characters, sent %0d in %0d frames, dropped %0d",
             n_accepted, n_sent, n_frames, n_drop);
    if (n_sent != 0)
      $display("smux_env: mean character delay %0.2f output word times",
               real'(delay_sum) / real'(n_sent) / real'(SERVICE));
    $display("smux_env: mechanisms seen");
    expect_seen("new chain (b = 0)",           cnt_new);
    expect_seen("append to chain (b = 1)",     cnt_app);
    expect_seen("overflow (BAL empty)",        cnt_ovf);
    expect_seen("partition limit",             cnt_lim);
    expect_seen("waiting buffer load",         cnt_wbl);
    expect_seen("waiting buffer service",      cnt_wbs);
    expect_seen("chain end (C = 0)",           cnt_end);
    expect_seen("line buffer drop",            n_drop);
    expect_seen("message over several blocks", n_multi);
    expect_seen("cycles at maximum share",     n_maxshare);
    done = 1'b1;
  end

endmodule
