// tb_smux_load: the multiplexer at its default size under random traffic
// of traffic intensity rho = 0.6, 0.7, 0.8 and 0.9.
//
// Traffic model: on each channel, messages (bursts) start as a Bernoulli
// approximation of a Poisson process and have geometrically distributed
// lengths with a mean of six blocks of data (6 * (NBS-2) characters), so
// that one block plays the role of a packet of one sixth of the mean
// message. A terminal sends its characters at the speed of the output
// line, one per SERVICE cycles; a burst that starts while the previous one
// is still being sent queues behind it.
// rho is the offered character rate of all channels together divided by
// the output rate of one word per SERVICE cycles.
//
// For each rho the multiplexer is reset, loaded for a fixed time, then
// drained. Checks: every accepted character comes out once, in order, on
// its own channel, inside well-formed frames; nothing is left behind; no
// system error. Reported per rho: the fraction of offered characters that
// were lost (overflow), the mean character delay and the mean message
// delay (from the last character's arrival to its transmission) and the
// mean packet delay (the same for the last character of each block, one
// block being one packet), in output word times. The mean message delay at rho = 0.9 must exceed that at 0.6.
module tb_smux_load;
  import smux_pkg::*;

  localparam int unsigned N_CH = N_CH_DEF, NBS = NBS_DEF, SERVICE = SERVICE_DEF;
  localparam int unsigned LB_DEPTH = LB_DEPTH_DEF;
  localparam real MEAN_LEN = 6.0 * (NBS - 2);
  localparam int unsigned LOAD_CYCLES = 4_000_000;
  localparam int N_RHO = 4;
  localparam real RHO [N_RHO] = '{0.6, 0.7, 0.8, 0.9};

  logic            clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] in_valid = '0, lb_drop;
  lb_word_t        in_word [N_CH];
  logic [$clog2(LB_DEPTH+1)-1:0] lb_level [N_CH];
  logic            out_valid, sys_error;
  tx_word_t        out_word;
  smux_ev_t        ev;

  always #5 clk = ~clk;

  stat_mux_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---- generator ----
  bit          gen_on = 0;
  real         p_start = 0.0;
  int unsigned remain [N_CH];
  logic [7:0]  seq [N_CH];
  longint      n_offered = 0;
  logic [N_CH-1:0] closing = '0;

  function automatic int unsigned geometric(real mean);
    // P(len = l) = theta * (1-theta)^(l-1), theta = 1/mean
    real u;
    u = (real'($urandom_range(1_000_000)) + 0.5) / 1_000_001.0;
    return 1 + int'($floor($ln(u) / $ln(1.0 - 1.0 / mean)));
  endfunction

  int unsigned tick = 0;   // terminal character slots, one per SERVICE cycles

  always @(posedge clk) begin
    tick <= (tick == SERVICE - 1) ? 0 : tick + 1;
    for (int i = 0; i < N_CH; i++) begin
      if (gen_on && real'($urandom_range(1_000_000)) / 1.0e6 < p_start)
        remain[i] += geometric(MEAN_LEN);
      if (remain[i] != 0 && tick == 0) begin
        in_valid[i]    <= 1'b1;
        in_word[i].ch  <= seq[i];
        in_word[i].eom <= (remain[i] == 1);
        seq[i]         <= seq[i] + 1'b1;
        remain[i]--;
        n_offered++;
      end else if (closing[i] && lb_level[i] < LB_DEPTH - 2) begin
        // closing one-character message so that the line buffer drains
        in_valid[i]    <= 1'b1;
        in_word[i].ch  <= seq[i];
        in_word[i].eom <= 1'b1;
        seq[i]         <= seq[i] + 1'b1;
        closing[i]     <= 1'b0;
      end else begin
        in_valid[i] <= 1'b0;
      end
    end
  end

  // ---- scoreboard ----
  lb_word_t exp_q  [N_CH][$];
  longint   time_q [N_CH][$];
  longint   now = 0, n_drop = 0, n_sent = 0, n_msg = 0, delay_sum = 0, msg_delay_sum = 0,
            n_pkt = 0, pkt_delay_sum = 0;
  int       fst = 0, fch = 0, flen = 0, fpos = 0;

  always @(posedge clk) begin
    now++;
    if (rst_n) begin
      for (int i = 0; i < N_CH; i++) begin
        if (in_valid[i] && !lb_drop[i]) begin
          exp_q[i].push_back(in_word[i]);
          time_q[i].push_back(now);
        end
        if (lb_drop[i]) n_drop++;
      end
      if (out_valid) begin
        case (fst)
          0: begin
            check(out_word.kind == K_CHAN && out_word.w.ch < N_CH, "channel header");
            fch = out_word.w.ch % N_CH;
            fst = 1;
          end
          1: begin
            check(out_word.kind == K_LEN && out_word.w.ch >= 1 && out_word.w.ch <= NBS - 2, "length header");
            flen = out_word.w.ch;
            fpos = 0;
            fst = 2;
          end
          default: begin
            checks++;
            if (out_word.kind != K_DATA || exp_q[fch].size() == 0 || out_word.w != exp_q[fch][0]) begin
              failures++;
              if (failures < 10) $display("FAIL @%0t: channel %0d data", $time, fch);
            end
            if (exp_q[fch].size() != 0) begin
              longint d;
              void'(exp_q[fch].pop_front());
              d = now - time_q[fch].pop_front();
              delay_sum += d;
              if (out_word.w.eom) begin
                msg_delay_sum += d;
                n_msg++;
              end
              if (fpos + 1 == flen) begin
                pkt_delay_sum += d;
                n_pkt++;
              end
            end
            n_sent++;
            fpos++;
            if (fpos == flen) fst = 0;
          end
        endcase
      end
    end
  end

  function automatic bit drained();
    for (int i = 0; i < N_CH; i++) if (exp_q[i].size() != 0) return 0;
    return 1;
  endfunction

  real msg_delay [N_RHO];

  initial begin
    for (int i = 0; i < N_CH; i++) begin
      in_word[i] = '0;
      seq[i]     = 8'(i * 64);
      remain[i]  = 0;
    end
    for (int r = 0; r < N_RHO; r++) begin
      real ovf;
      rst_n = 1'b0;
      n_offered = 0; n_drop = 0; n_sent = 0; n_msg = 0; delay_sum = 0; msg_delay_sum = 0;
      n_pkt = 0; pkt_delay_sum = 0;
      fst = 0;
      repeat (5) @(posedge clk);
      rst_n = 1'b1;
      // offered characters per cycle on one channel = p_start * MEAN_LEN
      p_start = RHO[r] / real'(SERVICE) / real'(N_CH) / MEAN_LEN;
      gen_on = 1;
      repeat (LOAD_CYCLES) @(posedge clk);
      gen_on = 0;
      while (remain.sum() != 0) @(posedge clk);
      @(posedge clk);
      closing = '1;
      while (closing != '0) @(posedge clk);
      while (!drained()) @(posedge clk);
      repeat (4 * NBS * SERVICE) @(posedge clk);
      check(drained(), "characters left behind");
      check(!sys_error, "system error");
      check(fst == 0, "output stopped inside a frame");
      check(n_msg > 20, "too few messages for a measurement");
      ovf = real'(n_drop) / real'(n_offered);
      msg_delay[r] = real'(msg_delay_sum) / real'(n_msg) / real'(SERVICE);
      $display("rho %0.1f: offered %0d chars, lost %0.4f, mean char delay %0.1f, mean message delay %0.1f, mean packet delay %0.1f (output word times), %0d messages",
               RHO[r], n_offered, ovf, real'(delay_sum) / real'(n_sent) / real'(SERVICE),
               msg_delay[r], real'(pkt_delay_sum) / real'(n_pkt) / real'(SERVICE), n_msg);
      if (r == N_RHO - 1) check(msg_delay[r] > msg_delay[0], "message delay does not grow with rho");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (LOAD_CYCLES + 1_000_000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
