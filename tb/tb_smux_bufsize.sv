// tb_smux_bufsize: overflow probability against queueing buffer size, with
// the traffic intensity rho = 0.6, 0.7 and 0.8 as a parameter.
//
// Four copies of the multiplexer differ only in the number of QBM blocks
// (N_BLK = 6, 10, 16, 24 blocks of NBS = 100 words; 10 is the default) and
// all receive the same traffic, so their losses compare directly. Every
// other parameter is at its default. Traffic model as in tb_smux_load:
// Poisson-like message starts, geometric message lengths with a mean of six
// blocks of data (588 characters), terminals sending one character per
// output word time. For each rho the copies are reset, loaded for
// LOAD_CYCLES cycles and drained.
//
// Checks, per copy: every accepted character comes out once, in order, on
// its own channel, inside well-formed frames; nothing is left behind; no
// system error. Across copies: at every rho the largest buffer loses fewer
// characters than the smallest, and the smallest buffer loses more at
// rho = 0.8 than at 0.6. Printed: the overflow probability (lost / offered
// characters) of every size at every rho. The buffer sizes are in blocks;
// converting them to time would need a line rate, which is not fixed here.
module tb_smux_bufsize;
  import smux_pkg::*;

  localparam int unsigned N_CH = N_CH_DEF, NBS = NBS_DEF, SERVICE = SERVICE_DEF;
  localparam int unsigned LB_DEPTH = LB_DEPTH_DEF;
  localparam real MEAN_LEN = 6.0 * (NBS - 2);
  localparam int unsigned LOAD_CYCLES = 3_000_000;
  localparam int N_SZ = 4;
  localparam int unsigned SIZES [N_SZ] = '{6, 10, 16, 24};
  localparam int N_RHO = 3;
  localparam real RHO [N_RHO] = '{0.6, 0.7, 0.8};
  localparam int unsigned LCW = $clog2(LB_DEPTH + 1);

  logic            clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] in_valid = '0;
  lb_word_t        in_word [N_CH];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---- the copies under test and their scoreboards ----
  logic [N_CH-1:0] room [N_SZ];     // line buffer i of copy s can take a character
  logic [N_SZ-1:0] empty_q, sys_err, in_frame;
  longint          n_drop [N_SZ];

  for (genvar s = 0; s < N_SZ; s++) begin : g_sz
    logic [N_CH-1:0] lb_drop;
    logic [LCW-1:0]  lb_level [N_CH];
    logic            out_valid, sys_error;
    tx_word_t        out_word;
    smux_ev_t        ev;

    stat_mux_top #(.N_BLK(SIZES[s])) dut (
      .clk, .rst_n, .in_valid, .in_word, .lb_drop, .lb_level,
      .out_valid, .out_word, .ev, .sys_error
    );

    lb_word_t exp_q [N_CH][$];
    int fst = 0, fch = 0, flen = 0, fpos = 0;

    always_comb
      for (int i = 0; i < N_CH; i++) room[s][i] = (lb_level[i] < LCW'(LB_DEPTH - 2));

    always_comb begin
      empty_q[s] = 1'b1;
      for (int i = 0; i < N_CH; i++) if (exp_q[i].size() != 0) empty_q[s] = 1'b0;
    end
    assign sys_err[s]  = sys_error;
    assign in_frame[s] = (fst != 0);

    always @(posedge clk) begin
      if (!rst_n) begin
        n_drop[s] = 0;
        fst = 0;
        for (int i = 0; i < N_CH; i++) exp_q[i].delete();
      end else begin
        for (int i = 0; i < N_CH; i++) begin
          if (in_valid[i] && !lb_drop[i]) exp_q[i].push_back(in_word[i]);
          if (lb_drop[i]) n_drop[s]++;
        end
        if (out_valid) begin
          case (fst)
            0: begin
              check(out_word.kind == K_CHAN && out_word.w.ch < N_CH,
                    $sformatf("N_BLK=%0d channel header", SIZES[s]));
              fch = out_word.w.ch % N_CH;
              fst = 1;
            end
            1: begin
              check(out_word.kind == K_LEN && out_word.w.ch >= 1 && out_word.w.ch <= NBS - 2,
                    $sformatf("N_BLK=%0d length header", SIZES[s]));
              flen = out_word.w.ch;
              fpos = 0;
              fst = 2;
            end
            default: begin
              check(out_word.kind == K_DATA && exp_q[fch].size() != 0 && out_word.w == exp_q[fch][0],
                    $sformatf("N_BLK=%0d channel %0d data", SIZES[s], fch));
              if (exp_q[fch].size() != 0) void'(exp_q[fch].pop_front());
              fpos++;
              if (fpos == flen) fst = 0;
            end
          endcase
        end
      end
    end
  end

  // ---- traffic generator, shared by all copies ----
  bit          gen_on = 0;
  real         p_start = 0.0;
  int unsigned remain [N_CH];
  logic [7:0]  seq [N_CH];
  longint      n_offered = 0;
  logic [N_CH-1:0] closing = '0;
  int unsigned tick = 0;   // terminal character slots, one per SERVICE cycles

  function automatic int unsigned geometric(real mean);
    // P(len = l) = theta * (1-theta)^(l-1), theta = 1/mean
    real u;
    u = (real'($urandom_range(1_000_000)) + 0.5) / 1_000_001.0;
    return 1 + int'($floor($ln(u) / $ln(1.0 - 1.0 / mean)));
  endfunction

  function automatic bit all_room(input int i);
    for (int s = 0; s < N_SZ; s++) if (!room[s][i]) return 0;
    return 1;
  endfunction

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
      end else if (closing[i] && all_room(i)) begin
        // closing one-character message so that every line buffer drains
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

  // ---- sequencing ----
  real pof [N_RHO][N_SZ];

  initial begin
    for (int i = 0; i < N_CH; i++) begin
      in_word[i] = '0;
      seq[i]     = 8'(i * 64);
      remain[i]  = 0;
    end
    for (int r = 0; r < N_RHO; r++) begin
      rst_n = 1'b0;
      n_offered = 0;
      repeat (5) @(posedge clk);
      rst_n = 1'b1;
      p_start = RHO[r] / real'(SERVICE) / real'(N_CH) / MEAN_LEN;
      gen_on = 1;
      repeat (LOAD_CYCLES) @(posedge clk);
      gen_on = 0;
      while (remain.sum() != 0) @(posedge clk);
      @(posedge clk);
      closing = '1;
      while (closing != '0) @(posedge clk);
      while (empty_q != '1) @(posedge clk);
      repeat (4 * NBS * SERVICE) @(posedge clk);
      check(empty_q == '1, "characters left behind");
      check(sys_err == '0, "system error");
      check(in_frame == '0, "output stopped inside a frame");
      check(n_offered > 10 * MEAN_LEN, "too little traffic for a measurement");
      for (int s = 0; s < N_SZ; s++) begin
        pof[r][s] = real'(n_drop[s]) / real'(n_offered);
        $display("rho %0.1f  N_BLK %2d (%4d characters of QBM): overflow probability %0.4f",
                 RHO[r], SIZES[s], SIZES[s] * (NBS - 2), pof[r][s]);
      end
      check(pof[r][N_SZ-1] < pof[r][0],
            $sformatf("rho %0.1f: the largest buffer does not lose less than the smallest", RHO[r]));
    end
    check(pof[N_RHO-1][0] > pof[0][0], "overflow does not grow with rho");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RHO * (LOAD_CYCLES + 1_000_000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
