// tb_stat_mux_full: end-to-end test of the multiplexer at its default size.
//
// The multiplexer is instantiated with its default parameters (four
// channels, ten QBM blocks of 100 words, 256-character line buffers, one
// output word every eight cycles); the same stimulus phases as the reduced
// test run long enough for every mechanism to happen. Stimulus and checks are in
// smux_env. A watchdog ends the run with a failure if it does not finish.
module tb_stat_mux_full;
  import smux_pkg::*;

  localparam int unsigned N_CH = N_CH_DEF, N_BLK = N_BLK_DEF, NBS = NBS_DEF,
                          LB_DEPTH = LB_DEPTH_DEF, SERVICE = SERVICE_DEF;
  localparam int unsigned LCW = $clog2(LB_DEPTH + 1);

  logic            clk = 1'b0;
  logic            rst_n, out_valid, sys_error, done;
  logic [N_CH-1:0] in_valid, lb_drop;
  lb_word_t        in_word [N_CH];
  logic [LCW-1:0]  lb_level [N_CH];
  tx_word_t        out_word;
  smux_ev_t        ev;
  int unsigned     max_nblk;

  always #5 clk = ~clk;

  stat_mux_top dut (
    .clk, .rst_n, .in_valid, .in_word, .lb_drop, .lb_level,
    .out_valid, .out_word, .ev, .sys_error
  );

  always_comb begin
    max_nblk = 0;
    for (int i = 0; i < N_CH; i++)
      if (int'(dut.u_att.nblk[i]) > max_nblk) max_nblk = dut.u_att.nblk[i];
  end

  smux_env #(
    .N_CH(N_CH), .N_BLK(N_BLK), .NBS(NBS), .LB_DEPTH(LB_DEPTH), .SERVICE(SERVICE),
    .PHASE_A(20000), .PHASE_B(20000), .PHASE_C(40000), .MAX_MSG(400)
  ) env (
    .clk, .rst_n, .in_valid, .in_word, .lb_drop, .lb_level,
    .out_valid, .out_word, .ev, .sys_error, .max_nblk, .done
  );

  initial begin
    #1 wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    env.failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end

endmodule
