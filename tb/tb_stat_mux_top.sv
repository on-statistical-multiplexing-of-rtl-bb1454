// tb_stat_mux_top: end-to-end test of the multiplexer at a reduced size.
//
// Four channels, eight QBM blocks of ten words, 32-character line buffers
// and one output word every three cycles, so that every mechanism (block
// chaining, overflow, partition limit, waiting buffer, line buffer drops)
// happens within a few thousand cycles. Stimulus and checks are in
// smux_env. A watchdog ends the run with a failure if it does not finish.
module tb_stat_mux_top;
  import smux_pkg::*;

  localparam int unsigned N_CH = 4, N_BLK = 8, NBS = 10, LB_DEPTH = 32, SERVICE = 3;
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

  stat_mux_top #(
    .N_CH(N_CH), .N_BLK(N_BLK), .NBS(NBS), .LB_DEPTH(LB_DEPTH), .SERVICE(SERVICE)
  ) dut (
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
    .PHASE_A(2000), .PHASE_B(1500), .PHASE_C(3000), .MAX_MSG(40)
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
    repeat (200000) @(posedge clk);
    env.failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end

endmodule
