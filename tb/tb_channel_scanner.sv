// tb_channel_scanner: round-robin selection against a model.
//
// Random request vectors over four channels; the model keeps the channel
// after the last one taken and searches from it. Checks grant_valid and
// grant_ch every cycle, and that a channel that keeps asking is offered
// within four services.
module tb_channel_scanner;

  localparam int unsigned N_CH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] req = '0;
  logic advance = 1'b0;
  logic grant_valid;
  logic [1:0] grant_ch;

  int checks = 0, failures = 0;
  int start = 0;
  int wait_cnt [N_CH];

  always #5 clk = ~clk;

  channel_scanner #(.N_CH(N_CH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int exp_ch;
      @(negedge clk);
      req     = (t % 2 == 0) ? 4'($urandom) : '1;
      advance = ($urandom_range(99) < 60);
      #1;
      exp_ch = -1;
      for (int k = 0; k < N_CH; k++)
        if (exp_ch < 0 && req[(start + k) % N_CH]) exp_ch = (start + k) % N_CH;
      check(grant_valid == (exp_ch >= 0), "grant_valid");
      if (exp_ch >= 0) check(grant_ch == exp_ch, $sformatf("grant %0d expected %0d", grant_ch, exp_ch));
      @(posedge clk);
      if (advance && exp_ch >= 0) begin
        start = (exp_ch + 1) % N_CH;
        for (int i = 0; i < N_CH; i++)
          if (req[i] && i != exp_ch) wait_cnt[i]++; else wait_cnt[i] = 0;
        for (int i = 0; i < N_CH; i++) check(wait_cnt[i] < N_CH, "channel starved");
      end
    end
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
