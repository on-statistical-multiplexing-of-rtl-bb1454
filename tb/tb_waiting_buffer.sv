// tb_waiting_buffer: fill-and-drain cycles against a queue model.
//
// Each round loads a random number of characters for a random channel,
// then empties the buffer, sometimes overlapping the last writes with the
// first reads. Checks dout, vacant, full and the channel tag.
module tb_waiting_buffer;
  import smux_pkg::*;

  localparam int unsigned N_CH = 4, DEPTH = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  lb_word_t din = '0, dout;
  logic [1:0] wr_ch = '0, tag;
  logic vacant, full;

  int checks = 0, failures = 0;
  lb_word_t model [$];
  int model_tag = 0;

  always #5 clk = ~clk;

  waiting_buffer #(.N_CH(N_CH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  task automatic cyc(input bit w, input bit r);
    @(negedge clk);
    wr_en = w && model.size() < DEPTH;
    rd_en = r;
    din.ch = 8'($urandom);
    din.eom = ($urandom_range(9) == 0);
    wr_ch = 2'(model_tag);
    #1;
    check(vacant == (model.size() == 0), "vacant");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() != 0) begin
      check(dout == model[0], "dout");
      check(tag == model_tag, $sformatf("tag %0d expected %0d", tag, model_tag));
    end
    @(posedge clk);
    if (rd_en && model.size() != 0) void'(model.pop_front());
    if (wr_en) model.push_back(din);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      int n;
      model_tag = $urandom_range(N_CH - 1);
      n = 1 + $urandom_range(DEPTH - 1);
      for (int i = 0; i < n; i++) cyc(1, 0);
      while (model.size() != 0) cyc(0, 1);
      cyc(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
