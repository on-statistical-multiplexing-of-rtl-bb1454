// tb_aol: arrival order list against a queue model.
//
// Random pushes of channel numbers (never beyond the number of blocks) and
// pops (never from an empty list), sometimes in the same cycle. Checks
// head and empty every cycle.
module tb_aol;

  localparam int unsigned N_CH = 4, N_BLK = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0, empty;
  logic [1:0] push_ch = '0, head;

  int checks = 0, failures = 0;
  int model [$];

  always #5 clk = ~clk;

  aol #(.N_CH(N_CH), .N_BLK(N_BLK)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int p;
      p = (t / 250) % 2 == 0 ? 70 : 30;
      @(negedge clk);
      pop  = model.size() != 0 && $urandom_range(99) < 100 - p;
      push = (model.size() < N_BLK || pop) && $urandom_range(99) < p;
      push_ch = 2'($urandom);
      #1;
      check(empty == (model.size() == 0), "empty");
      if (model.size() != 0) check(head == model[0], $sformatf("head %0d expected %0d", head, model[0]));
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_ch);
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
