// tb_output_transmitter: fixed-rate output against a queue model.
//
// Bursts of frame words are pushed whenever space allows. Checks the order
// of the words on the output, that out_valid pulses are exactly SERVICE
// cycles apart while the queue is backlogged and never closer, and that
// space equals DEPTH minus the words held.
module tb_output_transmitter;
  import smux_pkg::*;

  localparam int unsigned DEPTH = 8, SERVICE = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, out_valid;
  tx_word_t din = '0, out_word;
  logic [3:0] space;

  int checks = 0, failures = 0;
  tx_word_t model [$];
  int held = 0, n_push = 0, last_out = -100, cyc = 0, n_out = 0, n_exact = 0;

  always #5 clk = ~clk;

  output_transmitter #(.DEPTH(DEPTH), .SERVICE(SERVICE)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // output side monitor
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      check(model.size() != 0, "word out of an empty queue");
      if (model.size() != 0) check(out_word == model.pop_front(), "output order");
      check(cyc - last_out >= SERVICE, "output faster than the service interval");
      if (cyc - last_out == SERVICE) n_exact++;
      last_out = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      held = n_push - n_out - int'(out_valid);
      check(space == DEPTH - held, $sformatf("space %0d expected %0d", space, DEPTH - held));
      push = (space != 0) && ($urandom_range(99) < ((t / 200) % 2 == 0 ? 60 : 5));
      din.kind = tx_kind_e'($urandom_range(2));
      din.w = 9'($urandom);
      @(posedge clk);
      if (push) begin
        model.push_back(din);
        n_push++;
      end
    end
    @(negedge clk) push = 0;
    repeat (DEPTH * SERVICE + 5) @(posedge clk);
    check(model.size() == 0, "words left behind");
    check(n_exact > 100, "back-to-back rate never reached");
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
