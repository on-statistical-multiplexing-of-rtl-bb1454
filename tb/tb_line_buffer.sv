// tb_line_buffer: random write/read traffic against a queue model.
//
// An 8-deep buffer with threshold 4 is written and read at random. The
// model keeps the accepted characters and the number of end-of-message
// marks; every cycle it checks dout, empty, count, req (count >= 4 or a
// complete message held) and drop (write while full without a read).
module tb_line_buffer;
  import smux_pkg::*;

  localparam int unsigned DEPTH = 8, THR = 4;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     in_valid = 1'b0, rd_en = 1'b0;
  lb_word_t in_word = '0;
  logic     drop, empty, req;
  lb_word_t dout;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  lb_word_t model [$];
  int n_req_eom = 0, n_drop = 0;

  always #5 clk = ~clk;

  line_buffer #(.DEPTH(DEPTH), .THRESHOLD(THR)) dut (.*);

  function automatic int eoms();
    int n = 0;
    foreach (model[i]) if (model[i].eom) n++;
    return n;
  endfunction

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
      bit exp_drop, rd_ok;
      // drive on the falling edge
      @(negedge clk);
      in_valid = ($urandom_range(99) < (t % 400 < 200 ? 70 : 30));
      in_word.ch  = 8'($urandom);
      in_word.eom = ($urandom_range(99) < 15);
      rd_en    = ($urandom_range(99) < (t % 400 < 200 ? 30 : 70));
      #1;
      check(empty == (model.size() == 0), "empty");
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      if (model.size() != 0) check(dout == model[0], "dout");
      check(req == (model.size() >= THR || eoms() > 0), "req");
      if (req && model.size() < THR) n_req_eom++;
      rd_ok    = rd_en && model.size() != 0;
      exp_drop = in_valid && model.size() == DEPTH && !rd_ok;
      check(drop == exp_drop, "drop");
      if (drop) n_drop++;
      @(posedge clk);
      if (rd_ok) void'(model.pop_front());
      if (in_valid && !exp_drop) model.push_back(in_word);
    end
    check(n_req_eom > 0, "request by end of message never seen");
    check(n_drop > 0, "drop never seen");
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
