// tb_qbm: queueing buffer memory against an array model.
//
// Writes the whole memory, then mixes random reads and writes. A read
// returns the addressed word one cycle later; the check compares it with
// the model's value at the time of the read.
module tb_qbm;

  localparam int unsigned N_BLK = 10, NBS = 100, WIDTH = 9, DEPTH = N_BLK * NBS;

  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  always #5 clk = ~clk;

  qbm #(.N_BLK(N_BLK), .NBS(NBS), .WIDTH(WIDTH)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    logic pend;
    logic [WIDTH-1:0] exp;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(a); wdata = WIDTH'($urandom);
      model[a] = wdata;
    end
    pend = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (pend) check(rdata == exp, $sformatf("read %0h expected %0h", rdata, exp));
      en = ($urandom_range(9) != 0);
      we = ($urandom_range(2) == 0);
      addr = 10'($urandom_range(DEPTH - 1));
      wdata = WIDTH'($urandom);
      pend = en && !we;
      exp = model[addr];
      if (en && we) model[addr] = wdata;
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
