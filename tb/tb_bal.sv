// tb_bal: block available list against a free-set model.
//
// Random allocations (only when a block is free) and releases (only of a
// block in use), sometimes both in one cycle. Checks that the offered
// block is the lowest free one, any_free and n_free, and that after
// draining everything back all blocks are free again.
module tb_bal;

  localparam int unsigned N_BLK = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc = 1'b0, rel = 1'b0, any_free;
  logic [3:0] free_blk, rel_blk = '0, n_free;

  int checks = 0, failures = 0;
  bit used [N_BLK];
  int n_used = 0, n_full = 0;

  always #5 clk = ~clk;

  bal #(.N_BLK(N_BLK)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  task automatic step(input int p_alloc);
    int lowest, pick;
    @(negedge clk);
    lowest = -1;
    for (int i = N_BLK - 1; i >= 0; i--) if (!used[i]) lowest = i;
    alloc = (lowest >= 0) && ($urandom_range(99) < p_alloc);
    pick = -1;
    if (n_used > 0 && $urandom_range(99) < 100 - p_alloc) begin
      do pick = $urandom_range(N_BLK - 1); while (!used[pick]);
    end
    rel = (pick >= 0);
    rel_blk = 4'(pick < 0 ? 0 : pick);
    #1;
    check(any_free == (lowest >= 0), "any_free");
    if (lowest >= 0) check(free_blk == lowest, $sformatf("free_blk %0d expected %0d", free_blk, lowest));
    check(n_free == N_BLK - n_used, "n_free");
    if (lowest < 0) n_full++;
    @(posedge clk);
    if (alloc) begin used[lowest] = 1; n_used++; end
    if (rel)   begin used[pick] = 0;   n_used--; end
  endtask

  initial begin
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) step((t / 300) % 2 == 0 ? 75 : 25);
    while (n_used > 0) step(0);
    @(negedge clk);
    alloc = 0; rel = 0;
    #1;
    check(n_free == N_BLK && any_free && free_blk == 0, "all blocks back");
    check(n_full > 0, "list never ran empty");
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
