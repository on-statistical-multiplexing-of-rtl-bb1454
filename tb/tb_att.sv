// tb_att: address translation table against an array model.
//
// Random whole-entry writes (keeping status bit and block count
// consistent, as the controller does) and random reads. Checks the read
// port, the busy vector and the number of idle channels each cycle, and
// that reset leaves every entry idle.
module tb_att;

  localparam int unsigned N_CH = 4, N_BLK = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] rd_ch = '0, wr_ch = '0;
  logic [3:0] rd_fba, rd_lba, wr_fba = '0, wr_lba = '0;
  logic rd_b, wr_en = 1'b0, wr_b = 1'b0;
  logic [3:0] rd_nblk, wr_nblk = '0;
  logic [N_CH-1:0] busy;
  logic [2:0] n_idle;

  int checks = 0, failures = 0;
  int m_fba [N_CH], m_lba [N_CH], m_nblk [N_CH];

  always #5 clk = ~clk;

  att #(.N_CH(N_CH), .N_BLK(N_BLK)) dut (.*);

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
    for (int i = 0; i < N_CH; i++) begin
      m_fba[i] = 0; m_lba[i] = 0; m_nblk[i] = 0;
    end
    for (int t = 0; t < 3000; t++) begin
      int idle;
      @(negedge clk);
      rd_ch   = 2'($urandom);
      wr_en   = ($urandom_range(99) < 50);
      wr_ch   = 2'($urandom);
      wr_fba  = 4'($urandom_range(N_BLK - 1));
      wr_lba  = 4'($urandom_range(N_BLK - 1));
      wr_nblk = 4'($urandom_range(3) == 0 ? 0 : $urandom_range(1, N_BLK));
      wr_b    = (wr_nblk != 0);
      #1;
      check(rd_fba == m_fba[rd_ch] && rd_lba == m_lba[rd_ch], "fba/lba read");
      check(rd_nblk == m_nblk[rd_ch] && rd_b == (m_nblk[rd_ch] != 0), "nblk/b read");
      idle = 0;
      for (int i = 0; i < N_CH; i++) begin
        check(busy[i] == (m_nblk[i] != 0), "busy vector");
        if (m_nblk[i] == 0) idle++;
      end
      check(n_idle == idle, $sformatf("n_idle %0d expected %0d", n_idle, idle));
      @(posedge clk);
      if (wr_en) begin
        m_fba[wr_ch] = wr_fba; m_lba[wr_ch] = wr_lba; m_nblk[wr_ch] = wr_nblk;
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
    rst_n = 1'b0;
    #1;
    check(busy == '0 && n_idle == N_CH, "reset clears the table");
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
