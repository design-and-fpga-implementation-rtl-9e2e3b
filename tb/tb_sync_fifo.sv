// tb_sync_fifo: self-checking test of sync_fifo.
//
// Two instances: a 5-entry FIFO driven with random pushes and pops (also when
// full and when empty) against a queue model, checking head data, full,
// empty and count every cycle; and the default 100-entry FIFO, filled until
// full (it must take exactly 100 entries) and drained in order.
module tb_sync_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Small FIFO, random traffic
  localparam int D = 5;
  logic       wr, rd, full, empty;
  logic [7:0] wd, rdat;
  logic [2:0] cnt;
  logic [7:0] q[$];

  sync_fifo #(.WIDTH(8), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr), .wr_data(wd), .rd_en(rd),
    .rd_data(rdat), .full(full), .empty(empty), .count(cnt)
  );

  // Default-size FIFO
  logic        wr2, rd2, full2, empty2;
  logic [24:0] wd2, rdat2;
  logic [6:0]  cnt2;
  sync_fifo dut100 (
    .clk(clk), .rst_n(rst_n), .wr_en(wr2), .wr_data(wd2), .rd_en(rd2),
    .rd_data(rdat2), .full(full2), .empty(empty2), .count(cnt2)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    wr = 0; rd = 0; wd = 0; wr2 = 0; rd2 = 0; wd2 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Random phase on the small FIFO; respects the full rule (push when full
    // only together with a pop).
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(cnt) == q.size(), "count");
      if (q.size() > 0) check(rdat == q[0], $sformatf("head data %0h exp %0h", rdat, q[0]));
      rd = (q.size() > 0) && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      wr = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30)) && (q.size() < D || rd);
      wd = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wd);
    end
    @(negedge clk) wr = 0; rd = 0;
    // Fill the 100-entry FIFO.
    n = 0;
    while (!full2 && n < 200) begin
      @(negedge clk);
      wr2 = 1; wd2 = 25'(n * 7 + 3);
      @(posedge clk); #1;
      n++;
      wr2 = 0;
    end
    check(n == 100, $sformatf("100-entry FIFO took %0d entries", n));
    check(int'(cnt2) == 100, "count 100 when full");
    // Drain in order.
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      check(rdat2 == 25'(k * 7 + 3), $sformatf("100-entry order at %0d", k));
      rd2 = 1;
      @(posedge clk); #1;
      rd2 = 0;
    end
    @(negedge clk);
    check(empty2, "100-entry FIFO empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
