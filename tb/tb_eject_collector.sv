// tb_eject_collector: self-checking test of eject_collector with 75 inputs.
//
// Random flits are offered on random router outputs, each held until the
// collector stops stalling that router; the receive FIFO reports full at
// random. Checked: every accepted flit is written exactly once, as the word
// {router index, 0, id = y*5 + x, layer, data}; nothing is written while
// full; at most one word per cycle; a router that keeps offering is served
// at least once in every 2 x 75 + 2 cycles (round robin); every flit offered
// comes out.
module tb_eject_collector;
  import noc_pkg::*;
  localparam int NR = 75;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  [NR-1:0] v = '0, st;
  flit_t [NR-1:0] f = '0;
  logic        push, full = 0;
  logic [31:0] word;
  int checks = 0, failures = 0, offered = 0, written = 0, full_cycles = 0;
  int expect_cnt [logic [31:0]];
  int last_served [NR];
  bit run = 0;

  always #5 clk = ~clk;

  eject_collector dut (
    .clk(clk), .rst_n(rst_n), .ej_valid(v), .ej_flit(f), .ej_stall(st),
    .rx_push(push), .rx_word(word), .rx_full(full)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // Offer side.
    for (int r = 0; r < NR; r++) begin
      if (v[r] && !st[r]) begin
        logic [31:0] w;
        w = {8'(r), 1'b0, 5'(int'(f[r].dest.y) * 5 + int'(f[r].dest.x)), f[r].dest.z, f[r].data};
        if (expect_cnt.exists(w)) expect_cnt[w]++; else expect_cnt[w] = 1;
        offered++;
        v[r] <= 1'b0;
      end
      if ((!v[r] || !st[r]) && run && (r < 3 || $urandom_range(0, 9) == 0)) begin
        flit_t n;
        n.tail = 1'b1;
        n.dest.x = 3'($urandom_range(0, 4));
        n.dest.y = 3'($urandom_range(0, 4));
        n.dest.z = 2'($urandom_range(0, 2));
        n.data = 16'($urandom);
        v[r] <= 1'b1;
        f[r] <= n;
      end
    end
    full <= run && ($urandom_range(0, 4) == 0);
    if (full) full_cycles++;
    // Write side.
    if (push) begin
      int r;
      checks += 2;
      written++;
      if (full) begin failures++; $display("FAIL: write while full"); end
      if (!expect_cnt.exists(word) || expect_cnt[word] == 0) begin
        failures++; $display("FAIL: unexpected word %h", word);
      end else expect_cnt[word]--;
      r = int'(word[31:24]);
      if (r < 3) begin
        checks++;
        if (last_served[r] > 0 && cyc - last_served[r] > 2 * NR + 2 + full_cycles) begin
          failures++; $display("FAIL: router %0d waited %0d cycles", r, cyc - last_served[r]);
        end
        last_served[r] = cyc;
      end
    end
  end

  initial begin
    foreach (last_served[r]) last_served[r] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run = 1;
    repeat (3000) begin
      @(posedge clk);
      full_cycles = 0;
    end
    run = 0;
    repeat (400) @(posedge clk);
    checks++;
    if (offered != written || offered < 1000) begin
      failures++; $display("FAIL: offered %0d written %0d", offered, written);
    end
    $display("offered %0d written %0d", offered, written);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
