// tb_fredo_noc_subsystem: end-to-end test of the whole subsystem at its
// default size (5 x 5 x 3 routers, 100-entry FIFOs, APB at one tenth of the
// system clock).
//
// Sources: the built-in random packet generator (through AHB, the bridge,
// APB and the transmitter FIFO into router 0) and, on six other routers'
// external ports, multi-flit wormhole packets to random destinations.
// Scoreboard: each packet word the generator completes on the AHB bus is
// checked against an independent model of its LFSR and fields, and is then
// expected at the receive FIFO as {layer*25 + id, 0, id, layer, data}; each
// external flit is expected as {destination index, 0, id, layer, data}.
// Every word read from the receive FIFO must be expected, and at the end
// every expected word must have been read.
//
// Phases: (1) free flow, with the receive FIFO read every cycle: the time
// between two generator writes must be 20 to 32 system cycles, the cost of
// the 10 MHz APB transfer; (2) the target processor stops reading: the
// receive FIFO fills, back-pressure fills the NoC and the transmitter FIFO
// and finally holds the APB write (PREADY low); (3) reading resumes and
// everything drains. Each mechanism is counted and must have happened:
// APB wait, transmitter FIFO full, receive FIFO full, stalled injection,
// multi-flit delivery, delivery on every layer.
module tb_fredo_noc_subsystem;
  import noc_pkg::*;
  localparam int NR = 75;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gen_en = 1'b0;
  logic  [NR-1:0] xv = '0, xs;
  flit_t [NR-1:0] xf = '0;
  logic        rx_valid, rx_pop = 1'b0, apb_wait;
  logic [31:0] rx_word, gcnt, gerr;
  logic [6:0]  tx_level, rx_level;
  int checks = 0, failures = 0;
  int n_apb_wait = 0, n_tx_full = 0, n_rx_full = 0, n_inj_stall = 0, n_multi = 0;
  int per_layer [3];
  int expected_total = 0, received = 0, gen_seen = 0;
  int expect_cnt [logic [31:0]];
  bit ext_on = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  fredo_noc_subsystem dut (
    .clk(clk), .rst_n(rst_n), .gen_enable(gen_en),
    .ext_in_valid(xv), .ext_in_flit(xf), .ext_in_stall(xs),
    .rx_valid(rx_valid), .rx_word(rx_word), .rx_pop(rx_pop),
    .gen_pkt_count(gcnt), .gen_err_count(gerr),
    .tx_level(tx_level), .rx_level(rx_level), .apb_wait(apb_wait)
  );

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void expect_word(logic [31:0] w);
    if (expect_cnt.exists(w)) expect_cnt[w]++; else expect_cnt[w] = 1;
    expected_total++;
  endfunction

  initial begin : watchdog
    repeat (25000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- Generator model: LFSR history, packets must appear in order. ----
  logic [31:0] m_lfsr;
  logic [31:0] hist [$];
  int          hist_pos = 0;
  always @(posedge clk) begin
    if (!rst_n) m_lfsr <= 32'hACE1_2468;
    else begin
      hist.push_back(m_lfsr);
      m_lfsr <= m_lfsr[0] ? ((m_lfsr >> 1) ^ 32'h8020_0003) : (m_lfsr >> 1);
    end
  end
  function automatic bit from_lfsr(logic [31:0] w);
    for (int k = hist_pos; k < hist.size(); k++) begin
      pkt_t p;
      p.id    = 5'(int'(hist[k][4:0]) % 25);
      p.layer = 2'(int'(hist[k][6:5]) % 3);
      p.data  = hist[k][31:16];
      if (w == {9'd0, p}) begin hist_pos = k + 1; return 1; end
    end
    return 0;
  endfunction

  // ---- Watch the AHB bus for completed generator writes. ----
  bit dphase = 0;
  int last_done = -1;
  bit phase1 = 0;
  int min_gap = 1000, max_gap = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dphase && dut.hready) begin
      pkt_t p;
      p = pkt_t'(dut.hwdata[PKT_W-1:0]);
      gen_seen++;
      checks++;
      if (!from_lfsr(dut.hwdata)) begin failures++; $display("FAIL: generator word %h", dut.hwdata); end
      expect_word({8'(int'(p.layer) * 25 + int'(p.id)), 1'b0, p});
      if (phase1 && last_done >= 0) begin
        if (cyc - last_done < min_gap) min_gap = cyc - last_done;
        if (cyc - last_done > max_gap) max_gap = cyc - last_done;
      end
      last_done = cyc;
    end
    if (dut.htrans == 2'b10 && dut.hready) dphase <= 1'b1;
    else if (dut.hready) dphase <= 1'b0;
  end

  // ---- External multi-flit traffic on six routers. ----
  localparam int NSRC = 6;
  int srcs [NSRC] = '{7, 18, 31, 44, 62, 73};
  int left [NSRC], seq [NSRC];
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSRC; s++) begin
      int r;
      bit start;
      r = srcs[s];
      start = 0;
      if (xv[r] && xs[r]) n_inj_stall++;
      if (xv[r] && !xs[r]) begin
        expect_word({8'(int'(xf[r].dest.z) * 25 + int'(xf[r].dest.y) * 5 + int'(xf[r].dest.x)),
                     1'b0, 5'(int'(xf[r].dest.y) * 5 + int'(xf[r].dest.x)), xf[r].dest.z, xf[r].data});
        if (left[s] > 1) begin
          left[s]--; seq[s]++;
          xf[r].data <= {7'(r), 9'(seq[s])};
          xf[r].tail <= (left[s] == 1);
        end else begin
          left[s] = 0;
          xv[r] <= 1'b0;
          start = 1;
        end
      end else if (!xv[r]) start = 1;
      if (start && ext_on && $urandom_range(0, 9) == 0) begin
        dest_t t;
        t.x = 3'($urandom_range(0, 4));
        t.y = 3'($urandom_range(0, 4));
        t.z = 2'($urandom_range(0, 2));
        left[s] = $urandom_range(2, 4);
        seq[s]++;
        xv[r] <= 1'b1;
        xf[r].dest <= t;
        xf[r].data <= {7'(r), 9'(seq[s])};
        xf[r].tail <= 1'b0;
      end
    end
  end

  // ---- Receive side and mechanism counters. ----
  logic [31:0] prev_word;
  bit          prev_mid = 0;
  always @(posedge clk) if (rst_n) begin
    if (apb_wait) n_apb_wait++;
    if (tx_level == 7'd100) n_tx_full++;
    if (rx_level == 7'd100) n_rx_full++;
    if (rx_valid && rx_pop) begin
      received++;
      checks++;
      if (!expect_cnt.exists(rx_word) || expect_cnt[rx_word] == 0) begin
        failures++; $display("FAIL: unexpected word %h", rx_word);
      end else expect_cnt[rx_word]--;
      if (int'(rx_word[17:16]) < 3) per_layer[rx_word[17:16]]++;
      // Two successive flits of one external packet at one router.
      if (rx_word[15:9] != 7'd0 && prev_word[31:24] == rx_word[31:24] &&
          prev_word[15:9] == rx_word[15:9] && rx_word[8:0] == prev_word[8:0] + 1) n_multi++;
      prev_word = rx_word;
    end
  end

  initial begin
    int w;
    foreach (per_layer[i]) per_layer[i] = 0;
    foreach (left[s]) begin left[s] = 0; seq[s] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Phase 1: free flow.
    rx_pop = 1; gen_en = 1; ext_on = 1; phase1 = 1;
    w = 0;
    while (gcnt < 40 && w < 5000) begin @(posedge clk); w++; end
    phase1 = 0;
    check(min_gap >= 20 && max_gap <= 32, $sformatf("generator interval %0d..%0d cycles", min_gap, max_gap));
    // Phase 2: the processor stops reading.
    #1 rx_pop = 0; ext_on = 0;
    w = 0;
    while (n_apb_wait < 200 && w < 12000) begin
      @(posedge clk); w++;
      if (w % 4000 == 0) $display("phase 2: cycle %0d generated %0d tx %0d rx %0d", w, gcnt, tx_level, rx_level);
    end
    // Phase 3: drain.
    #1 gen_en = 0;
    repeat (40) @(posedge clk);
    #1 rx_pop = 1;
    w = 0;
    while ((received < expected_total || dut.u_gen.state != 0 || |xv) && w < 6000) begin
      @(posedge clk); w++;
    end
    repeat (100) @(posedge clk);
    check(received == expected_total, $sformatf("received %0d of %0d", received, expected_total));
    check(int'(gcnt) == gen_seen, "generator count matches the bus");
    check(gerr == 0, "no bus errors");
    check(n_apb_wait > 0, "APB wait (PREADY low) happened");
    check(n_tx_full > 0, "transmitter FIFO full happened");
    check(n_rx_full > 0, "receive FIFO full happened");
    check(n_inj_stall > 0, "injection stall happened");
    check(n_multi > 0, "multi-flit packet delivered");
    for (int l = 0; l < 3; l++) check(per_layer[l] > 0, $sformatf("delivery on layer %0d", l));
    $display("generated %0d received %0d apb_wait %0d tx_full %0d rx_full %0d inj_stall %0d multi %0d layers %0d/%0d/%0d gap %0d..%0d",
             gcnt, received, n_apb_wait, n_tx_full, n_rx_full, n_inj_stall, n_multi,
             per_layer[0], per_layer[1], per_layer[2], min_gap, max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
