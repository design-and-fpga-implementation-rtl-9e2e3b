// tb_trng_pkt_gen: self-checking test of trng_pkt_gen.
//
// An AHB-Lite slave model inserts random wait states (HREADY low) and answers
// one transfer in 17 with an ERROR response. Checked: every address phase is
// a NONSEQ word write to address 0 and holds while HREADY is low; the data of
// each transfer equals the next packet of an independent model of the
// 32-bit LFSR (x^32 + x^22 + x^2 + x + 1) and of the field folding
// (router id mod 25, layer mod 3); every id and layer is inside the mesh;
// pkt_count and err_count match the transfers and errors seen; nothing is
// issued while enable is low.
module tb_trng_pkt_gen;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] haddr, hwdata, pcnt, ecnt;
  logic [1:0]  htrans;
  logic        hwrite, hready = 1'b1, hresp = 1'b0;
  logic [2:0]  hsize;
  int checks = 0, failures = 0;
  int xfers = 0, errs = 0, waits = 0;
  logic [31:0] m_lfsr;
  bit  dphase = 0;

  always #5 clk = ~clk;

  trng_pkt_gen dut (
    .hclk(clk), .hresetn(rst_n), .enable(en), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hsize(hsize), .hwdata(hwdata), .hready(hready), .hresp(hresp),
    .pkt_count(pcnt), .err_count(ecnt)
  );

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: the LFSR steps every cycle after reset; the packet is taken from
  // the LFSR value of the cycle in which the generator loads it. The model
  // keeps its own copy and the monitor remembers the value for each cycle.
  logic [31:0] hist [$];
  always @(posedge clk) begin
    if (!rst_n) m_lfsr <= 32'hACE1_2468;
    else m_lfsr <= m_lfsr[0] ? ((m_lfsr >> 1) ^ 32'h8020_0003) : (m_lfsr >> 1);
  end

  // Slave: random wait states, occasional two-cycle error.
  int  err_phase = 0;
  logic [31:0] exp_data;
  int  load_cycle;
  always @(posedge clk) if (rst_n) begin
    // Address phase accepted?
    if (htrans == 2'b10 && hready) begin
      checks += 3;
      if (haddr != 32'h0) begin failures++; $display("FAIL: address"); end
      if (!hwrite) begin failures++; $display("FAIL: not a write"); end
      if (hsize != 3'b010) begin failures++; $display("FAIL: size"); end
      dphase <= 1'b1;
    end
    if (dphase && hready) begin
      pkt_t p;
      p = pkt_t'(hwdata[PKT_W-1:0]);
      xfers++;
      checks += 2;
      if (int'(p.id) >= 25 || int'(p.layer) >= 3) begin failures++; $display("FAIL: field range"); end
      if (!in_model(hwdata)) begin failures++; $display("FAIL: data %h not from the LFSR sequence", hwdata); end
      if (!(htrans == 2'b10 && hready)) dphase <= 1'b0;
    end
    // Response for the next cycle.
    if (err_phase == 1) begin
      hready <= 1'b1; hresp <= 1'b1; err_phase <= 0; errs++;
    end else if (dphase && !hready) begin
      hready <= 1'b1; hresp <= 1'b0;
    end else if ($urandom_range(0, 16) == 0 && htrans == 2'b10 && hready) begin
      hready <= 1'b0; hresp <= 1'b1; err_phase <= 1;
    end else begin
      hready <= ($urandom_range(0, 2) != 0); hresp <= 1'b0;
      if (!($urandom_range(0, 2) != 0)) waits++;
    end
  end

  // The packet must be the one the LFSR held in some earlier cycle, in
  // increasing order: search forward in the history of LFSR values.
  int hist_pos = 0;
  always @(posedge clk) if (rst_n) hist.push_back(m_lfsr);

  function automatic bit in_model(logic [31:0] w);
    for (int k = hist_pos; k < hist.size(); k++) begin
      pkt_t p;
      p.id    = 5'(int'(hist[k][4:0]) % 25);
      p.layer = 2'(int'(hist[k][6:5]) % 3);
      p.data  = hist[k][31:16];
      if (w == {9'd0, p}) begin
        hist_pos = k + 1;
        return 1;
      end
    end
    return 0;
  endfunction

  // Address phase must hold while HREADY is low.
  logic [1:0] prev_trans;
  logic       prev_ready;
  always @(posedge clk) begin
    prev_trans <= htrans;
    prev_ready <= hready;
    if (rst_n && prev_trans == 2'b10 && !prev_ready && err_phase == 0) begin
      checks++;
      if (htrans != 2'b10) begin failures++; $display("FAIL: address phase dropped during wait"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    check(htrans == 2'b00 && pcnt == 0, "idle while disabled");
    en = 1;
    repeat (3000) @(posedge clk);
    #1 en = 0;
    repeat (20) @(posedge clk);
    check(htrans == 2'b00, "stops when disabled");
    check(int'(pcnt) == xfers, $sformatf("pkt_count %0d vs %0d", pcnt, xfers));
    check(int'(ecnt) == errs, $sformatf("err_count %0d vs %0d", ecnt, errs));
    check(xfers > 500, "enough transfers");
    check(errs > 0, "error response exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
