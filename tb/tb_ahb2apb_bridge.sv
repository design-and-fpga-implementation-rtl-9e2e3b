// tb_ahb2apb_bridge: self-checking test of ahb2apb_bridge (PCLK_DIV = 10).
//
// An AHB-Lite master task issues single writes and reads; an APB slave model
// with a small register file answers on APB clock edges (pclk_en) with random
// wait states (PREADY low) and PSLVERR for address 0x3C. Checked: pclk_en is
// high one cycle in ten; PSEL and PENABLE change only on APB
// edges, and PADDR/PWRITE hold while PSEL is high; every access is SETUP then ACCESS; written data reaches the slave
// and reads return it on HRDATA; a slave error becomes the two-cycle AHB
// ERROR response; a transfer without APB wait states takes 20 to 31 system
// cycles (two or three 10 MHz periods at 100 MHz).
module tb_ahb2apb_bridge;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        hsel = 1'b0, hwrite = 1'b0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = 2'b00;
  logic        hready, hresp;
  logic        pclk_en, psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  int checks = 0, failures = 0;
  int waits = 0;
  bit slave_waits = 0;

  always #5 clk = ~clk;

  ahb2apb_bridge dut (
    .hclk(clk), .hresetn(rst_n), .hsel(hsel), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp),
    .pclk_en(pclk_en), .psel(psel), .penable(penable), .paddr(paddr), .pwrite(pwrite),
    .pwdata(pwdata), .prdata(prdata), .pready(pready), .pslverr(pslverr)
  );

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // APB slave model.
  logic [31:0] regs [16];
  logic        wait_now;
  assign pready  = !wait_now;
  assign pslverr = psel && penable && (paddr[5:2] == 4'hF);
  assign prdata  = regs[paddr[5:2]];
  always @(posedge clk) begin
    if (!rst_n) begin
      wait_now <= 1'b0;
      for (int i = 0; i < 16; i++) regs[i] <= 32'(i);
    end else if (pclk_en) begin
      wait_now <= slave_waits && ($urandom_range(0, 1) == 0);
      if (psel && penable && !pready) waits++;
      if (psel && penable && pready) begin
        if (pwrite && paddr[5:2] != 4'hF) regs[paddr[5:2]] <= pwdata;
      end
    end
  end

  // APB signals may only change right after an APB edge.
  logic [34:0] prev_apb;
  logic        prev_en;
  logic        prev_psel, prev_pen;
  int          en_gap = 0, last_en = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    prev_apb  <= {psel, penable, pwrite, paddr[31:0]};
    prev_en   <= pclk_en;
    prev_psel <= psel;
    prev_pen  <= penable;
    if (rst_n && cyc > 5) begin
      if (!prev_en && (psel || prev_apb[34])) begin
        checks++;
        if ({psel, penable, pwrite, paddr} != prev_apb) begin
          failures++; $display("FAIL: APB changed between APB edges");
        end
      end
      if (penable && !prev_pen) begin
        checks++;
        if (!prev_psel) begin failures++; $display("FAIL: ACCESS without SETUP"); end
      end
      if (pclk_en) begin
        if (last_en >= 0) begin
          checks++;
          if (cyc - last_en != 10) begin failures++; $display("FAIL: pclk_en period %0d", cyc - last_en); end
        end
        last_en = cyc;
      end
    end
  end

  // AHB master: one transfer, returns data, error flag and duration.
  task automatic ahb(input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output bit err, output int cycles);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = wr; haddr = a;
    cycles = 0;
    @(posedge clk);
    while (!hready) @(posedge clk);
    #1;
    htrans = 2'b00; hwdata = d;
    err = 0;
    do begin
      @(posedge clk);
      cycles++;
      if (hresp) err = 1;
    end while (!hready);
    rd = hrdata;
    #1 hsel = 0;
  endtask

  initial begin
    logic [31:0] rd;
    bit err;
    int cyc_n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Writes and reads without wait states.
    for (int i = 0; i < 8; i++) begin
      ahb(1, 32'(i * 4), 32'hA5000000 + 32'(i), rd, err, cyc_n);
      check(!err, "write without error");
      check(cyc_n >= 20 && cyc_n <= 31, $sformatf("write took %0d cycles", cyc_n));
    end
    for (int i = 0; i < 8; i++) begin
      ahb(0, 32'(i * 4), 0, rd, err, cyc_n);
      check(!err && rd == 32'hA5000000 + 32'(i), $sformatf("read %0d got %h", i, rd));
      check(cyc_n >= 20 && cyc_n <= 31, $sformatf("read took %0d cycles", cyc_n));
    end
    check(regs[9] == 32'd9, "untouched register");
    // Error.
    ahb(1, 32'h3C, 32'h1234, rd, err, cyc_n);
    check(err, "PSLVERR becomes HRESP");
    // Random traffic with APB wait states.
    slave_waits = 1;
    for (int i = 0; i < 40; i++) begin
      logic [31:0] v;
      int a;
      a = $urandom_range(0, 14);
      v = $urandom;
      ahb(1, 32'(a * 4), v, rd, err, cyc_n);
      ahb(0, 32'(a * 4), 0, rd, err, cyc_n);
      check(!err && rd == v, $sformatf("read back %h exp %h", rd, v));
    end
    check(waits > 0, "APB wait states exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
