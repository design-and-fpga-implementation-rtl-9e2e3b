// tb_apb_noc_if: self-checking test of apb_noc_if.
//
// An APB master task drives transfers on APB edges (pclk_en one cycle in
// four here). Checked: a TX write pushes exactly one flit, head and tail,
// with x = id mod 5, y = id div 5, z = layer and the data; a packet outside
// the mesh, a write to a read-only register and an unknown address give
// PSLVERR and push nothing; while the transmitter FIFO reports full the
// write is held with PREADY low and completes once there is room; STATUS and
// COUNT read back the full flag and the number of accepted packets.
module tb_apb_noc_if;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        pclk_en, psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic        tx_push, tx_full = 0;
  flit_t       tx_flit;
  int checks = 0, failures = 0, pushes = 0;
  flit_t last_flit;
  int div = 0;

  always #5 clk = ~clk;
  always @(posedge clk) div <= (div == 3) ? 0 : div + 1;
  assign pclk_en = (div == 3);

  apb_noc_if dut (
    .clk(clk), .rst_n(rst_n), .pclk_en(pclk_en), .psel(psel), .penable(penable),
    .paddr(paddr), .pwrite(pwrite), .pwdata(pwdata), .prdata(prdata),
    .pready(pready), .pslverr(pslverr), .tx_push(tx_push), .tx_flit(tx_flit),
    .tx_full(tx_full)
  );

  always @(posedge clk) if (tx_push) begin pushes++; last_flit = tx_flit; end

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

  // One APB transfer; returns read data, error and number of ACCESS cycles.
  task automatic apb(input bit wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output bit err, output int acc);
    @(posedge clk); while (!pclk_en) @(posedge clk);
    #1 psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(posedge clk); while (!pclk_en) @(posedge clk);
    #1 penable = 1;
    acc = 0;
    forever begin
      @(posedge clk); while (!pclk_en) @(posedge clk);
      acc++;
      if (pready) break;
    end
    rd = prdata; err = pslverr;
    #1 psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] rd;
    bit err;
    int acc, n0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      pkt_t p;
      p.id = 5'($urandom_range(0, 24));
      p.layer = 2'($urandom_range(0, 2));
      p.data = 16'($urandom);
      n0 = pushes;
      apb(1, 32'h0, {9'd0, p}, rd, err, acc);
      @(posedge clk);
      check(!err && acc == 1, "TX write accepted at once");
      check(pushes == n0 + 1, "one push per write");
      check(last_flit.tail && int'(last_flit.dest.x) == int'(p.id) % 5 &&
            int'(last_flit.dest.y) == int'(p.id) / 5 && last_flit.dest.z == p.layer &&
            last_flit.data == p.data, $sformatf("flit fields for id %0d", p.id));
    end
    // Out-of-mesh packets and bad addresses.
    n0 = pushes;
    apb(1, 32'h0, {9'd0, 5'd25, 2'd0, 16'h1}, rd, err, acc); check(err, "id 25 refused");
    apb(1, 32'h0, {9'd0, 5'd3, 2'd3, 16'h1}, rd, err, acc);  check(err, "layer 3 refused");
    apb(1, 32'h4, 32'h0, rd, err, acc);                       check(err, "write to STATUS refused");
    apb(0, 32'hC, 32'h0, rd, err, acc);                       check(err, "unknown address refused");
    check(pushes == n0, "refused writes push nothing");
    // Back-pressure.
    tx_full = 1;
    fork
      begin repeat (40) @(posedge clk); #1 tx_full = 0; end
    join_none
    apb(1, 32'h0, {9'd0, 5'd7, 2'd1, 16'hBEEF}, rd, err, acc);
    @(posedge clk);
    check(!err && acc > 5, $sformatf("write held while full (%0d access cycles)", acc));
    check(pushes == n0 + 1 && last_flit.data == 16'hBEEF, "held write delivered once");
    // Status and count.
    apb(0, 32'h8, 0, rd, err, acc);
    check(!err && rd == 31, $sformatf("COUNT %0d", rd));
    tx_full = 1;
    apb(0, 32'h4, 0, rd, err, acc);
    check(!err && rd == 1, "STATUS full");
    tx_full = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
