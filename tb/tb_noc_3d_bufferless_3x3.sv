// tb_noc_3d_bufferless_3x3: the mesh in its second size, 3 x 3 routers in
// each of three layers (27 routers), built from bufferless routers (one flit
// register per input instead of a FIFO).
//
// Same checks as the 75-router test: a single flit from (0,0,0) to (2,2,2),
// six hops, must reach the destination's local output 7 cycles after
// injection; then uniform random, hotspot (all to the centre router) and
// neighbour traffic from six sources with random ejection stalls. Every flit
// must leave at its destination, in order per source and destination,
// without interleaving packets, and every flit sent must arrive; injection
// and ejection stalls, traffic between layers and multi-flit packets must all
// have happened.
module tb_noc_3d_bufferless_3x3;
  import noc_pkg::*;
  localparam int NR = 27;
  logic clk = 1'b0, rst_n = 1'b0;
  logic  [NR-1:0] iv = '0, is, ov, os = '0;
  flit_t [NR-1:0] ifl = '0, ofl;
  int checks = 0, failures = 0;
  int inj_stalls = 0, ej_stalls = 0, inter_layer = 0, multi_flit = 0;
  int sent = 0, rcvd = 0;
  bit traffic_on = 0;

  always #5 clk = ~clk;

  noc_3d #(.MESH_X(3), .MESH_Y(3), .LAYERS(3), .BUFFERED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .local_in_valid(iv), .local_in_flit(ifl),
    .local_in_stall(is), .local_out_valid(ov), .local_out_flit(ofl),
    .local_out_stall(os)
  );

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ridx(dest_t t);
    return int'(t.z) * 9 + int'(t.y) * 3 + int'(t.x);
  endfunction

  // data = {source router (7 bits), sequence (9 bits)}
  int  left [NR];
  int  seq  [NR];
  bit  active [NR];
  int  last_seq [NR][NR];   // [src][dst]
  bit  busy [NR];
  int  owner [NR];
  int  pattern = 0;      // 0 uniform, 1 hotspot, 2 neighbour
  bit  one_shot = 0;     // router 0 sends one flit to (4,4,2)
  bit  draining = 0;     // finish packets, start no new ones
  int  cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (one_shot) begin
      one_shot = 0;
      left[0]  = 1;
      seq[0]++;
      iv[0]   <= 1'b1;
      ifl[0]  <= '{tail: 1'b1, dest: '{z: 2'd2, y: 3'd2, x: 3'd2}, data: {7'd0, 9'(seq[0])}};
    end else
    for (int r = 0; r < NR; r++) if (active[r] || iv[r]) begin
      bit start;
      start = 0;
      if (iv[r] && !is[r]) begin
        sent++;
        if (left[r] > 1) begin
          left[r]--;
          seq[r]++;
          ifl[r].data <= {7'(r), 9'(seq[r])};
          ifl[r].tail <= (left[r] == 1);
        end else begin
          left[r] = 0;
          iv[r] <= 1'b0;
          start = 1;
        end
      end else if (!iv[r]) start = 1;
      if (start && active[r] && !draining && seq[r] < 500 && $urandom_range(0, 7) == 0) begin
        dest_t t;
        if (pattern == 1) begin           // hotspot: all to the centre router
          t = '{z: 2'd1, y: 3'd1, x: 3'd1};
        end else if (pattern == 2) begin  // neighbour: the next router east
          t.x = 3'(((r % 9) % 3 + 1) % 3);
          t.y = 3'((r % 9) / 3);
          t.z = 2'(r / 9);
        end else begin                    // uniform random
          t.x = 3'($urandom_range(0, 2));
          t.y = 3'($urandom_range(0, 2));
          t.z = 2'($urandom_range(0, 2));
        end
        left[r] = $urandom_range(1, 4);
        seq[r]++;
        iv[r]       <= 1'b1;
        ifl[r].dest <= t;
        ifl[r].data <= {7'(r), 9'(seq[r])};
        ifl[r].tail <= (left[r] == 1);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) os[r] <= traffic_on && ($urandom_range(0, 3) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (|(iv & is)) inj_stalls++;
    for (int r = 0; r < NR; r++) begin
      if (busy[r] && os[r]) ej_stalls++;   // stall in the middle of a packet
      if (ov[r] && !os[r]) begin
        int src, sq;
        src = int'(ofl[r].data[15:9]);
        sq  = int'(ofl[r].data[8:0]);
        rcvd++;
        checks += 3;
        if (ridx(ofl[r].dest) != r) begin
          failures++; $display("FAIL: flit for %0d left at %0d", ridx(ofl[r].dest), r);
        end
        if (sq <= last_seq[src][r]) begin
          failures++; $display("FAIL: order %0d->%0d seq %0d after %0d", src, r, sq, last_seq[src][r]);
        end
        last_seq[src][r] = sq;
        if (busy[r] && owner[r] != src) begin
          failures++; $display("FAIL: packets interleaved at %0d", r);
        end
        if (busy[r] || !ofl[r].tail) multi_flit++;
        busy[r]  = !ofl[r].tail;
        owner[r] = src;
        if (src / 9 != r / 9) inter_layer++;
      end
    end
  end

  initial begin
    int chosen;
    for (int r = 0; r < NR; r++) begin
      left[r] = 0; seq[r] = 0; active[r] = 0; busy[r] = 0; owner[r] = 0;
      for (int k = 0; k < NR; k++) last_seq[r][k] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Latency of one flit over ten hops.
    @(negedge clk);
    one_shot = 1;
    @(posedge clk); #1;   // iv[0] now high: flit enters router 0 at the next edge
    @(posedge clk); #1;
    for (int c = 1; c <= 20; c++) begin
      if (ov[26]) begin
        checks++;
        if (c != 7) begin failures++; $display("FAIL: 6-hop latency %0d cycles, expected 7", c); end
        break;
      end
      @(posedge clk); #1;
    end
    repeat (3) @(posedge clk);
    // Random traffic from twelve sources.
    chosen = 0;
    while (chosen < 6) begin
      int r;
      r = $urandom_range(0, NR - 1);
      if (!active[r]) begin active[r] = 1; chosen++; end
    end
    traffic_on = 1;
    for (int ph = 0; ph < 3; ph++) begin
      pattern = ph;
      repeat (ph == 0 ? 800 : 400) @(posedge clk);
      $display("pattern %0d done at cycle %0d, flits %0d, injection stalls %0d", ph, cycle, rcvd, inj_stalls);
    end
    // Let the last packets finish, then drain.
    draining = 1;
    for (int w = 0; w < 300 && |iv; w++) @(posedge clk);
    traffic_on = 0;
    repeat (100) @(posedge clk);
    checks += 5;
    if (sent != rcvd) begin failures++; $display("FAIL: sent %0d received %0d", sent, rcvd); end
    if (inj_stalls == 0) begin failures++; $display("FAIL: no injection stall"); end
    if (ej_stalls == 0) begin failures++; $display("FAIL: no ejection stall"); end
    if (inter_layer == 0) begin failures++; $display("FAIL: no inter-layer traffic"); end
    if (multi_flit == 0) begin failures++; $display("FAIL: no multi-flit packet"); end
    $display("flits %0d inj_stalls %0d ej_stalls %0d inter_layer %0d multi %0d",
             rcvd, inj_stalls, ej_stalls, inter_layer, multi_flit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
