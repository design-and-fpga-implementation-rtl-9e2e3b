// tb_fredo_router: self-checking test of one fredo_router, buffered and
// bufferless.
//
// Two routers at (1, 1, 1), one with 4-flit input buffers and one with a
// single flit register per input, each driven on all seven inputs by random
// packets of 1 to 3 flits to random destinations in the 5 x 5 x 3 mesh, with
// random stall on the outputs. Every flit carries its input number and a
// sequence number. Checked for every flit that leaves: it leaves on the port
// that dimension-ordered routing (x, then y, then layer) gives for its
// destination; flits of one input leave in order; a packet's flits are not
// interleaved with another packet's on the same output; nothing leaves into
// a stall; in the end every flit sent has left. Also checked: a flit offered
// to an idle router leaves at the next clock edge (one cycle per hop), and
// the counters show that stalls and output contention both occurred.
module tb_fredo_router;
  import noc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int stalls_seen = 0, contention_seen = 0;
  bit traffic_on = 0;
  bit stall_on = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_e exp_port(dest_t t);
    if (t.x != 3'd1) return (t.x > 3'd1) ? P_EAST : P_WEST;
    if (t.y != 3'd1) return (t.y > 3'd1) ? P_NORTH : P_SOUTH;
    if (t.z != 2'd1) return (t.z > 2'd1) ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  int sent [2][NPORTS];
  int rcvd [2][NPORTS];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    logic  [NPORTS-1:0] iv, is, ov, os;
    flit_t [NPORTS-1:0] ifl, ofl;
    int    left  [NPORTS];     // flits left in the current packet
    int    seq   [NPORTS];
    int    exp_seq [NPORTS];
    bit    busy  [NPORTS];     // output between head and tail
    int    owner [NPORTS];

    fredo_router #(.MY_X(1), .MY_Y(1), .MY_Z(1), .BUFFERED(d == 0)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_flit(ifl), .in_stall(is),
      .out_valid(ov), .out_flit(ofl), .out_stall(os)
    );

    initial begin
      iv = '0; ifl = '0; os = '0;
      for (int p = 0; p < NPORTS; p++) begin
        left[p] = 0; seq[p] = 0; exp_seq[p] = 0; busy[p] = 0; owner[p] = 0;
      end
    end

    // Drivers: change only after a flit was taken (or when idle).
    always @(posedge clk) if (rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (iv[p] && !is[p]) begin
          sent[d][p]++;
          if (left[p] > 1) begin
            left[p]--;
            seq[p]++;
            ifl[p].data <= {3'(p), 13'(seq[p])};
            ifl[p].tail <= (left[p] == 1);
          end else begin
            left[p] = 0;
            iv[p] <= 1'b0;
          end
        end
        if ((!iv[p] || (iv[p] && !is[p] && left[p] == 0)) && traffic_on &&
            $urandom_range(0, 3) == 0) begin
          dest_t t;
          t.x = 3'($urandom_range(0, 4));
          t.y = 3'($urandom_range(0, 4));
          t.z = 2'($urandom_range(0, 2));
          if (p != 0 && exp_port(t) == port_e'(p)) t = '{z: 2'd1, y: 3'd1, x: 3'd1};
          left[p] = $urandom_range(1, 3);
          seq[p]++;
          iv[p]       <= 1'b1;
          ifl[p].dest <= t;
          ifl[p].data <= {3'(p), 13'(seq[p])};
          ifl[p].tail <= (left[p] == 1);
        end
      end
      for (int o = 0; o < NPORTS; o++) os[o] <= stall_on && ($urandom_range(0, 2) == 0);
    end

    // Monitor.
    always @(posedge clk) if (rst_n) begin
      int nreq [NPORTS];
      for (int o = 0; o < NPORTS; o++) nreq[o] = 0;
      for (int p = 0; p < NPORTS; p++)
        if (!dut.buf_empty[p]) nreq[dut.req_port[p]]++;
      for (int o = 0; o < NPORTS; o++) if (nreq[o] > 1) contention_seen++;
      if (|(iv & is)) stalls_seen++;
      for (int o = 0; o < NPORTS; o++) begin
        if (ov[o]) begin
          int src, sq;
          src = int'(ofl[o].data[15:13]);
          sq  = int'(ofl[o].data[12:0]);
          checks += 4;
          rcvd[d][src]++;
          if (os[o]) begin failures++; $display("FAIL d%0d: sent into stall on %0d", d, o); end
          if (exp_port(ofl[o].dest) != port_e'(o)) begin
            failures++; $display("FAIL d%0d: flit from %0d left on %0d", d, src, o);
          end
          if (sq != exp_seq[src] + 1) begin
            failures++; $display("FAIL d%0d: input %0d seq %0d exp %0d", d, src, sq, exp_seq[src] + 1);
          end
          exp_seq[src] = sq;
          if (busy[o] && owner[o] != src) begin
            failures++; $display("FAIL d%0d: interleaved packets on %0d", d, o);
          end
          busy[o]  = !ofl[o].tail;
          owner[o] = src;
        end
      end
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Latency: one flit into the east input of the idle buffered router,
    // destined two columns west: it must leave on WEST at the next edge.
    @(negedge clk);
    g_dut[0].ifl[P_EAST] = '{tail: 1'b1, dest: '{z: 2'd1, y: 3'd1, x: 3'd0}, data: {3'(P_EAST), 13'd1}};
    g_dut[0].iv[P_EAST] = 1'b1;
    g_dut[0].left[P_EAST] = 1;
    g_dut[0].seq[P_EAST] = 1;
    @(posedge clk); #1;
    checks++;
    if (!(g_dut[0].ov[P_WEST] && g_dut[0].ofl[P_WEST].data[12:0] == 13'd1)) begin
      failures++; $display("FAIL: flit did not leave one cycle after entering");
    end
    @(posedge clk); #1;
    repeat (2) @(posedge clk);
    traffic_on = 1;
    repeat (1500) @(posedge clk);
    stall_on = 1;
    repeat (1500) @(posedge clk);
    traffic_on = 0;
    stall_on = 0;
    t0 = 0;
    while (t0 < 200) begin @(posedge clk); t0++; end
    for (int d = 0; d < 2; d++)
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (sent[d][p] != rcvd[d][p]) begin
          failures++; $display("FAIL d%0d: input %0d sent %0d left %0d", d, p, sent[d][p], rcvd[d][p]);
        end
      end
    checks += 2;
    if (stalls_seen == 0) begin failures++; $display("FAIL: no stall happened"); end
    if (contention_seen == 0) begin failures++; $display("FAIL: no output contention happened"); end
    $display("stalls %0d contention %0d flits %0d/%0d", stalls_seen, contention_seen,
             rcvd[0][1] + rcvd[0][2], rcvd[1][1] + rcvd[1][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
