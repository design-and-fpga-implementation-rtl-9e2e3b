// tb_switch_allocator: self-checking test of switch_allocator (7 ports).
//
// Directed cases: a single request is granted in the same cycle; two inputs
// competing for one output alternate (round robin); a stalled output grants
// nothing; an output carrying a multi-flit packet stays locked to its input
// until the tail flit, even when another input asks for it; two inputs going
// to different outputs are both granted in one cycle.
module tb_switch_allocator;
  localparam int NP = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0]        req_valid, req_tail, out_stall, in_grant, out_valid;
  logic [NP-1:0][2:0]   req_port, out_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  switch_allocator #(.NP(NP)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_port(req_port),
    .req_tail(req_tail), .out_stall(out_stall), .in_grant(in_grant),
    .out_sel(out_sel), .out_valid(out_valid)
  );

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (grant %b valid %b)", what, in_grant, out_valid); end
  endtask

  task automatic idle();
    req_valid = '0; req_tail = '1; out_stall = '0; req_port = '0;
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wins1, wins2;
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Single request.
    req_valid[2] = 1; req_port[2] = 3'd4; #1;
    check(in_grant == 7'b0000100 && out_valid == 7'b0010000 && out_sel[4] == 3'd2, "single request");
    step(); idle();
    // Two inputs compete for output 1: they must alternate.
    wins1 = 0; wins2 = 0;
    for (int i = 0; i < 6; i++) begin
      req_valid[1] = 1; req_port[1] = 3'd1;
      req_valid[5] = 1; req_port[5] = 3'd1;
      #1;
      check($onehot(in_grant & 7'b0100010), "one winner");
      if (in_grant[1]) wins1++;
      if (in_grant[5]) wins2++;
      step();
    end
    check(wins1 == 3 && wins2 == 3, $sformatf("round robin %0d/%0d", wins1, wins2));
    idle();
    // Stall.
    req_valid[0] = 1; req_port[0] = 3'd6; out_stall[6] = 1; #1;
    check(in_grant == '0 && out_valid == '0, "stalled output grants nothing");
    out_stall[6] = 0; #1;
    check(in_grant[0] && out_valid[6], "granted after stall ends");
    step(); idle();
    // Wormhole lock: input 3 sends a head (not tail) flit to output 2.
    req_valid[3] = 1; req_port[3] = 3'd2; req_tail[3] = 0; #1;
    check(in_grant[3], "head flit granted");
    step();
    // Input 4 now wants output 2 while input 3 has a gap.
    req_valid[3] = 0;
    req_valid[4] = 1; req_port[4] = 3'd2; req_tail[4] = 1; #1;
    check(!in_grant[4] && !out_valid[2], "locked output refuses other input");
    step();
    // Input 3 body flit, then its tail flit; input 4 keeps waiting.
    req_valid[3] = 1; req_tail[3] = 0; #1;
    check(in_grant[3] && !in_grant[4], "body flit of owner");
    step();
    req_tail[3] = 1; #1;
    check(in_grant[3] && !in_grant[4], "tail flit of owner");
    step();
    req_valid[3] = 0; #1;
    check(in_grant[4] && out_sel[2] == 3'd4, "lock released after tail");
    step(); idle();
    // Parallel grants to different outputs.
    req_valid = 7'b1111111;
    for (int i = 0; i < NP; i++) req_port[i] = 3'((i + 1) % NP);
    #1;
    check(in_grant == 7'b1111111 && out_valid == 7'b1111111, "all seven in parallel");
    step(); idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
