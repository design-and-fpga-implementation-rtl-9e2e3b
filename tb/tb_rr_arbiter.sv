// tb_rr_arbiter: self-checking test of rr_arbiter with 7 requesters.
//
// Random requests and advance pulses; a reference model keeps its own
// pointer and searches for the winner. Also checks that with all requesters
// active and advance high every cycle, each one is served once in 7 cycles.
module tb_rr_arbiter;
  localparam int N = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, grant, exp_g;
  logic advance;
  int   ptr;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .advance(advance), .grant(grant));

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served [N];
    req = '0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1;
      exp_g = model(req, ptr);
      checks++;
      if (grant !== exp_g) begin
        failures++;
        $display("FAIL: req %b ptr %0d grant %b exp %b", req, ptr, grant, exp_g);
      end
      @(posedge clk);
      if (advance && exp_g != 0)
        for (int k = 0; k < N; k++) if (exp_g[k]) ptr = (k + 1) % N;
    end
    // Fairness: all requesting, advancing every cycle.
    foreach (served[k]) served[k] = 0;
    for (int i = 0; i < 7 * N; i++) begin
      @(negedge clk);
      req = '1; advance = 1;
      #1;
      for (int k = 0; k < N; k++) if (grant[k]) served[k]++;
    end
    foreach (served[k]) begin
      checks++;
      if (served[k] != 7) begin
        failures++;
        $display("FAIL: requester %0d served %0d times of 7", k, served[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
