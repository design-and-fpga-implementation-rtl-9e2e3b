// tb_crossbar: self-checking test of crossbar (7 ports, 25-bit flits).
// Random input flits and random selections; each output must carry the
// selected input's flit.
module tb_crossbar;
  localparam int NP = 7, W = 25;
  logic [NP-1:0][W-1:0] in_d, out_d;
  logic [NP-1:0][2:0]   sel;
  int checks = 0, failures = 0;

  crossbar #(.NP(NP), .W(W)) dut (.in_data(in_d), .sel(sel), .out_data(out_d));

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int p = 0; p < NP; p++) begin
        in_d[p] = W'($urandom);
        sel[p]  = 3'($urandom_range(0, NP - 1));
      end
      #1;
      for (int o = 0; o < NP; o++) begin
        checks++;
        if (out_d[o] !== in_d[sel[o]]) begin
          failures++;
          $display("FAIL: out %0d sel %0d", o, sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
