// rr_arbiter: round-robin arbiter, as used by the switch allocator to serve
// the input ports that compete for one output port fairly.
//
// grant is one-hot and combinational from req: the first requester at or
// after the priority pointer wins. When advance is high at a clock edge (the
// granted transfer took place) the pointer moves to the requester just after
// the winner, so the winner has the lowest priority next time. A requester
// that is granted but cannot move (advance low) keeps its grant. The
// round-robin policy is the document's; the pointer-update rule is this
// design's choice.
module rr_arbiter #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    grant = '0;
    win   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any        = 1'b1;
        win        = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any) ptr <= (win == IW'(N-1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
