// switch_allocator: decides, each cycle, which input port may send its head
// flit to which output port of the router.
//
// For every output port there is one round-robin arbiter over the inputs that
// request it. Wormhole switching: once an output has carried the first flit
// of a packet it is locked to that input until the packet's tail flit has
// passed, so the flits of two packets never interleave on a link. Stall-and-go
// flow control: an output whose downstream buffer signals stall grants
// nothing, and its arbiter keeps its priority. Everything is combinational
// from the inputs and the lock registers, so a flit at the head of its input
// buffer can cross the router in the same cycle.
//
// Interface: req_valid/req_port/req_tail describe the head flit of every
// input (req_port is the already computed output). in_grant tells an input
// that its flit leaves this cycle; out_sel drives the crossbar; out_valid
// marks the outputs that carry a flit. The round-robin policy and the
// allocation step are the document's; the lock and the stall gating are this
// design's reading of wormhole switching with stall-and-go flow control.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int unsigned NP = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NP-1:0]                 req_valid,
  input  logic [NP-1:0][$clog2(NP)-1:0] req_port,
  input  logic [NP-1:0]                 req_tail,
  input  logic [NP-1:0]                 out_stall,
  output logic [NP-1:0]                 in_grant,
  output logic [NP-1:0][$clog2(NP)-1:0] out_sel,
  output logic [NP-1:0]                 out_valid
);

  localparam int unsigned SW = $clog2(NP);

  logic [NP-1:0]          lock;
  logic [NP-1:0][SW-1:0]  owner;
  logic [NP-1:0][NP-1:0]  req;     // [output][input]
  logic [NP-1:0][NP-1:0]  gnt;     // [output][input]
  logic [NP-1:0]          sel_tail;

  always_comb begin
    for (int unsigned o = 0; o < NP; o++) begin
      for (int unsigned i = 0; i < NP; i++) begin
        req[o][i] = req_valid[i] && (int'(req_port[i]) == o) && !out_stall[o] &&
                    (!lock[o] || (int'(owner[o]) == i));
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_arb
    rr_arbiter #(.N(NP)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[o]),
      .advance (out_valid[o]),
      .grant   (gnt[o])
    );
  end

  always_comb begin
    in_grant = '0;
    for (int unsigned o = 0; o < NP; o++) begin
      out_valid[o] = |gnt[o];
      out_sel[o]   = '0;
      sel_tail[o]  = 1'b0;
      for (int unsigned i = 0; i < NP; i++) begin
        if (gnt[o][i]) begin
          out_sel[o]  = SW'(i);
          sel_tail[o] = req_tail[i];
          in_grant[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock  <= '0;
      owner <= '0;
    end else begin
      for (int unsigned o = 0; o < NP; o++) begin
        if (out_valid[o]) begin
          lock[o]  <= !sel_tail[o];
          owner[o] <= out_sel[o];
        end
      end
    end
  end

  // An input is granted at most one output, and never into a stall.
  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_no_send_into_stall: assert property (@(posedge clk) disable iff (!rst_n)
                                           out_stall[o] |-> !out_valid[o]);
    a_lock_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                   (lock[o] && out_valid[o]) |-> (out_sel[o] == owner[o]));
  end

endmodule
