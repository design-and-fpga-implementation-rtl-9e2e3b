// eject_collector: gathers the packets that leave the NoC at their
// destination routers and writes them, one per cycle, into the receive FIFO.
//
// Every router's local output feeds a one-flit slot here. A router sees stall
// while its slot is occupied; the stall is a register, so the collector adds
// no combinational path back into the NoC. A round-robin arbiter picks one
// occupied slot per cycle and, while the receive FIFO has room, writes a
// 32-bit word for it:
//   [31:24] index of the router the flit left from
//   [22:18] router id within the layer, [17:16] layer, [15:0] data
// (bit 23 is zero). A slot refills at the earliest one cycle after it is
// emptied, so one router can deliver a flit every second cycle. Sending each
// destination router's packets towards the receive FIFO is the document's;
// the slots, the arbitration and the word format are this design's choices.
module eject_collector
  import noc_pkg::*;
#(
  parameter int unsigned NR     = 75,
  parameter int unsigned MESH_X = noc_pkg::MESH_X_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic  [NR-1:0]    ej_valid,
  input  flit_t [NR-1:0]    ej_flit,
  output logic  [NR-1:0]    ej_stall,
  output logic              rx_push,
  output logic  [31:0]      rx_word,
  input  logic              rx_full
);

  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1;

  logic  [NR-1:0] slot_v;
  flit_t [NR-1:0] slot_f;
  logic  [NR-1:0] pick;
  flit_t          f;
  logic  [RW-1:0] r;
  pkt_t           p;

  rr_arbiter #(.N(NR)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (slot_v),
    .advance (rx_push),
    .grant   (pick)
  );

  always_comb begin
    f = '0;
    r = '0;
    for (int unsigned i = 0; i < NR; i++) begin
      if (pick[i]) begin
        f = slot_f[i];
        r = RW'(i);
      end
    end
    p.id    = dest_to_id(f.dest.x, f.dest.y, MESH_X);
    p.layer = f.dest.z;
    p.data  = f.data;
  end

  assign rx_push  = (|slot_v) && !rx_full;
  assign rx_word  = {8'(r), 1'b0, p};
  assign ej_stall = slot_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_v <= '0;
      slot_f <= '0;
    end else begin
      for (int unsigned i = 0; i < NR; i++) begin
        if (ej_valid[i] && !slot_v[i]) begin
          slot_v[i] <= 1'b1;
          slot_f[i] <= ej_flit[i];
        end else if (rx_push && pick[i]) begin
          slot_v[i] <= 1'b0;
        end
      end
    end
  end

endmodule
