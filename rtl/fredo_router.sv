// fredo_router: seven-port router of the 3D FREDO NoC.
//
// Ports: local (the attached core or interface), east, west, north, south
// inside a layer, and top and bottom to the neighbouring layers (see
// noc_pkg::port_e). Every input has its own flit buffer (a FIFO of BUF_DEPTH
// flits, or a single flit register in the bufferless version, BUFFERED = 0).
// The flit at the head of each buffer goes through three steps that all
// settle within one clock cycle:
//   1. route computation: a head flit's destination is compared with this
//      router's address (route_compute); the flits after it reuse the stored
//      result until the tail flit has left;
//   2. switch allocation: a round-robin arbiter per output, outputs locked
//      from head to tail flit (wormhole switching) (switch_allocator);
//   3. crossbar traversal to the output link (crossbar).
// A flit therefore spends one cycle per router when nothing blocks it: it is
// written into the input buffer at a clock edge and leaves on the next one.
//
// Links use stall-and-go flow control: a sender drives valid and a flit; the
// receiver raises stall while the buffer for that link is full, and a flit
// moves at a clock edge when valid is high and stall is low. Stall comes from
// a register (the buffer count), so no combinational path runs from one
// router to the next through the flow control.
//
// The port set, the buffer per input, the three steps and the round-robin
// arbitration follow the document; doing the three steps in one cycle follows
// its statement that the NoC is built from combinational logic. Buffer depth,
// flow-control timing and the bufferless single register are this design's
// choices.
module fredo_router
  import noc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned MY_Z      = 0,
  parameter bit          BUFFERED  = 1'b1,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NPORTS-1:0]  in_valid,
  input  flit_t [NPORTS-1:0]  in_flit,
  output logic  [NPORTS-1:0]  in_stall,
  output logic  [NPORTS-1:0]  out_valid,
  output flit_t [NPORTS-1:0]  out_flit,
  input  logic  [NPORTS-1:0]  out_stall
);

  localparam int unsigned DEPTH = BUFFERED ? BUF_DEPTH : 1;
  localparam int unsigned SW    = $clog2(NPORTS);

  flit_t [NPORTS-1:0]          head;
  logic  [NPORTS-1:0]          buf_empty, buf_full;
  logic  [NPORTS-1:0]          grant;
  logic  [NPORTS-1:0]          in_pkt;        // between head and tail flit
  port_e [NPORTS-1:0]          route_q;       // stored route of that packet
  port_e [NPORTS-1:0]          rc_port;
  logic  [NPORTS-1:0][SW-1:0]  req_port;
  logic  [NPORTS-1:0]          req_tail;
  logic  [NPORTS-1:0][SW-1:0]  sel;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [$clog2(DEPTH+1)-1:0] cnt_unused;

    sync_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_valid[p] && !buf_full[p]),
      .wr_data (in_flit[p]),
      .rd_en   (grant[p]),
      .rd_data (head[p]),
      .full    (buf_full[p]),
      .empty   (buf_empty[p]),
      .count   (cnt_unused)
    );

    route_compute #(.MY_X(MY_X), .MY_Y(MY_Y), .MY_Z(MY_Z)) u_rc (
      .dest     (head[p].dest),
      .out_port (rc_port[p])
    );

    always_comb begin
      req_port[p] = in_pkt[p] ? route_q[p] : rc_port[p];
      req_tail[p] = head[p].tail;
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        in_pkt[p]  <= 1'b0;
        route_q[p] <= P_LOCAL;
      end else if (grant[p]) begin
        in_pkt[p]  <= !head[p].tail;
        route_q[p] <= port_e'(req_port[p]);
      end
    end
  end

  assign in_stall = buf_full;

  switch_allocator #(.NP(NPORTS)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (~buf_empty),
    .req_port  (req_port),
    .req_tail  (req_tail),
    .out_stall (out_stall),
    .in_grant  (grant),
    .out_sel   (sel),
    .out_valid (out_valid)
  );

  crossbar #(.NP(NPORTS), .W(FLIT_W)) u_xbar (
    .in_data  (head),
    .sel      (sel),
    .out_data (out_flit)
  );

  // A flit that reaches the head of a buffer leaves before another one of
  // the same input is granted: one grant per input per cycle at most.
  a_route_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_pkt[0] && !buf_empty[0]) |-> (req_port[0] == route_q[0]));

endmodule
