// apb_noc_if: APB slave that hands packets from the bus to the NoC.
//
// Register map (word addresses, bits [3:2] of PADDR):
//   0x0 TX     write: packet word {id, layer, data} in bits [22:0]; the packet
//              is turned into one flit (head and tail at once; id -> x, y;
//              layer -> z) and pushed into the transmitter FIFO.
//   0x4 STATUS read: bit 0 transmitter FIFO full.
//   0x8 COUNT  read: number of packets accepted since reset.
// A write to TX while the transmitter FIFO is full is held with PREADY low
// until there is room; this is the back-pressure that slows the bus down when
// the NoC is congested. A packet whose router id or layer lies outside the
// mesh, a write to a read-only register or an unknown address is refused
// with PSLVERR and changes nothing.
//
// The APB side is timed by pclk_en (one system cycle per APB clock edge); the
// flit push is one system cycle wide. Storing the bridge's data in the
// transmitter FIFO is the document's; the register map, the errors and the
// flit format are this design's choices.
module apb_noc_if
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = noc_pkg::MESH_X_DEF,
  parameter int unsigned MESH_Y = noc_pkg::MESH_Y_DEF,
  parameter int unsigned LAYERS = noc_pkg::LAYERS_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pclk_en,
  input  logic        psel,
  input  logic        penable,
  input  logic [31:0] paddr,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        tx_push,
  output flit_t       tx_flit,
  input  logic        tx_full
);

  localparam int unsigned NPR = MESH_X * MESH_Y;

  pkt_t        pkt;
  logic        is_tx, is_status, is_count, bad_pkt;
  logic [31:0] accepted;

  assign pkt       = pkt_t'(pwdata[PKT_W-1:0]);
  assign is_tx     = (paddr[3:2] == 2'd0);
  assign is_status = (paddr[3:2] == 2'd1);
  assign is_count  = (paddr[3:2] == 2'd2);
  assign bad_pkt   = (int'(pkt.id) >= NPR) || (int'(pkt.layer) >= LAYERS);

  always_comb begin
    pready  = 1'b1;
    pslverr = 1'b0;
    prdata  = '0;
    if (psel && penable) begin
      if (pwrite) begin
        if (!is_tx || bad_pkt) pslverr = 1'b1;
        else if (tx_full)      pready  = 1'b0;
      end else begin
        if (is_status)     prdata = {31'd0, tx_full};
        else if (is_count) prdata = accepted;
        else               pslverr = 1'b1;
      end
    end
  end

  assign tx_push      = pclk_en && psel && penable && pwrite && is_tx && !bad_pkt && !tx_full;
  assign tx_flit.tail = 1'b1;
  assign tx_flit.dest = id_to_dest(pkt.id, pkt.layer, MESH_X);
  assign tx_flit.data = pkt.data;

  always_ff @(posedge clk) begin
    if (!rst_n)       accepted <= '0;
    else if (tx_push) accepted <= accepted + 1;
  end

endmodule
