// fredo_noc_subsystem: the complete 3D NoC subsystem with its bus interface.
//
// Data path, in the order a packet travels:
//   trng_pkt_gen     random packets, written as AHB-Lite single writes
//   ahb2apb_bridge   100 MHz AHB-Lite to 10 MHz APB (clock enable pclk_en)
//   apb_noc_if       APB register that turns a packet into a flit
//   u_tx_fifo        transmitter FIFO, TX_DEPTH flits
//   noc_3d           5 x 5 x 3 mesh of seven-port routers; the transmitter
//                    FIFO feeds the local input of router SRC_ROUTER
//   eject_collector  takes the flits off every router's local output
//   u_rx_fifo        receive FIFO, RX_DEPTH words, read by the processor
// Packets are addressed by (router id within a layer, layer), so the layer
// field of each packet chooses which of the three layers it is delivered to.
//
// Ports: clk (system clock), rst_n (synchronous, active low), gen_enable
// starts and stops the packet generator. The local inputs of all other
// routers are brought out (ext_in_*) so further traffic, including multi-flit
// wormhole packets, can be injected; the entry of SRC_ROUTER is not used and
// its stall reads as 1. The receive FIFO's read side goes to the target
// processor (rx_valid, rx_word, rx_pop); see eject_collector for rx_word.
// Status outputs count generated and delivered packets and show the fill
// levels of both FIFOs.
//
// Timing: every bus write takes two to three APB cycles, so the generator
// offers a packet every 20 to 30 system cycles; the NoC then needs one cycle
// per router passed. When the receive side is not read, back-pressure fills
// the receive FIFO, the routers' buffers and the transmitter FIFO, and then
// holds the APB write (PREADY low) and with it the AHB transfer.
//
// The chain of blocks follows the document's subsystem diagram; feeding the
// NoC at a single source router and collecting all destinations into one
// receive FIFO are this design's choices.
module fredo_noc_subsystem
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = noc_pkg::MESH_X_DEF,
  parameter int unsigned MESH_Y     = noc_pkg::MESH_Y_DEF,
  parameter int unsigned LAYERS     = noc_pkg::LAYERS_DEF,
  parameter bit          BUFFERED   = 1'b1,
  parameter int unsigned BUF_DEPTH  = 4,
  parameter int unsigned TX_DEPTH   = 100,
  parameter int unsigned RX_DEPTH   = 100,
  parameter int unsigned PCLK_DIV   = 10,
  parameter int unsigned SRC_ROUTER = 0,
  parameter logic [31:0] SEED       = 32'hACE1_2468,
  localparam int unsigned NR        = MESH_X * MESH_Y * LAYERS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             gen_enable,
  input  logic  [NR-1:0]                   ext_in_valid,
  input  flit_t [NR-1:0]                   ext_in_flit,
  output logic  [NR-1:0]                   ext_in_stall,
  output logic                             rx_valid,
  output logic  [31:0]                     rx_word,
  input  logic                             rx_pop,
  output logic  [31:0]                     gen_pkt_count,
  output logic  [31:0]                     gen_err_count,
  output logic  [$clog2(TX_DEPTH+1)-1:0]   tx_level,
  output logic  [$clog2(RX_DEPTH+1)-1:0]   rx_level,
  output logic                             apb_wait
);

  // AHB
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  // APB
  logic        pclk_en, psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  // Transmitter FIFO
  logic        tx_push, tx_full, tx_empty, tx_pop;
  flit_t       tx_flit, tx_head;
  // NoC
  logic  [NR-1:0] lin_valid, lin_stall, lout_valid, lout_stall;
  flit_t [NR-1:0] lin_flit, lout_flit;
  // Receive FIFO
  logic        rx_push, rx_full, rx_empty;
  logic [31:0] rx_in;

  trng_pkt_gen #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .LAYERS(LAYERS), .SEED(SEED)
  ) u_gen (
    .hclk      (clk),
    .hresetn   (rst_n),
    .enable    (gen_enable),
    .haddr     (haddr),
    .htrans    (htrans),
    .hwrite    (hwrite),
    .hsize     (hsize),
    .hwdata    (hwdata),
    .hready    (hready),
    .hresp     (hresp),
    .pkt_count (gen_pkt_count),
    .err_count (gen_err_count)
  );

  // Only one AHB slave: it is always selected. HSIZE is fixed to a word by
  // the generator and not needed by the bridge; HRDATA has no reader here.
  ahb2apb_bridge #(.PCLK_DIV(PCLK_DIV)) u_bridge (
    .hclk    (clk),
    .hresetn (rst_n),
    .hsel    (1'b1),
    .haddr   (haddr),
    .htrans  (htrans),
    .hwrite  (hwrite),
    .hwdata  (hwdata),
    .hrdata  (hrdata),
    .hready  (hready),
    .hresp   (hresp),
    .pclk_en (pclk_en),
    .psel    (psel),
    .penable (penable),
    .paddr   (paddr),
    .pwrite  (pwrite),
    .pwdata  (pwdata),
    .prdata  (prdata),
    .pready  (pready),
    .pslverr (pslverr)
  );

  apb_noc_if #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .LAYERS(LAYERS)) u_apb_if (
    .clk     (clk),
    .rst_n   (rst_n),
    .pclk_en (pclk_en),
    .psel    (psel),
    .penable (penable),
    .paddr   (paddr),
    .pwrite  (pwrite),
    .pwdata  (pwdata),
    .prdata  (prdata),
    .pready  (pready),
    .pslverr (pslverr),
    .tx_push (tx_push),
    .tx_flit (tx_flit),
    .tx_full (tx_full)
  );

  assign apb_wait = psel && penable && !pready;

  sync_fifo #(.WIDTH(FLIT_W), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (tx_push),
    .wr_data (tx_flit),
    .rd_en   (tx_pop),
    .rd_data (tx_head),
    .full    (tx_full),
    .empty   (tx_empty),
    .count   (tx_level)
  );

  // Local inputs: the transmitter FIFO at the source router, the external
  // ports everywhere else.
  always_comb begin
    for (int unsigned r = 0; r < NR; r++) begin
      if (r == SRC_ROUTER) begin
        lin_valid[r]    = !tx_empty;
        lin_flit[r]     = tx_head;
        ext_in_stall[r] = 1'b1;
      end else begin
        lin_valid[r]    = ext_in_valid[r];
        lin_flit[r]     = ext_in_flit[r];
        ext_in_stall[r] = lin_stall[r];
      end
    end
  end
  assign tx_pop = !tx_empty && !lin_stall[SRC_ROUTER];

  noc_3d #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .LAYERS(LAYERS),
    .BUFFERED(BUFFERED), .BUF_DEPTH(BUF_DEPTH)
  ) u_noc (
    .clk             (clk),
    .rst_n           (rst_n),
    .local_in_valid  (lin_valid),
    .local_in_flit   (lin_flit),
    .local_in_stall  (lin_stall),
    .local_out_valid (lout_valid),
    .local_out_flit  (lout_flit),
    .local_out_stall (lout_stall)
  );

  eject_collector #(.NR(NR), .MESH_X(MESH_X)) u_collect (
    .clk      (clk),
    .rst_n    (rst_n),
    .ej_valid (lout_valid),
    .ej_flit  (lout_flit),
    .ej_stall (lout_stall),
    .rx_push  (rx_push),
    .rx_word  (rx_in),
    .rx_full  (rx_full)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(RX_DEPTH)) u_rx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (rx_push),
    .wr_data (rx_in),
    .rd_en   (rx_pop && !rx_empty),
    .rd_data (rx_word),
    .full    (rx_full),
    .empty   (rx_empty),
    .count   (rx_level)
  );

  assign rx_valid = !rx_empty;

endmodule
