// trng_pkt_gen: random packet source and AHB-Lite master.
//
// Produces the packets that enter the NoC: each holds a destination router
// within a layer, a layer and 16 bits of data, all drawn from the entropy
// source, and is written to the AHB-to-APB bridge as one AHB-Lite single
// word write (HTRANS = NONSEQ, HSIZE = word) to address TX_ADDR.
//
// Entropy: a physical true random source (free-running oscillators sampled
// by the clock) cannot be described as synchronous logic, so this block uses
// a 32-bit Galois LFSR (taps x^32 + x^22 + x^2 + x + 1), stepped every cycle,
// as a deterministic stand-in with the same output format. Router IDs and
// layers outside the mesh are folded back (modulo the router count per layer
// and the layer count), so every packet is deliverable.
//
// Transfer sequence while enable is high: address phase (NONSEQ) until HREADY,
// then data phase (HWDATA = packet) until HREADY, then the next packet.
// pkt_count counts completed writes, err_count those answered with HRESP.
// The packet fields and their widths follow the document, except the router
// ID, widened from 4 to 5 bits so that all 25 routers of a layer can be
// addressed; the LFSR and the bus sequence are this design's choices.
module trng_pkt_gen
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X  = noc_pkg::MESH_X_DEF,
  parameter int unsigned MESH_Y  = noc_pkg::MESH_Y_DEF,
  parameter int unsigned LAYERS  = noc_pkg::LAYERS_DEF,
  parameter logic [31:0] SEED    = 32'hACE1_2468,
  parameter logic [31:0] TX_ADDR = 32'h0000_0000
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        enable,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic        hresp,
  output logic [31:0] pkt_count,
  output logic [31:0] err_count
);

  localparam int unsigned NPR = MESH_X * MESH_Y;   // routers per layer

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;

  state_e      state;
  logic [31:0] lfsr;
  pkt_t        pkt_q;
  pkt_t        pkt_new;

  function automatic logic [31:0] lfsr_step(logic [31:0] v);
    return v[0] ? ((v >> 1) ^ 32'h8020_0003) : (v >> 1);
  endfunction

  always_comb begin
    pkt_new.id    = ID_W'(int'(lfsr[ID_W-1:0]) % NPR);
    pkt_new.layer = LAYER_W'(int'(lfsr[ID_W+LAYER_W-1:ID_W]) % LAYERS);
    pkt_new.data  = lfsr[31:16];
  end

  assign haddr  = TX_ADDR;
  assign htrans = (state == S_ADDR) ? 2'b10 : 2'b00;
  assign hwrite = (state == S_ADDR);
  assign hsize  = 3'b010;
  assign hwdata = {{(32-PKT_W){1'b0}}, pkt_q};

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      lfsr      <= (SEED == '0) ? 32'h1 : SEED;
      state     <= S_IDLE;
      pkt_q     <= '0;
      pkt_count <= '0;
      err_count <= '0;
    end else begin
      lfsr <= lfsr_step(lfsr);
      case (state)
        S_IDLE: if (enable) begin
          pkt_q <= pkt_new;
          state <= S_ADDR;
        end
        S_ADDR: if (hready) state <= S_DATA;
        S_DATA: if (hready) begin
          pkt_count <= pkt_count + 1;
          if (hresp) err_count <= err_count + 1;
          if (enable) begin
            pkt_q <= pkt_new;
            state <= S_ADDR;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
