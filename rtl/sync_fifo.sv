// sync_fifo: single-clock first-in first-out buffer.
//
// Used three ways in the NoC subsystem: as the flit buffer in front of every
// router input, as the transmitter FIFO between the APB interface and the
// source router (100 entries, the document's depth), and as the receive FIFO
// in front of the target processor.
//
// The storage is a circular buffer held in an array with a write pointer, a
// read pointer and an occupancy count. The head entry is always visible on
// rd_data (first-word fall-through): rd_en pops it at the clock edge. A push
// when full and a pop when empty are ignored (and flagged by assertions). A
// push and a pop in the same cycle are both done, also when full, so the
// queue streams one entry per cycle. Reset is synchronous and active low; it
// empties the queue. The depth of 100 is the document's; structure,
// read timing and reset are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 25,
  parameter int unsigned DEPTH = 100
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;
  logic [CW-1:0]    cnt;
  logic             do_wr, do_rd;

  assign empty   = (cnt == '0);
  assign full    = (cnt == CW'(DEPTH));
  assign count   = cnt;
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // A sender must respect full unless it pops in the same cycle.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> !empty);

endmodule
