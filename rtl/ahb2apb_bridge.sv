// ahb2apb_bridge: AHB-Lite slave on the fast side, APB master on the slow
// side.
//
// The AHB side runs at the system clock (100 MHz). The APB side runs at one
// tenth of it (10 MHz): instead of a second clock, pclk_en is high for one
// system clock cycle in PCLK_DIV and marks the rising edge of the APB clock;
// the APB outputs change, and the APB slave samples, only on those cycles.
//
// One AHB transfer at a time. The address phase is latched; in the following
// data phase the write data is latched and HREADY is pulled low. The APB state
// machine then steps on APB edges: IDLE -> SETUP (PSEL) -> ACCESS (PSEL,
// PENABLE), staying in ACCESS while PREADY is low, and back to IDLE. One
// system cycle after the access ends HREADY goes high again, with the read
// data on HRDATA. An APB PSLVERR is returned as the two-cycle AHB ERROR
// response. A write thus takes two to three APB cycles, 20 to 30 system
// cycles with PCLK_DIV = 10.
//
// The 100 MHz / 10 MHz ratio and the IDLE, SETUP and ACCESS states follow the
// document; the clock enable, the single outstanding transfer and the error
// mapping are this design's choices.
module ahb2apb_bridge #(
  parameter int unsigned PCLK_DIV = 10
) (
  input  logic        hclk,
  input  logic        hresetn,
  // AHB-Lite slave
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp,
  // APB master
  output logic        pclk_en,
  output logic        psel,
  output logic        penable,
  output logic [31:0] paddr,
  output logic        pwrite,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata,
  input  logic        pready,
  input  logic        pslverr
);

  typedef enum logic [1:0] {A_IDLE, A_SETUP, A_ACCESS} apb_state_e;

  localparam int unsigned DW = (PCLK_DIV > 1) ? $clog2(PCLK_DIV) : 1;

  logic [DW-1:0] div_cnt;
  apb_state_e    apb_st;
  logic          dphase;    // AHB data phase of an accepted transfer
  logic          pend;      // transfer waiting for / in the APB access
  logic          err1;      // first cycle of the AHB ERROR response
  logic          err2;      // second cycle
  logic [31:0]   rdata_q;
  logic          accept;

  // APB timebase.
  always_ff @(posedge hclk) begin
    if (!hresetn) div_cnt <= '0;
    else if (div_cnt == DW'(PCLK_DIV-1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign pclk_en = (div_cnt == DW'(PCLK_DIV-1));

  assign hready = !(dphase || pend || err1);
  assign hresp  = err1 || err2;
  assign hrdata = rdata_q;
  assign accept = hsel && htrans[1] && hready;
  assign psel    = (apb_st != A_IDLE);
  assign penable = (apb_st == A_ACCESS);

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      apb_st  <= A_IDLE;
      dphase  <= 1'b0;
      pend    <= 1'b0;
      err1    <= 1'b0;
      err2    <= 1'b0;
      paddr   <= '0;
      pwrite  <= 1'b0;
      pwdata  <= '0;
      rdata_q <= '0;
    end else begin
      err2 <= err1;
      err1 <= 1'b0;
      if (accept) begin
        paddr  <= haddr;
        pwrite <= hwrite;
        dphase <= 1'b1;
      end
      if (dphase) begin
        if (pwrite) pwdata <= hwdata;
        dphase <= 1'b0;
        pend   <= 1'b1;
      end
      if (pclk_en) begin
        case (apb_st)
          A_IDLE:   if (pend) apb_st <= A_SETUP;
          A_SETUP:  apb_st <= A_ACCESS;
          A_ACCESS: if (pready) begin
            apb_st  <= A_IDLE;
            pend    <= 1'b0;
            rdata_q <= prdata;
            err1    <= pslverr;
          end
          default:  apb_st <= A_IDLE;
        endcase
      end
    end
  end

  // APB rule: PENABLE only after a SETUP cycle, and the address holds.
  a_apb_setup_first: assert property (@(posedge hclk) disable iff (!hresetn)
                                      $rose(penable) |-> $past(psel));
  a_apb_addr_stable: assert property (@(posedge hclk) disable iff (!hresetn)
                                      (psel && $past(psel)) |-> $stable(paddr));

endmodule
