// crossbar: the switch fabric of a router.
//
// Each output port takes the head flit of the input port that the switch
// allocator chose for it (sel). One multiplexer per output, purely
// combinational; whether the output carries a valid flit is decided by the
// allocator, not here. The crossbar's role is the document's; the multiplexer
// structure is the simplest that does it.
module crossbar #(
  parameter int unsigned NP = 7,
  parameter int unsigned W  = 25
) (
  input  logic [NP-1:0][W-1:0]          in_data,
  input  logic [NP-1:0][$clog2(NP)-1:0] sel,
  output logic [NP-1:0][W-1:0]          out_data
);

  always_comb begin
    for (int unsigned o = 0; o < NP; o++) begin
      out_data[o] = (int'(sel[o]) < NP) ? in_data[sel[o]] : '0;
    end
  end

endmodule
