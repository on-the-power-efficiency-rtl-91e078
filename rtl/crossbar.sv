// crossbar: the router's NP x NP switch (ST stage).
//
// Each output port p takes the flit of the input port named by sel[p] when valid[p] is high,
// and shows an invalid link otherwise. The switch allocator guarantees that an input is
// selected by at most one output. The outputs are combinational; the router registers them
// (switch-traversal register) before the link. The crossbar is named by the document; its
// multiplexer structure is this design's choice.
module crossbar
  import dbp_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  flit_t                  in_flit [NP],
  input  logic [NP-1:0]          valid,
  input  logic [$clog2(NP)-1:0]  sel     [NP],
  output link_t                  out_link[NP]
);
  always_comb begin
    for (int unsigned p = 0; p < NP; p++) begin
      out_link[p].valid = valid[p];
      out_link[p].flit  = valid[p] ? in_flit[sel[p]] : '0;
    end
  end
endmodule
