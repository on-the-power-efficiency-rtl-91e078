// vc_allocator: virtual-channel allocation (VA stage) of the router.
//
// Each requester (an input VC whose route is known, or the bypass latch) asks for a free
// output VC of its virtual network at one output port. Per output port a round-robin arbiter
// picks one requester whose VN still has a free VC at that port, and gives it the lowest
// numbered free VC of that VN. So at most one VC is allocated per output port and cycle.
// Grants are combinational; the requester registers the VC number and the output port's VC
// state marks it busy on the same clock edge. The document names the VA stage only; this
// allocator structure is this design's choice.
module vc_allocator
  import dbp_pkg::*;
#(
  parameter int unsigned NREQ = 31,
  parameter int unsigned NP   = NUM_PORTS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NREQ-1:0]     req,
  input  logic [PORT_W-1:0]   req_port [NREQ],
  input  logic [VN_W-1:0]     req_vn   [NREQ],
  input  logic [NUM_VC-1:0]   vc_busy  [NP],
  output logic [NREQ-1:0]     gnt,
  output logic [VC_W-1:0]     gnt_vc   [NREQ],
  output logic [NP-1:0]       alloc_valid,
  output logic [VC_W-1:0]     alloc_vc [NP]
);
  logic [NREQ-1:0]         cand    [NP];
  logic [NREQ-1:0]         arb_gnt [NP];
  logic [$clog2(NREQ)-1:0] arb_idx [NP];
  logic [NP-1:0]           arb_any;

  // lowest free VC of a VN at a port, or NUM_VC when none
  function automatic int unsigned free_vc(input logic [NUM_VC-1:0] busy, input logic [VN_W-1:0] vn);
    for (int unsigned k = 0; k < VCS_PER_VN; k++)
      if (!busy[int'(vn) * VCS_PER_VN + k]) return int'(vn) * VCS_PER_VN + k;
    return NUM_VC;
  endfunction

  for (genvar p = 0; p < NP; p++) begin : g_port
    always_comb begin
      for (int unsigned r = 0; r < NREQ; r++)
        cand[p][r] = req[r] && (req_port[r] == PORT_W'(p)) && (free_vc(vc_busy[p], req_vn[r]) < NUM_VC);
    end
    rr_arbiter #(.N(NREQ)) u_arb (
      .clk, .rst_n, .req(cand[p]), .advance(1'b1),
      .gnt(arb_gnt[p]), .gnt_idx(arb_idx[p]), .any(arb_any[p])
    );
    assign alloc_valid[p] = arb_any[p];
    assign alloc_vc[p]    = VC_W'(free_vc(vc_busy[p], req_vn[arb_idx[p]]));
  end

  always_comb begin
    gnt = '0;
    for (int unsigned r = 0; r < NREQ; r++) begin
      gnt_vc[r] = '0;
      for (int unsigned p = 0; p < NP; p++)
        if (arb_gnt[p][r]) begin
          gnt[r]    = 1'b1;
          gnt_vc[r] = alloc_vc[p];
        end
    end
  end
endmodule
