// switch_allocator: separable input-first switch allocation (SA stage).
//
// Stage 1: at each input port a round-robin arbiter picks one of the VCs that have a flit
// ready to leave (output VC held, credit available, bypass rules met). Stage 2: at each output
// port a round-robin arbiter picks one of the input ports whose stage-1 winner wants it.
// A VC is granted when both stages pick it; only then do the arbiters' pointers move. At most
// one flit leaves each input and enters each output per cycle. The outputs are combinational
// and drive the crossbar select of the next (ST) stage. The document names the SA stage only;
// the separable input-first structure is this design's choice.
module switch_allocator
  import dbp_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS,
  parameter int unsigned NV = NUM_VC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NV-1:0]          req      [NP],
  input  logic [PORT_W-1:0]      req_port [NP][NV],
  output logic [NV-1:0]          gnt      [NP],
  output logic [NP-1:0]          out_valid,
  output logic [$clog2(NP)-1:0]  out_sel  [NP],
  output logic [$clog2(NV)-1:0]  in_vc    [NP]
);
  localparam int unsigned PW = $clog2(NP);
  localparam int unsigned VW = $clog2(NV);

  logic [NV-1:0] s1_gnt [NP];
  logic [VW-1:0] s1_idx [NP];
  logic [NP-1:0] s1_any;
  logic [NP-1:0] s2_req [NP];   // [output][input]
  logic [NP-1:0] s2_gnt [NP];
  logic [PW-1:0] s2_idx [NP];
  logic [NP-1:0] s2_any;
  logic [NP-1:0] in_won;        // input port granted by some output

  for (genvar i = 0; i < NP; i++) begin : g_in
    rr_arbiter #(.N(NV)) u_s1 (
      .clk, .rst_n, .req(req[i]), .advance(in_won[i]),
      .gnt(s1_gnt[i]), .gnt_idx(s1_idx[i]), .any(s1_any[i])
    );
    assign in_vc[i] = s1_idx[i];
  end

  always_comb begin
    for (int unsigned o = 0; o < NP; o++)
      for (int unsigned i = 0; i < NP; i++)
        s2_req[o][i] = s1_any[i] && (req_port[i][s1_idx[i]] == PORT_W'(o));
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    rr_arbiter #(.N(NP)) u_s2 (
      .clk, .rst_n, .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o]), .gnt_idx(s2_idx[o]), .any(s2_any[o])
    );
    assign out_valid[o] = s2_any[o];
    assign out_sel[o]   = s2_idx[o];
  end

  always_comb begin
    in_won = '0;
    for (int unsigned o = 0; o < NP; o++) in_won |= s2_gnt[o];
    for (int unsigned i = 0; i < NP; i++)
      gnt[i] = in_won[i] ? s1_gnt[i] : '0;
  end
endmodule
