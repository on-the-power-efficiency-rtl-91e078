// rr_arbiter: round-robin arbiter.
//
// Grants one of N requests, searching from the position after the last granted one, so every
// persistent requester is served within N grants. The grant is combinational; the priority
// pointer moves only when `advance` is high (the grant was actually used), which lets a caller
// combine several arbitration stages. The ctrlr unit uses it to pick among simultaneous IC_up
// reservation requests, as the document specifies; the allocators use it as this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 any
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] ptr;   // highest priority index

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any          = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any) ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
