// upstream_port_ctrl: the upstream end of one link (an output port of a router, or the
// NI ctrlr of a network interface).
//
// It keeps the credit-based flow control state of the downstream input port (one credit
// counter and one busy bit per VC) and the upstream half of the D-bypass handshake:
//   * IC_down is raised while the downstream router signals PG (powered off or about to be)
//     and a packet here wants the link; it asks the downstream ctrlr to reserve its bypass
//     latch, and is held until the last bypassed flit has been credited back.
//   * RS_down from the downstream ctrlr grants the latch. A head flit may then be sent (only
//     while the registered IC_down is high, so the downstream cannot release the latch in
//     the same cycle the head leaves); the
//     link is locked to that packet until its tail, and only one flit may be outstanding in
//     the latch (the next one waits for the credit the latch returns).
//   * WU_down is raised when more than TH_IVC requesters contend for a powered-off downstream
//     router (the N_IVC wake-up condition).
// Without PG the link works as a plain credit-based link; when PG falls in the middle of a
// bypassed packet (the router woke up), the rest of the packet is sent normally.
// IC_down/WU_down are registered.
// Credit counting, IC/RS/WU and the thresholds follow the document; holding IC until the last
// bypass credit returns, and the single-outstanding-flit rule, are this design's reading of it.
// All state here belongs to the always-on domain, so credits survive power gating.
module upstream_port_ctrl
  import dbp_pkg::*;
#(
  parameter int unsigned NREQ = 31,
  parameter int unsigned CNT_W = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // VC allocation and flit departure at this port
  input  logic                     alloc_valid,
  input  logic [VC_W-1:0]          alloc_vc,
  input  logic                     send_valid,
  input  logic [VC_W-1:0]          send_vc,
  input  logic                     send_head,
  input  logic                     send_tail,
  input  logic [$clog2(NREQ)-1:0]  send_req,
  // from the downstream router
  input  credit_t                  credit_in,
  input  logic                     pg_down,
  input  logic                     rs_down,
  // demand at this port
  input  logic                     pending,
  input  logic [CNT_W-1:0]         n_ivc,
  // to the downstream router
  output logic                     ic_down,
  output logic                     wu_down,
  // state for the allocators
  output logic [NUM_VC-1:0]        vc_busy,
  output logic [NUM_VC-1:0]        credit_ok,
  output logic                     normal_ok,
  output logic                     byp_head_ok,
  output logic                     byp_body_ok,
  output logic [$clog2(NREQ)-1:0]  byp_owner
);
  logic [CREDIT_W-1:0] credits [NUM_VC];
  logic                byp_pkt;          // a bypassed packet is between head and tail
  logic                byp_outstanding;  // a bypassed flit waits for its credit

  always_comb begin
    for (int unsigned v = 0; v < NUM_VC; v++) credit_ok[v] = (credits[v] != '0);
  end

  assign normal_ok   = !pg_down && !byp_outstanding;
  assign byp_head_ok = pg_down && rs_down && ic_down && !byp_pkt && !byp_outstanding;
  assign byp_body_ok = pg_down && byp_pkt && !byp_outstanding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned v = 0; v < NUM_VC; v++) credits[v] <= vc_depth(v);
      vc_busy         <= '0;
      byp_pkt         <= 1'b0;
      byp_outstanding <= 1'b0;
      byp_owner       <= '0;
      ic_down         <= 1'b0;
      wu_down         <= 1'b0;
    end else begin
      for (int unsigned v = 0; v < NUM_VC; v++) begin
        credits[v] <= credits[v]
                      - CREDIT_W'(send_valid && send_vc == VC_W'(v))
                      + CREDIT_W'(credit_in.valid && credit_in.vc == VC_W'(v));
        if (alloc_valid && alloc_vc == VC_W'(v))                 vc_busy[v] <= 1'b1;
        if (send_valid && send_tail && send_vc == VC_W'(v))      vc_busy[v] <= 1'b0;
      end
      if (send_valid && pg_down) begin
        byp_outstanding <= 1'b1;
        if (send_head) begin
          byp_pkt   <= !send_tail;
          byp_owner <= send_req;
        end else if (send_tail) begin
          byp_pkt   <= 1'b0;
        end
      end else begin
        if (credit_in.valid) byp_outstanding <= 1'b0;
        if (!pg_down)        byp_pkt         <= 1'b0;   // router woke: rest goes to its buffers
      end
      ic_down <= pg_down && (pending || byp_pkt || byp_outstanding || send_valid);
      wu_down <= pg_down && (n_ivc > CNT_W'(TH_IVC));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) send_valid |-> credit_ok[send_vc])
    else $error("upstream_port_ctrl: flit sent without a credit");
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !vc_busy[alloc_vc])
    else $error("upstream_port_ctrl: busy VC allocated again");
  assert property (@(posedge clk) disable iff (!rst_n) (send_valid && pg_down) |-> !byp_outstanding)
    else $error("upstream_port_ctrl: second flit sent into an occupied bypass latch");
endmodule
