// network_interface: the NI of one mesh node (NI core, inject/eject queues, NI ctrlr).
//
// Injection: the core hands over a packet (destination, virtual network, 1 or 2 flits of
// 128 bits) when `inj_ready` is high; the NI holds one packet per virtual network. Each held
// packet first gets a free VC of its VN at the router's local input port (allocation), then
// its flits leave one per cycle, round-robin across VNs, as credits allow, through a link
// register into the router. The NI ctrlr (an upstream_port_ctrl) does what an upstream router
// does towards a powered-off router: while the router signals PG it raises IC to reserve the
// router's bypass latch, sends only after RS, one flit per returned credit, and raises WU when
// more than TH_IVC of its queues wait for the powered-off router.
// Ejection: flits leaving the router's local port are registered to `ej_link` and a credit
// for their VC is returned one cycle later; the core is assumed always ready to take them.
// The NI ctrlr and its IC/RS/WU/PG signals follow the document; the packet interface, one
// packet per VN and the always-ready ejection are this design's own choices.
module network_interface
  import dbp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic [COORD_W-1:0] cur_x,   // position of this node in the mesh
  input  logic [COORD_W-1:0] cur_y,
  // core side
  input  logic    inj_valid,
  input  pkt_t    inj_pkt,
  output logic    inj_ready,
  output link_t   ej_link,
  // towards the router's local input port
  output link_t   to_router,
  input  credit_t credit_from_router,
  output logic    ic_down,
  output logic    wu_down,
  input  logic    rs_down,
  input  logic    pg_down,
  // from the router's local output port
  input  link_t   from_router,
  output credit_t credit_to_router
);
  localparam int unsigned NQ = NUM_VN;
  localparam int unsigned QW = $clog2(NQ);
  localparam int unsigned CNT_W = 5;

  logic [NQ-1:0]  pv;        // queue holds a packet
  logic [NQ-1:0]  pact;      // its VC is allocated
  pkt_t           pk   [NQ];
  logic [VC_W-1:0] pvc [NQ];
  logic [NQ-1:0]  second;    // next flit is the second one

  // ---- NI ctrlr state
  logic [NUM_VC-1:0] vc_busy, credit_ok;
  logic              normal_ok, byp_head_ok, byp_body_ok;
  logic [QW-1:0]     byp_owner;

  // ---- allocation of a VC at the router's local input
  logic [NQ-1:0]     va_req, va_gnt;
  logic [PORT_W-1:0] va_port [NQ];
  logic [VN_W-1:0]   va_vn   [NQ];
  logic [VC_W-1:0]   va_vc   [NQ];
  logic [0:0]        va_alloc_valid;
  logic [VC_W-1:0]   va_alloc_vc [1];
  logic [NUM_VC-1:0] busy_arr [1];

  assign busy_arr[0] = vc_busy;
  always_comb begin
    for (int unsigned q = 0; q < NQ; q++) begin
      va_req[q]  = pv[q] && !pact[q];
      va_port[q] = '0;
      va_vn[q]   = VN_W'(q);
    end
  end

  vc_allocator #(.NREQ(NQ), .NP(1)) u_va (
    .clk, .rst_n, .req(va_req), .req_port(va_port), .req_vn(va_vn), .vc_busy(busy_arr),
    .gnt(va_gnt), .gnt_vc(va_vc), .alloc_valid(va_alloc_valid), .alloc_vc(va_alloc_vc)
  );

  // ---- flit departure
  logic [NQ-1:0] sa_req, sa_gnt;
  logic [QW-1:0] sa_idx;
  logic          sa_any;
  logic [NQ-1:0] is_head, is_tail;

  always_comb begin
    for (int unsigned q = 0; q < NQ; q++) begin
      logic ok;
      is_head[q] = !second[q];
      is_tail[q] = second[q] || (pk[q].len <= LEN_W'(1));
      if (is_head[q]) ok = normal_ok || byp_head_ok;
      else            ok = normal_ok || (byp_body_ok && byp_owner == QW'(q));
      sa_req[q] = pv[q] && pact[q] && credit_ok[pvc[q]] && ok;
    end
  end

  rr_arbiter #(.N(NQ)) u_sa (
    .clk, .rst_n, .req(sa_req), .advance(1'b1), .gnt(sa_gnt), .gnt_idx(sa_idx), .any(sa_any)
  );

  flit_t out_flit;
  always_comb begin
    out_flit.head  = is_head[sa_idx];
    out_flit.tail  = is_tail[sa_idx];
    out_flit.vc    = pvc[sa_idx];
    out_flit.dst_x = pk[sa_idx].dst_x;
    out_flit.dst_y = pk[sa_idx].dst_y;
    out_flit.src_x = cur_x;
    out_flit.src_y = cur_y;
    out_flit.data  = second[sa_idx] ? pk[sa_idx].data1 : pk[sa_idx].data0;
  end

  logic [CNT_W-1:0] n_wait;
  always_comb begin
    n_wait = '0;
    for (int unsigned q = 0; q < NQ; q++) n_wait += CNT_W'(pv[q]);
  end

  upstream_port_ctrl #(.NREQ(NQ), .CNT_W(CNT_W)) u_ni_ctrlr (
    .clk, .rst_n,
    .alloc_valid(va_alloc_valid[0]), .alloc_vc(va_alloc_vc[0]),
    .send_valid(sa_any), .send_vc(out_flit.vc), .send_head(out_flit.head), .send_tail(out_flit.tail),
    .send_req(sa_idx),
    .credit_in(credit_from_router), .pg_down, .rs_down,
    .pending(pv != '0), .n_ivc(n_wait),
    .ic_down, .wu_down,
    .vc_busy, .credit_ok, .normal_ok, .byp_head_ok, .byp_body_ok, .byp_owner
  );

  assign inj_ready = !pv[inj_pkt.vn];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv        <= '0;
      pact      <= '0;
      second    <= '0;
      to_router <= '0;
      for (int unsigned q = 0; q < NQ; q++) begin
        pk[q]  <= '0;
        pvc[q] <= '0;
      end
    end else begin
      to_router.valid <= sa_any;
      to_router.flit  <= out_flit;
      for (int unsigned q = 0; q < NQ; q++) begin
        if (va_gnt[q]) begin
          pact[q] <= 1'b1;
          pvc[q]  <= va_vc[q];
        end
        if (sa_gnt[q]) begin
          if (is_tail[q]) begin
            pv[q]     <= 1'b0;
            pact[q]   <= 1'b0;
            second[q] <= 1'b0;
          end else begin
            second[q] <= 1'b1;
          end
        end
        if (inj_valid && inj_ready && inj_pkt.vn == VN_W'(q)) begin
          pv[q] <= 1'b1;
          pk[q] <= inj_pkt;
        end
      end
    end
  end

  // ---- ejection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej_link          <= '0;
      credit_to_router <= '0;
    end else begin
      ej_link                <= from_router;
      credit_to_router.valid <= from_router.valid;
      credit_to_router.vc    <= from_router.flit.vc;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   inj_valid |-> (inj_pkt.vn < VN_W'(NUM_VN) && inj_pkt.len >= LEN_W'(1) && inj_pkt.len <= LEN_W'(MAX_PKT_FLITS)))
    else $error("network_interface: malformed packet");
endmodule
