// dbypass_router: a D-bypass power-gated virtual-channel router for a 2D mesh.
//
// Normal operation (router powered): a flit arriving on an input port is written into the
// buffer of its VC. A head flit then passes route computation (RC, X-Y routing), virtual
// channel allocation (VA) and switch allocation (SA); every granted flit crosses the crossbar
// into the switch-traversal register (ST) and then the output link register (LT), so a head
// flit needs five cycles per hop, body flits follow one per cycle as credits allow.
// Flow control is credit based, one credit counter per downstream VC.
//
// Power gating: the ctrlr unit (pg_ctrlr) powers the router off when it is empty and no
// neighbour raises IC or WU. While off, the input buffers, VC state and ST registers are
// cleared (power lost) and every incoming flit is steered by the input multiplexer into the
// one-flit bypass latch, reserved beforehand by the upstream router with IC/RS. The latch's
// Forward Packet stage (bypass_latch) routes the flit straight to an output multiplexer, so a
// powered-off router adds one cycle (FP) plus the link cycle. When a woken router takes over
// again, a head flit still waiting in the latch is moved into the buffer of the input VC it
// arrived on (its upstream credit was never returned, so the slot is free). The output ports' credit
// counters, VC state and the IC/RS/WU/PG handshake (upstream_port_ctrl), the ctrlr unit and
// the latch form the always-on part.
//
// Ports are indexed 0 = Local (NI), 1 = X+, 2 = X-, 3 = Y+, 4 = Y-. For each port there is an
// incoming link and an outgoing credit (its upstream side: IC_up, WU_up in; RS_up, PG_up out)
// and an outgoing link with an incoming credit (its downstream side: IC_down, WU_down out;
// RS_down, PG_down in). PG_up is one signal broadcast to all upstream neighbours. `cur_x`,
// `cur_y` give the router's mesh position; `pstate`, `sleep` and `events` report its power
// state and per-cycle events (bypass forwards, reservations, wake-ups) for counters.
// The pipeline stages, the latch, the muxes and the handshake follow the document; the
// allocators' structure, flit format and port numbering are this design's own.
module dbypass_router
  import dbp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   cur_x,   // position of this router in the mesh
  input  logic [COORD_W-1:0]   cur_y,
  // upstream side of each port
  input  link_t                in_link   [NUM_PORTS],
  output credit_t              credit_out[NUM_PORTS],
  input  logic [NUM_PORTS-1:0] ic_up,
  input  logic [NUM_PORTS-1:0] wu_up,
  output logic [NUM_PORTS-1:0] rs_up,
  output logic                 pg_up,
  // downstream side of each port
  output link_t                out_link  [NUM_PORTS],
  input  credit_t              credit_in [NUM_PORTS],
  output logic [NUM_PORTS-1:0] ic_down,
  output logic [NUM_PORTS-1:0] wu_down,
  input  logic [NUM_PORTS-1:0] rs_down,
  input  logic [NUM_PORTS-1:0] pg_down,
  // status
  output logic                 sleep,
  output pstate_e              pstate,
  output pg_event_t            events
);
  localparam int unsigned NP       = NUM_PORTS;
  localparam int unsigned NV       = NUM_VC;
  localparam int unsigned NREQ     = NP * NV + 1;
  localparam int unsigned LATCH_ID = NP * NV;
  localparam int unsigned RW       = $clog2(NREQ);
  localparam int unsigned PW       = $clog2(NP);
  localparam int unsigned VW       = $clog2(NV);
  localparam int unsigned CNT_W    = 5;

  typedef enum logic [1:0] {VS_IDLE, VS_VA, VS_ACTIVE} vstate_e;

  // ---------------- ctrlr unit
  logic          latch_mode, reserved, router_empty, latch_busy, latch_pkt, dom_clr, to_pipe;
  logic [PW-1:0] owner;

  pg_ctrlr u_ctrlr (
    .clk, .rst_n, .ic_up, .wu_up, .router_empty, .latch_busy, .latch_pkt,
    .pg_up, .rs_up, .sleep, .latch_mode, .to_pipeline(to_pipe), .reserved, .owner, .state(pstate),
    .ev_grant(events.resv_grant), .ev_wake_ic(events.wake_by_ic), .ev_wake_wu(events.wake_by_wu)
  );
  // the gated domain has no usable state while off or recharging
  assign dom_clr = (pstate == PS_OFF) || (pstate == PS_WAKE);

  // ---------------- input units
  // bypass latch state, for the hand-over of a waiting head flit at power-on
  logic          bl_full;
  flit_t         bl_hold;
  logic [PW-1:0] bl_in_port;
  flit_t        fifo_dout [NP][NV];
  logic         fifo_empty[NP][NV];
  logic         fifo_pop  [NP][NV];
  vstate_e      vstate    [NP][NV];
  logic [PORT_W-1:0] vport[NP][NV];
  logic [VC_W-1:0]   vout [NP][NV];
  port_e        rc_port   [NP][NV];

  for (genvar p = 0; p < NP; p++) begin : g_in
    for (genvar v = 0; v < NV; v++) begin : g_vc
      logic [$bits(flit_t)-1:0] dout_bits;
      logic take_latch;
      assign take_latch = to_pipe && bl_full && bl_in_port == PW'(p) && bl_hold.vc == VC_W'(v);
      vc_fifo #(.W($bits(flit_t)), .DEPTH(int'(vc_depth(v)))) u_buf (
        .clk, .rst_n, .clr(dom_clr),
        .push((in_link[p].valid && !latch_mode && in_link[p].flit.vc == VC_W'(v)) || take_latch),
        .din(take_latch ? bl_hold : in_link[p].flit), .pop(fifo_pop[p][v]),
        .dout(dout_bits), .empty(fifo_empty[p][v]), .full()
      );
      assign fifo_dout[p][v] = flit_t'(dout_bits);
      assign rc_port[p][v]   = route_xy(cur_x, cur_y, fifo_dout[p][v].dst_x, fifo_dout[p][v].dst_y);
    end
  end

  // ---------------- output port state (always on)
  logic [NUM_VC-1:0] vc_busy [NP];
  logic [NUM_VC-1:0] credit_ok[NP];
  logic [NP-1:0]     normal_ok, byp_head_ok, byp_body_ok;
  logic [RW-1:0]     byp_owner[NP];
  logic [NP-1:0]     pending;
  logic [CNT_W-1:0]  n_ivc [NP];

  // ---------------- VA
  logic [NREQ-1:0]   va_req, va_gnt;
  logic [PORT_W-1:0] va_port[NREQ];
  logic [VN_W-1:0]   va_vn  [NREQ];
  logic [VC_W-1:0]   va_vc  [NREQ];
  logic [NP-1:0]     va_alloc_valid;
  logic [VC_W-1:0]   va_alloc_vc[NP];

  always_comb begin
    for (int unsigned p = 0; p < NP; p++)
      for (int unsigned v = 0; v < NV; v++) begin
        va_req [p*NV+v] = (vstate[p][v] == VS_VA);
        va_port[p*NV+v] = vport[p][v];
        va_vn  [p*NV+v] = vn_of(VC_W'(v));
      end
    va_req [LATCH_ID] = 1'b0;   // the latch allocates in its own FP stage
    va_port[LATCH_ID] = '0;
    va_vn  [LATCH_ID] = '0;
  end

  vc_allocator #(.NREQ(NREQ), .NP(NP)) u_va (
    .clk, .rst_n, .req(va_req), .req_port(va_port), .req_vn(va_vn), .vc_busy,
    .gnt(va_gnt), .gnt_vc(va_vc), .alloc_valid(va_alloc_valid), .alloc_vc(va_alloc_vc)
  );

  // ---------------- SA
  logic [NV-1:0]     sa_req [NP];
  logic [PORT_W-1:0] sa_port[NP][NV];
  logic [NV-1:0]     sa_gnt [NP];
  logic [NP-1:0]     sa_out_valid;
  logic [PW-1:0]     sa_out_sel[NP];
  logic [VW-1:0]     sa_in_vc  [NP];

  always_comb begin
    for (int unsigned p = 0; p < NP; p++)
      for (int unsigned v = 0; v < NV; v++) begin
        logic [PORT_W-1:0] o;
        logic ok;
        o  = vport[p][v];
        if (fifo_dout[p][v].head)
          ok = normal_ok[o] || byp_head_ok[o];
        else
          ok = normal_ok[o] || (byp_body_ok[o] && byp_owner[o] == RW'(p*NV+v));
        sa_req [p][v] = (vstate[p][v] == VS_ACTIVE) && !fifo_empty[p][v] &&
                        credit_ok[o][vout[p][v]] && ok;
        sa_port[p][v] = o;
      end
  end

  switch_allocator #(.NP(NP), .NV(NV)) u_sa (
    .clk, .rst_n, .req(sa_req), .req_port(sa_port), .gnt(sa_gnt),
    .out_valid(sa_out_valid), .out_sel(sa_out_sel), .in_vc(sa_in_vc)
  );

  always_comb begin
    for (int unsigned p = 0; p < NP; p++)
      for (int unsigned v = 0; v < NV; v++) fifo_pop[p][v] = sa_gnt[p][v];
  end

  // ---------------- input VC state machines (RC, VA, ACTIVE)
  for (genvar p = 0; p < NP; p++) begin : g_vs
    for (genvar v = 0; v < NV; v++) begin : g_vc
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vstate[p][v] <= VS_IDLE;
          vport [p][v] <= '0;
          vout  [p][v] <= '0;
        end else if (dom_clr) begin
          vstate[p][v] <= VS_IDLE;
        end else begin
          unique case (vstate[p][v])
            VS_IDLE: if (!fifo_empty[p][v]) begin          // RC
              vport [p][v] <= rc_port[p][v];
              vstate[p][v] <= VS_VA;
            end
            VS_VA: if (va_gnt[p*NV+v]) begin                  // VA
              vout  [p][v] <= va_vc[p*NV+v];
              vstate[p][v] <= VS_ACTIVE;
            end
            VS_ACTIVE: if (sa_gnt[p][v] && fifo_dout[p][v].tail) vstate[p][v] <= VS_IDLE;
            default: vstate[p][v] <= VS_IDLE;
          endcase
        end
      end
    end
  end

  // ---------------- crossbar and ST register
  flit_t xb_in  [NP];
  link_t xb_out [NP];
  link_t st_reg [NP];

  always_comb begin
    for (int unsigned p = 0; p < NP; p++) begin
      xb_in[p]    = fifo_dout[p][sa_in_vc[p]];
      xb_in[p].vc = vout[p][sa_in_vc[p]];
    end
  end

  crossbar #(.NP(NP)) u_xbar (.in_flit(xb_in), .valid(sa_out_valid), .sel(sa_out_sel), .out_link(xb_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NP; p++) st_reg[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < NP; p++) st_reg[p] <= dom_clr ? '0 : xb_out[p];
    end
  end

  // ---------------- bypass latch
  logic              bl_send, bl_alloc, bl_credit, bl_pending, bl_busy;
  logic [PORT_W-1:0] bl_port, bl_want;
  flit_t             bl_flit;
  logic [VC_W-1:0]   bl_alloc_vc, bl_credit_vc;
  logic [PW-1:0]     bl_credit_port;

  bypass_latch #(.NP(NP), .NREQ(NREQ), .LATCH_ID(LATCH_ID)) u_latch (
    .clk, .rst_n, .cur_x, .cur_y,
    .in_link, .capture_en(latch_mode && reserved), .owner, .flush(to_pipe),
    .vc_busy, .credit_ok, .normal_ok, .byp_head_ok, .byp_body_ok, .byp_owner,
    .send_valid(bl_send), .send_port(bl_port), .send_flit(bl_flit),
    .alloc_valid(bl_alloc), .alloc_vc(bl_alloc_vc),
    .credit_valid(bl_credit), .credit_port(bl_credit_port), .credit_vc(bl_credit_vc),
    .pending(bl_pending), .want_port(bl_want), .busy(bl_busy),
    .in_progress(latch_pkt), .full(bl_full), .flit(bl_hold), .in_port(bl_in_port)
  );
  assign latch_busy              = bl_busy;
  assign events.latch_send       = bl_send;
  assign events.latch_send_gated = bl_send && pg_down[bl_port];
  assign events.latch_eject      = bl_send && bl_port == PORT_W'(P_LOCAL);
  assign events.xbar_busy        = (sa_out_valid != '0);

  // ---------------- output multiplexers, LT registers, output port control
  for (genvar o = 0; o < NP; o++) begin : g_out
    logic            s_valid, s_head, s_tail, a_valid, byp_sel;
    logic [VC_W-1:0] s_vc, a_vc;
    logic [RW-1:0]   s_req;

    assign byp_sel = bl_send && bl_port == PORT_W'(o);
    // departure at this port: SA grant (router) or FP (latch)
    always_comb begin
      logic [PW-1:0] i;
      logic [VW-1:0] v;
      i = sa_out_sel[o];
      v = sa_in_vc[i];
      if (byp_sel) begin
        s_valid = 1'b1;
        s_vc    = bl_flit.vc;
        s_head  = bl_flit.head;
        s_tail  = bl_flit.tail;
        s_req   = RW'(LATCH_ID);
      end else begin
        s_valid = sa_out_valid[o];
        s_vc    = xb_out[o].flit.vc;
        s_head  = xb_out[o].flit.head;
        s_tail  = xb_out[o].flit.tail;
        s_req   = RW'(int'(i) * NV + int'(v));
      end
      a_valid = (bl_alloc && bl_port == PORT_W'(o)) || va_alloc_valid[o];
      a_vc    = (bl_alloc && bl_port == PORT_W'(o)) ? bl_alloc_vc : va_alloc_vc[o];
    end

    // demand for this port, for IC_down and the N_IVC count
    always_comb begin
      n_ivc[o] = CNT_W'(bl_pending && bl_want == PORT_W'(o));
      for (int unsigned p = 0; p < NP; p++)
        for (int unsigned v = 0; v < NV; v++) begin
          if ((vstate[p][v] == VS_IDLE && !fifo_empty[p][v] && rc_port[p][v] == port_e'(o)) ||
              (vstate[p][v] != VS_IDLE && vport[p][v] == PORT_W'(o)))
            n_ivc[o] = n_ivc[o] + 1'b1;
        end
      pending[o] = (n_ivc[o] != '0);
    end

    upstream_port_ctrl #(.NREQ(NREQ), .CNT_W(CNT_W)) u_opc (
      .clk, .rst_n,
      .alloc_valid(a_valid), .alloc_vc(a_vc),
      .send_valid(s_valid), .send_vc(s_vc), .send_head(s_head), .send_tail(s_tail), .send_req(s_req),
      .credit_in(credit_in[o]), .pg_down(pg_down[o]), .rs_down(rs_down[o]),
      .pending(pending[o]), .n_ivc(n_ivc[o]),
      .ic_down(ic_down[o]), .wu_down(wu_down[o]),
      .vc_busy(vc_busy[o]), .credit_ok(credit_ok[o]),
      .normal_ok(normal_ok[o]), .byp_head_ok(byp_head_ok[o]), .byp_body_ok(byp_body_ok[o]),
      .byp_owner(byp_owner[o])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_link[o] <= '0;
      else if (byp_sel) begin
        out_link[o].valid <= 1'b1;
        out_link[o].flit  <= bl_flit;
      end else out_link[o] <= st_reg[o];
    end

    assert property (@(posedge clk) disable iff (!rst_n) !(byp_sel && (st_reg[o].valid || sa_out_valid[o])))
      else $error("dbypass_router: bypass latch and crossbar drive the same output");
  end

  // ---------------- credits to the upstream routers
  credit_t cr_reg[NP];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NP; p++) cr_reg[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < NP; p++) begin
        cr_reg[p] <= '0;
        for (int unsigned v = 0; v < NV; v++)
          if (sa_gnt[p][v]) begin
            cr_reg[p].valid <= 1'b1;
            cr_reg[p].vc    <= VC_W'(v);
          end
      end
    end
  end
  always_comb begin
    for (int unsigned p = 0; p < NP; p++) begin
      credit_out[p] = cr_reg[p];
      if (bl_credit && bl_credit_port == PW'(p)) begin
        credit_out[p].valid = 1'b1;
        credit_out[p].vc    = bl_credit_vc;
      end
    end
  end

  // ---------------- occupancy seen by the ctrlr unit
  always_comb begin
    router_empty = 1'b1;
    for (int unsigned p = 0; p < NP; p++) begin
      if (in_link[p].valid || st_reg[p].valid) router_empty = 1'b0;
      for (int unsigned v = 0; v < NV; v++)
        if (!fifo_empty[p][v] || vstate[p][v] != VS_IDLE) router_empty = 1'b0;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     (latch_mode && in_link[p].valid) |-> (reserved && owner == PW'(p)))
      else $error("dbypass_router: flit arrived at a powered-off router without a reservation");
  end
endmodule
