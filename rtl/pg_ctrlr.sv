// pg_ctrlr: the ctrlr unit of a D-bypass router (reservation and power gating).
//
// Power gating (always-on logic):
//   PS_ON       -> PS_IDLE_DET when the router holds no packet and no IC_up/WU_up is raised;
//                  PG is then raised towards all upstream neighbours and the NI.
//   PS_IDLE_DET -> PS_ON at once if an IC_up or WU_up is raised or a flit shows up;
//               -> PS_OFF after T_IDLE_DETECT cycles: `sleep` cuts the router's supply.
//   PS_OFF      -> PS_WAKE when more than TH_IC IC_up signals are raised together (N_IC) or
//                  any WU_up is raised (an upstream router's N_IVC exceeded TH_IVC).
//   PS_WAKE     -> PS_DRAIN after WAKEUP_DELAY cycles of recharging.
//   PS_DRAIN    -> PS_ON once RS has been low for RS_GUARD cycles and no bypassed packet is
//                  between its head and tail; PG then falls and upstream routers use the normal
//                  pipeline. A head flit still waiting in the latch is moved (`to_pipeline`)
//                  into the input buffer of the VC it arrived on, and the rest of its packet
//                  follows through the normal pipeline.
// Reservation: in PS_OFF and PS_WAKE a free bypass latch is reserved, by round-robin among
// the raised IC_up lines, for one upstream port, and RS_up of that port is raised one cycle
// after its IC_up. The reservation is released when that IC_up falls and the latch holds no
// packet. No new reservation is granted in PS_DRAIN.
// The states, thresholds, round-robin choice and the timing of IC/RS follow the document.
// The idle-detect window (T_IDLE_DETECT = 10) and the PS_DRAIN hand-over protocol are this
// design's; the document only says that the rest of a packet goes through the router once it
// is powered on.
module pg_ctrlr
  import dbp_pkg::*;
#(
  parameter int unsigned NP            = NUM_PORTS,
  parameter int unsigned WAKEUP_CYC    = WAKEUP_DELAY,
  parameter int unsigned IDLE_DET_CYC  = T_IDLE_DETECT,
  parameter int unsigned GUARD_CYC     = RS_GUARD,
  parameter int unsigned TH_IC_P       = TH_IC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NP-1:0]          ic_up,
  input  logic [NP-1:0]          wu_up,
  input  logic                   router_empty,  // no flit in the gated pipeline or arriving
  input  logic                   latch_busy,    // bypass latch full or a packet in progress
  input  logic                   latch_pkt,     // a bypassed packet is between head and tail
  output logic                   pg_up,
  output logic [NP-1:0]          rs_up,
  output logic                   sleep,
  output logic                   latch_mode,    // input flits go to the bypass latch
  output logic                   to_pipeline,   // hand-over: a head left in the latch goes to its input VC
  output logic                   reserved,
  output logic [$clog2(NP)-1:0]  owner,
  output pstate_e                state,
  output logic                   ev_grant,
  output logic                   ev_wake_ic,
  output logic                   ev_wake_wu
);
  localparam int unsigned TW = 5;
  localparam int unsigned OW = $clog2(NP);

  logic [TW-1:0] timer;
  logic [NP-1:0] arb_gnt;
  logic [OW-1:0] arb_idx;
  logic          arb_any;
  logic          grant_ok;
  logic          do_grant, do_release;
  logic [3:0]    n_ic;

  always_comb begin
    n_ic = '0;
    for (int unsigned i = 0; i < NP; i++) n_ic += 4'(ic_up[i]);
  end

  assign grant_ok   = (state == PS_OFF) || (state == PS_WAKE);
  assign do_grant   = grant_ok && !reserved && arb_any;
  assign do_release = reserved && !ic_up[owner] && !latch_busy;

  rr_arbiter #(.N(NP)) u_arb (
    .clk, .rst_n, .req(ic_up), .advance(do_grant),
    .gnt(arb_gnt), .gnt_idx(arb_idx), .any(arb_any)
  );

  assign sleep      = (state == PS_OFF);
  assign to_pipeline = (state == PS_DRAIN) && (timer >= TW'(GUARD_CYC)) && !latch_pkt;
  assign ev_grant   = do_grant;
  assign ev_wake_wu = (state == PS_OFF) && (wu_up != '0);
  assign ev_wake_ic = (state == PS_OFF) && (wu_up == '0) && (n_ic > 4'(TH_IC_P));
  assign latch_mode = (state == PS_OFF) || (state == PS_WAKE) || (state == PS_DRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PS_ON;
      timer    <= '0;
      pg_up    <= 1'b0;
      reserved <= 1'b0;
      owner    <= '0;
      rs_up    <= '0;
    end else begin
      // ---- reservation of the bypass latch
      if (do_grant) begin
        reserved <= 1'b1;
        owner    <= arb_idx;
      end else if (do_release) begin
        reserved <= 1'b0;
      end
      rs_up <= '0;
      if (do_grant)                               rs_up[arb_idx] <= 1'b1;
      else if (reserved && !do_release && grant_ok) rs_up[owner]  <= 1'b1;

      // ---- power state
      timer <= timer + 1'b1;
      unique case (state)
        PS_ON: begin
          if (router_empty && !latch_busy && ic_up == '0 && wu_up == '0) begin
            state <= PS_IDLE_DET;
            pg_up <= 1'b1;
            timer <= '0;
          end
        end
        PS_IDLE_DET: begin
          if (ic_up != '0 || wu_up != '0 || !router_empty) begin
            state <= PS_ON;
            pg_up <= 1'b0;
          end else if (timer == TW'(IDLE_DET_CYC - 1)) begin
            state <= PS_OFF;
          end
        end
        PS_OFF: begin
          if (n_ic > 4'(TH_IC_P) || wu_up != '0) begin
            state <= PS_WAKE;
            timer <= '0;
          end
        end
        PS_WAKE: begin
          if (timer == TW'(WAKEUP_CYC - 1)) begin
            state <= PS_DRAIN;
            timer <= '0;
          end
        end
        PS_DRAIN: begin
          if (to_pipeline) begin
            state    <= PS_ON;
            pg_up    <= 1'b0;
            reserved <= 1'b0;
          end else if (timer == TW'(GUARD_CYC)) begin
            timer <= timer;   // hold: wait for the bypassed packet
          end
        end
        default: state <= PS_ON;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rs_up))
    else $error("pg_ctrlr: bypass latch granted to two upstream ports");
  assert property (@(posedge clk) disable iff (!rst_n) (state == PS_ON) |-> (rs_up == '0))
    else $error("pg_ctrlr: RS raised while the router is on");
endmodule
