// dbp_pkg: shared types and constants of the D-bypass power-gated mesh NoC.
//
// The network is a 2D mesh of 4-stage virtual-channel routers (RC, VA, SA, ST, followed by
// one link-traversal cycle). Each link carries one flit per cycle; a flit holds a 128-bit
// payload plus sideband routing fields (head/tail, VC number, source and destination
// coordinates). Every input port has 3 virtual networks (VNs) of 2 VCs each; VCs of the
// control VNs hold 1 flit, VCs of the data VN hold 5 flits. Wakeup delay (8 cycles) and the
// thresholds th_IC = th_IVC = 1 follow the document. Which VN carries data, the flit
// sideband, the idle-detect window and the port numbering are this design's own choices.
package dbp_pkg;

  // ---- network geometry -------------------------------------------------------------
  localparam int unsigned COORD_W     = 3;     // up to 8 routers per dimension
  localparam int unsigned NUM_PORTS   = 5;     // Local (NI), X+, X-, Y+, Y-
  localparam int unsigned PORT_W      = 3;

  // ---- virtual channels ---------------------------------------------------------------
  localparam int unsigned NUM_VN      = 3;
  localparam int unsigned VCS_PER_VN  = 2;
  localparam int unsigned NUM_VC      = NUM_VN * VCS_PER_VN;
  localparam int unsigned VC_W        = 3;
  localparam int unsigned VN_W        = 2;
  localparam int unsigned CTRL_VC_DEPTH = 1;
  localparam int unsigned DATA_VC_DEPTH = 5;
  localparam int unsigned DATA_VN     = 2;     // VN whose VCs have 5-flit buffers
  localparam int unsigned CREDIT_W    = 3;     // holds 0..DATA_VC_DEPTH

  // ---- link ---------------------------------------------------------------------------
  localparam int unsigned FLIT_DATA_W = 128;
  localparam int unsigned MAX_PKT_FLITS = 2;   // head (address) + one 16-byte data flit
  localparam int unsigned LEN_W       = 2;

  // ---- power gating -------------------------------------------------------------------
  localparam int unsigned WAKEUP_DELAY  = 8;
  localparam int unsigned BREAK_EVEN    = 10;
  localparam int unsigned T_IDLE_DETECT = 10;
  localparam int unsigned TH_IC         = 1;
  localparam int unsigned TH_IVC        = 1;
  localparam int unsigned RS_GUARD      = 6;   // cycles RS stays low before a hand-over

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_XP    = 3'd1,
    P_XN    = 3'd2,
    P_YP    = 3'd3,
    P_YN    = 3'd4
  } port_e;

  typedef struct packed {
    logic                   head;
    logic                   tail;
    logic [VC_W-1:0]        vc;
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [COORD_W-1:0]     src_x;
    logic [COORD_W-1:0]     src_y;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // Packet handed by a core to its network interface.
  typedef struct packed {
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [VN_W-1:0]        vn;
    logic [LEN_W-1:0]       len;     // 1 or 2 flits
    logic [FLIT_DATA_W-1:0] data1;   // payload of the second flit
    logic [FLIT_DATA_W-1:0] data0;   // payload of the head flit
  } pkt_t;

  // Power-gating state of a router's ctrlr unit.
  typedef enum logic [2:0] {
    PS_ON       = 3'd0,  // powered, PG low
    PS_IDLE_DET = 3'd1,  // powered, PG high, counting T_idle_detect
    PS_OFF      = 3'd2,  // sleep asserted, only the bypass path works
    PS_WAKE     = 3'd3,  // recharging for WAKEUP_DELAY cycles, bypass still usable
    PS_DRAIN    = 3'd4   // charged; waits for the bypass packet in flight, then PS_ON
  } pstate_e;

  // Per-cycle event flags of a router, for performance counters.
  typedef struct packed {
    logic latch_send;        // a flit left the bypass latch (FP stage)
    logic latch_send_gated;  // ... into the bypass latch of another powered-off router
    logic latch_eject;       // ... to the local NI of this powered-off router
    logic resv_grant;        // the bypass latch was reserved for an upstream port
    logic wake_by_ic;        // wake-up started because N_IC > th_IC
    logic wake_by_wu;        // wake-up started because of a WU_up
    logic xbar_busy;         // a flit crossed the crossbar (normal pipeline)
  } pg_event_t;

  function automatic logic [VN_W-1:0] vn_of(input logic [VC_W-1:0] vc);
    return VN_W'(vc / VC_W'(VCS_PER_VN));
  endfunction

  function automatic logic [CREDIT_W-1:0] vc_depth(input int unsigned vc);
    return (vc / VCS_PER_VN == DATA_VN) ? CREDIT_W'(DATA_VC_DEPTH) : CREDIT_W'(CTRL_VC_DEPTH);
  endfunction

  // Dimension-ordered X-Y routing.
  function automatic port_e route_xy(input logic [COORD_W-1:0] cur_x, input logic [COORD_W-1:0] cur_y,
                                     input logic [COORD_W-1:0] dst_x, input logic [COORD_W-1:0] dst_y);
    if (dst_x > cur_x)      return P_XP;
    else if (dst_x < cur_x) return P_XN;
    else if (dst_y > cur_y) return P_YP;
    else if (dst_y < cur_y) return P_YN;
    else                    return P_LOCAL;
  endfunction

endpackage
