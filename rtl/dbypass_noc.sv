// dbypass_noc: a MESH_X x MESH_Y mesh network-on-chip with D-bypass power gating.
//
// Every node holds a dbypass_router and a network_interface. Routers are linked to their
// four neighbours by a flit link and a credit link in each direction, plus the power-gating
// handshake of each link: IC (incoming packet / reserve your bypass latch) and WU (wake up)
// from the upstream router, RS (reservation success) and PG (I am power gated) from the
// downstream router. A packet always follows its X-Y shortest path: a powered-off router on
// the way is crossed through its bypass latch after the upstream router has reserved it, so
// the path is built dynamically in any direction and over any number of powered-off hops.
// Ports on the mesh edge are tied off. The core side of node n = y*MESH_X + x is a packet
// injection port and an ejected-flit port; `sleep`, `pstate` and `events`
// show each router's power state and per-cycle power-gating events.
// The 8 x 8 mesh is the document's configuration.
module dbypass_noc
  import dbp_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  localparam int unsigned N     = MESH_X * MESH_Y
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   inj_valid,
  input  pkt_t           inj_pkt  [N],
  output logic [N-1:0]   inj_ready,
  output link_t          ej_link  [N],
  output logic [N-1:0]   sleep,
  output pstate_e        pstate   [N],
  output pg_event_t      events   [N]
);
  localparam int unsigned NP = NUM_PORTS;

  link_t              r_in_link  [N][NP];
  link_t              r_out_link [N][NP];
  credit_t            r_cr_out   [N][NP];
  credit_t            r_cr_in    [N][NP];
  logic [NP-1:0]      r_ic_up    [N];
  logic [NP-1:0]      r_wu_up    [N];
  logic [NP-1:0]      r_rs_up    [N];
  logic               r_pg_up    [N];
  logic [NP-1:0]      r_ic_down  [N];
  logic [NP-1:0]      r_wu_down  [N];
  logic [NP-1:0]      r_rs_down  [N];
  logic [NP-1:0]      r_pg_down  [N];

  link_t              ni_to_r    [N];
  credit_t            ni_cr      [N];
  logic [N-1:0]       ni_ic, ni_wu;

  // port opposite to p on the neighbouring router
  function automatic int unsigned opp(input int unsigned p);
    case (p)
      1: return 2;
      2: return 1;
      3: return 4;
      4: return 3;
      default: return 0;
    endcase
  endfunction

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      // ---- links to the four neighbours
      for (genvar p = 1; p < NP; p++) begin : g_port
        localparam int  nx  = (p == 1) ? x + 1 : (p == 2) ? x - 1 : x;
        localparam int  ny  = (p == 3) ? y + 1 : (p == 4) ? y - 1 : y;
        localparam bit  has = (nx >= 0) && (nx < int'(MESH_X)) && (ny >= 0) && (ny < int'(MESH_Y));
        localparam int unsigned m = has ? (ny * MESH_X + nx) : 0;
        localparam int unsigned q = opp(p);
        if (has) begin : g_link
          assign r_in_link[n][p] = r_out_link[m][q];
          assign r_cr_in[n][p]   = r_cr_out[m][q];
          assign r_ic_up[n][p]   = r_ic_down[m][q];
          assign r_wu_up[n][p]   = r_wu_down[m][q];
          assign r_rs_down[n][p] = r_rs_up[m][q];
          assign r_pg_down[n][p] = r_pg_up[m];
        end else begin : g_edge
          assign r_in_link[n][p] = '0;
          assign r_cr_in[n][p]   = '0;
          assign r_ic_up[n][p]   = 1'b0;
          assign r_wu_up[n][p]   = 1'b0;
          assign r_rs_down[n][p] = 1'b0;
          assign r_pg_down[n][p] = 1'b0;
        end
      end

      // ---- local port: the NI is upstream of the router's input and always-on sink of its output
      assign r_in_link[n][0] = ni_to_r[n];
      assign r_cr_in[n][0]   = ni_cr[n];
      assign r_ic_up[n][0]   = ni_ic[n];
      assign r_wu_up[n][0]   = ni_wu[n];
      assign r_rs_down[n][0] = 1'b0;
      assign r_pg_down[n][0] = 1'b0;

      dbypass_router u_router (
        .clk, .rst_n, .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .in_link(r_in_link[n]), .credit_out(r_cr_out[n]),
        .ic_up(r_ic_up[n]), .wu_up(r_wu_up[n]), .rs_up(r_rs_up[n]), .pg_up(r_pg_up[n]),
        .out_link(r_out_link[n]), .credit_in(r_cr_in[n]),
        .ic_down(r_ic_down[n]), .wu_down(r_wu_down[n]), .rs_down(r_rs_down[n]), .pg_down(r_pg_down[n]),
        .sleep(sleep[n]), .pstate(pstate[n]), .events(events[n])
      );

      network_interface u_ni (
        .clk, .rst_n, .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .inj_valid(inj_valid[n]), .inj_pkt(inj_pkt[n]), .inj_ready(inj_ready[n]), .ej_link(ej_link[n]),
        .to_router(ni_to_r[n]), .credit_from_router(r_cr_out[n][0]),
        .ic_down(ni_ic[n]), .wu_down(ni_wu[n]), .rs_down(r_rs_up[n][0]), .pg_down(r_pg_up[n]),
        .from_router(r_out_link[n][0]), .credit_to_router(ni_cr[n])
      );
    end
  end

  initial begin
    assert (MESH_X <= (1 << COORD_W) && MESH_Y <= (1 << COORD_W))
      else $fatal(1, "dbypass_noc: mesh larger than the coordinate fields");
  end
endmodule
