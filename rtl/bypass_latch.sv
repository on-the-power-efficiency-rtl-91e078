// bypass_latch: the single bypass latch of a D-bypass router, with its input multiplexer
// and the Forward Packet (FP) stage.
//
// While the router is powered off (or recharging), flits do not enter the input buffers.
// The input multiplexer takes the flit arriving on the port that holds the latch reservation
// (`owner`, set by the ctrlr unit) and stores it in the one-flit latch. In the next cycle,
// the FP stage forwards it: for a head flit it computes the X-Y route, picks the lowest free
// output VC of the packet's virtual network that has a credit, and sends the flit through the
// output multiplexer of that port in the same cycle; body and tail flits follow on the same
// port and VC. A flit leaves only when the output port allows it (normal link, or the next
// router's bypass latch is reserved for this router and empty). When a flit leaves, a
// credit for the VC it arrived on is returned to the owner port, so the upstream router can
// send the next flit. `pending`/`want_port` tell the output port that a packet waits, which
// raises IC_down towards a powered-off next router.
// On `flush` (the router has just been powered on) a waiting head flit is taken over by the
// router's input buffer instead. One latch per router, the single-stage FP and credit return on departure follow the
// document; choosing the VC in the FP cycle by "lowest free" is this design's choice.
module bypass_latch
  import dbp_pkg::*;
#(
  parameter int unsigned NP       = NUM_PORTS,
  parameter int unsigned NREQ     = 31,
  parameter int unsigned LATCH_ID = 30
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [COORD_W-1:0]      cur_x,
  input  logic [COORD_W-1:0]      cur_y,
  // input multiplexer
  input  link_t                   in_link [NP],
  input  logic                    capture_en,
  input  logic [$clog2(NP)-1:0]   owner,
  input  logic                    flush,      // the flit was moved into the router's buffers
  // state of the output ports
  input  logic [NUM_VC-1:0]       vc_busy     [NP],
  input  logic [NUM_VC-1:0]       credit_ok   [NP],
  input  logic [NP-1:0]           normal_ok,
  input  logic [NP-1:0]           byp_head_ok,
  input  logic [NP-1:0]           byp_body_ok,
  input  logic [$clog2(NREQ)-1:0] byp_owner   [NP],
  // output multiplexers
  output logic                    send_valid,
  output logic [PORT_W-1:0]       send_port,
  output flit_t                   send_flit,
  output logic                    alloc_valid,
  output logic [VC_W-1:0]         alloc_vc,
  // credit back to the upstream router
  output logic                    credit_valid,
  output logic [$clog2(NP)-1:0]   credit_port,
  output logic [VC_W-1:0]         credit_vc,
  // demand and occupancy
  output logic                    pending,
  output logic [PORT_W-1:0]       want_port,
  output logic                    busy,
  output logic                    in_progress,
  output logic                    full,
  output flit_t                   flit,
  output logic [$clog2(NP)-1:0]   in_port
);
  logic                   pkt;        // between head and tail of a bypassed packet
  logic [PORT_W-1:0]      out_port;
  logic [VC_W-1:0]        out_vc;

  logic [VC_W-1:0]        head_vc;
  logic                   head_vc_ok;
  logic                   may_go;

  assign busy        = full || pkt;
  assign in_progress = pkt;
  assign pending   = full;
  assign want_port = flit.head ? PORT_W'(route_xy(cur_x, cur_y, flit.dst_x, flit.dst_y)) : out_port;

  // output VC for a head flit: lowest free VC of its VN with a credit
  always_comb begin
    head_vc    = '0;
    head_vc_ok = 1'b0;
    for (int k = VCS_PER_VN - 1; k >= 0; k--) begin
      int unsigned v;
      v = int'(vn_of(flit.vc)) * VCS_PER_VN + k;
      if (!vc_busy[want_port][v] && credit_ok[want_port][v]) begin
        head_vc    = VC_W'(v);
        head_vc_ok = 1'b1;
      end
    end
  end

  always_comb begin
    if (flit.head)
      may_go = head_vc_ok && (normal_ok[want_port] || byp_head_ok[want_port]);
    else
      may_go = credit_ok[want_port][out_vc] &&
               (normal_ok[want_port] ||
                (byp_body_ok[want_port] && byp_owner[want_port] == $clog2(NREQ)'(LATCH_ID)));
  end

  assign send_valid  = full && may_go && !flush;
  assign send_port   = want_port;
  assign alloc_valid = send_valid && flit.head;
  assign alloc_vc    = head_vc;
  always_comb begin
    send_flit    = flit;
    send_flit.vc = flit.head ? head_vc : out_vc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full         <= 1'b0;
      flit         <= '0;
      in_port      <= '0;
      pkt          <= 1'b0;
      out_port     <= '0;
      out_vc       <= '0;
      credit_valid <= 1'b0;
      credit_port  <= '0;
      credit_vc    <= '0;
    end else begin
      credit_valid <= 1'b0;
      if (send_valid) begin
        full         <= 1'b0;
        credit_valid <= 1'b1;
        credit_port  <= in_port;
        credit_vc    <= flit.vc;
        if (flit.head) begin
          pkt      <= !flit.tail;
          out_port <= want_port;
          out_vc   <= head_vc;
        end else if (flit.tail) begin
          pkt <= 1'b0;
        end
      end
      if (flush) full <= 1'b0;
      if (capture_en && in_link[owner].valid) begin
        full    <= 1'b1;
        flit    <= in_link[owner].flit;
        in_port <= owner;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (capture_en && in_link[owner].valid) |-> (!full || send_valid))
    else $error("bypass_latch: flit arrived at an occupied latch");
endmodule
