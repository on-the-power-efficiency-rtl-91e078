// tb_bypass_latch: the bypass latch of router (2,2) on its own. A 2-flit packet for (4,2)
// arrives on the reserved X- port: the head must leave in the cycle after it arrives (FP),
// towards X+, on the lowest free VC of its VN that has a credit, with a VC allocation at the
// same time; its credit (for the VC it arrived on) goes back to X- one cycle later. When the
// next router is powered off, the head waits for RS and the body flit only leaves for the
// latch that owns the link. A single-flit packet for (2,2) itself is ejected to the Local port.
module tb_bypass_latch;
  import dbp_pkg::*;
  localparam int NP = NUM_PORTS, NREQ = 31, LATCH_ID = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [COORD_W-1:0] cur_x = 2, cur_y = 2;
  link_t in_link[NP];
  logic capture_en;
  logic [2:0] owner;
  logic [NUM_VC-1:0] vc_busy[NP], credit_ok[NP];
  logic [NP-1:0] normal_ok, byp_head_ok, byp_body_ok;
  logic [4:0] byp_owner[NP];
  logic send_valid, alloc_valid, credit_valid, pending, busy;
  logic flush, in_progress, full;
  flit_t flit;
  logic [2:0] in_port;
  logic [PORT_W-1:0] send_port, want_port;
  flit_t send_flit;
  logic [VC_W-1:0] alloc_vc, credit_vc;
  logic [2:0] credit_port;
  bypass_latch #(.NP(NP), .NREQ(NREQ), .LATCH_ID(LATCH_ID)) dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask
  function automatic flit_t mk(input bit h, input bit t, input int vc, input int dx, input int dy, input int d);
    flit_t f;
    f = '0;
    f.head = h; f.tail = t; f.vc = VC_W'(vc); f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
    f.data = FLIT_DATA_W'(d);
    return f;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      in_link[p] = '0; vc_busy[p] = '0; credit_ok[p] = '1; byp_owner[p] = '0;
    end
    normal_ok = '1; byp_head_ok = '0; byp_body_ok = '0;
    capture_en = 1'b1; flush = 1'b0; owner = 3'(P_XN);
    tick();
    rst_n = 1'b1;
    vc_busy[P_XP] = 6'b010000;                 // VC4 taken, VC5 free in VN 2
    in_link[P_XN] = '{valid: 1'b1, flit: mk(1, 0, 5, 4, 2, 32'hAAAA)};
    tick();
    in_link[P_XN] = '0;
    chk(busy && pending && want_port == PORT_W'(P_XP), "head stored, routed X+");
    chk(send_valid && send_port == PORT_W'(P_XP) && send_flit.vc == VC_W'(5) && send_flit.data == FLIT_DATA_W'(32'hAAAA),
        "head forwarded in the FP cycle on the lowest free VC of its VN");
    chk(alloc_valid && alloc_vc == VC_W'(5), "VC allocated with the head");
    tick();
    chk(credit_valid && credit_port == 3'(P_XN) && credit_vc == VC_W'(5), "credit to X- for the arrival VC");
    chk(!pending && busy, "latch empty, packet still in progress");
    // next router powered off: body only when the latch owns the link
    normal_ok[P_XP] = 1'b0; byp_body_ok[P_XP] = 1'b1; byp_owner[P_XP] = 5'd3;
    in_link[P_XN] = '{valid: 1'b1, flit: mk(0, 1, 5, 4, 2, 32'hBBBB)};
    tick();
    in_link[P_XN] = '0;
    chk(!send_valid, "body blocked: link owned by another requester");
    byp_owner[P_XP] = 5'(LATCH_ID);
    #1 chk(send_valid && send_flit.vc == VC_W'(5) && send_flit.tail, "body leaves for the owning latch on the same VC");
    tick();
    chk(!busy, "packet done");
    // head towards a powered-off router waits for RS
    normal_ok[P_XP] = 1'b0; byp_body_ok = '0; vc_busy[P_XP] = '0;
    in_link[P_XN] = '{valid: 1'b1, flit: mk(1, 1, 0, 5, 2, 32'hCCCC)};
    tick();
    in_link[P_XN] = '0;
    chk(!send_valid, "head waits at FP without RS");
    tick();
    chk(!send_valid, "still waiting");
    byp_head_ok[P_XP] = 1'b1;
    #1 chk(send_valid && send_flit.vc == VC_W'(0), "head leaves once RS is seen");
    tick();
    byp_head_ok = '0; normal_ok = '1;
    // ejection at the destination
    owner = 3'(P_YN);
    in_link[P_YN] = '{valid: 1'b1, flit: mk(1, 1, 2, 2, 2, 32'hDDDD)};
    tick();
    in_link[P_YN] = '0;
    chk(send_valid && send_port == PORT_W'(P_LOCAL) && send_flit.data == FLIT_DATA_W'(32'hDDDD), "ejected to the NI");
    tick();
    chk(credit_valid && credit_port == 3'(P_YN), "credit to Y-");
    // hand-over: a waiting head is taken by the router's buffers, with no credit from the latch
    owner = 3'(P_XN); normal_ok = '0; byp_head_ok = '0;
    in_link[P_XN] = '{valid: 1'b1, flit: mk(1, 1, 1, 5, 2, 32'hEEEE)};
    tick();
    in_link[P_XN] = '0;
    chk(full && !in_progress && in_port == 3'(P_XN) && flit.vc == VC_W'(1) && !send_valid, "head held for the hand-over");
    flush = 1'b1;
    tick();
    flush = 1'b0;
    chk(!full && !busy && !credit_valid, "latch empty after the hand-over, no credit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
