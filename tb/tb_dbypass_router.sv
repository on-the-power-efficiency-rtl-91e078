// tb_dbypass_router: one D-bypass router at mesh position (1,1); the testbench plays its
// upstream neighbours (on the X- and Y- input ports) and an always-on downstream neighbour.
//
// Test 1 follows the reservation example cycle by cycle: with the router powered off, the
// upstream raises IC (visible in cycle 1); RS must be visible in cycle 2 and not before; the
// head flit, on the link in cycle 4, must leave the bypass latch towards X+ in cycle 6 with a
// credit back in cycle 6; the tail, on the link in cycle 8, must leave in cycle 10. The router
// must not wake up. Test 2 raises IC on two ports in the same cycle: the router must wake,
// grant the latch to exactly one of them, recharge for 8 cycles and then, once the latch is
// released, return to the normal pipeline, where a head flit must need 5 cycles from its
// input link to its output link (RC, VA, SA, ST, LT).
module tb_dbypass_router;
  import dbp_pkg::*;
  localparam int NP = NUM_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t         in_link [NP];
  credit_t       credit_out[NP];
  logic [NP-1:0] ic_up, wu_up, rs_up;
  logic          pg_up;
  link_t         out_link[NP];
  credit_t       credit_in[NP];
  logic [NP-1:0] ic_down, wu_down, rs_down, pg_down;
  logic          sleep;
  pstate_e       pstate;
  pg_event_t     events;

  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  dbypass_router dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;             // cycle number of the current test, counted at each edge

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (cycle %0d): %s", cyc, msg);
    end
  endtask

  // advance one cycle: values driven after this return are visible in cycle `cyc`
  task automatic tick();
    @(posedge clk);
    #1 cyc++;
  endtask

  function automatic flit_t mk(input bit h, input bit t, input int vc, input int dx, input int dy, input int d);
    flit_t f;
    f = '0;
    f.head = h; f.tail = t; f.vc = VC_W'(vc);
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
    f.data = FLIT_DATA_W'(d);
    return f;
  endfunction

  // downstream neighbours: return a credit one cycle after each flit, count flits
  int got_x_plus = 0;
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      credit_in[p].valid <= out_link[p].valid;
      credit_in[p].vc    <= out_link[p].flit.vc;
    end
    if (out_link[P_XP].valid) got_x_plus++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_in, t_out, winner, loser;
    for (int p = 0; p < NP; p++) in_link[p] = '0;
    ic_up = '0; wu_up = '0; rs_down = '0; pg_down = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(pg_up == 1'b1 && pstate == PS_IDLE_DET, "PG raised once the empty router is idle");
    check(sleep == 1'b0, "not yet asleep during idle detection");
    repeat (T_IDLE_DETECT) @(posedge clk);
    #1 check(sleep == 1'b1 && pstate == PS_OFF, "asleep after T_idle_detect cycles");

    // ---------------- test 1: reservation example, packet of 2 flits to (3,1) via X+
    @(negedge clk);
    cyc = 0;
    tick();                     // cycle 1: IC visible
    ic_up[P_XN] = 1'b1;
    check(rs_up == '0, "no RS in cycle 1");
    tick();                     // cycle 2
    check(rs_up == (NP'(1) << P_XN), "RS to the X- neighbour in cycle 2");
    tick(); tick();             // cycle 4: head on the link (SA 2, ST 3, LT 4)
    in_link[P_XN] = '{valid: 1'b1, flit: mk(1, 0, 4, 3, 1, 32'h1111)};
    tick();                     // cycle 5: head in the latch (FP)
    in_link[P_XN] = '0;
    check(out_link[P_XP].valid == 1'b0, "nothing leaves before FP");
    tick();                     // cycle 6: flit on the X+ link, credit to upstream
    check(out_link[P_XP].valid && out_link[P_XP].flit.head && out_link[P_XP].flit.data == FLIT_DATA_W'(32'h1111),
          "head flit leaves towards X+ in cycle 6");
    check(vn_of(out_link[P_XP].flit.vc) == 2'd2, "output VC in the packet's VN");
    check(credit_out[P_XN].valid && credit_out[P_XN].vc == VC_W'(4), "credit for VC 4 back in cycle 6");
    tick(); tick();             // cycle 8: tail on the link (SA 6, ST 7, LT 8)
    in_link[P_XN] = '{valid: 1'b1, flit: mk(0, 1, 4, 3, 1, 32'h2222)};
    tick();                     // cycle 9: FP
    in_link[P_XN] = '0;
    tick();                     // cycle 10
    check(out_link[P_XP].valid && out_link[P_XP].flit.tail && out_link[P_XP].flit.data == FLIT_DATA_W'(32'h2222),
          "tail flit leaves in cycle 10");
    check(credit_out[P_XN].valid, "credit for the tail in cycle 10");
    ic_up[P_XN] = 1'b0;
    tick(); tick();
    check(rs_up == '0, "RS dropped after IC fell");
    check(dut.u_ctrlr.reserved == 1'b0, "latch reservation released");
    check(sleep == 1'b1, "router stayed asleep for a lone packet");
    check(got_x_plus == 2, "two flits forwarded");

    // ---------------- test 2: two IC at once wake the router
    ic_up[P_XN] = 1'b1;
    ic_up[P_YN] = 1'b1;
    tick(); tick();
    check(pstate == PS_WAKE, "N_IC = 2 > th_IC starts the wake-up");
    check($onehot(rs_up & ((NP'(1) << P_XN) | (NP'(1) << P_YN))), "latch granted to exactly one upstream");
    winner = rs_up[P_XN] ? P_XN : P_YN;
    loser  = (winner == P_XN) ? P_YN : P_XN;
    // the winner sends a single-flit packet to (1,3) through the latch (Y+), then drops IC
    tick();
    in_link[winner] = '{valid: 1'b1, flit: mk(1, 1, 0, 1, 3, 32'h3333)};
    tick();
    in_link[winner] = '0;
    tick();
    check(out_link[P_YP].valid && out_link[P_YP].flit.data == FLIT_DATA_W'(32'h3333), "winner's flit bypassed to Y+");
    ic_up[winner] = 1'b0;
    // loser keeps IC; wait for the router to come on (PG falls)
    begin
      int t = 0;
      while (pg_up && t < 60) begin tick(); t++; end
      check(!pg_up && pstate == PS_ON, "router on after wakeup delay and hand-over");
      check(t + 5 >= WAKEUP_DELAY, "recharging took at least the wakeup delay");
    end
    check(rs_up == '0, "no RS while on");
    ic_up[loser] = 1'b0;
    // normal pipeline: head+tail to (3,1) through X+
    tick();
    t_in = cyc;
    in_link[loser] = '{valid: 1'b1, flit: mk(1, 1, 2, 3, 1, 32'h4444)};
    tick();
    in_link[loser] = '0;
    while (!out_link[P_XP].valid && cyc < t_in + 30) tick();
    t_out = cyc;
    check(out_link[P_XP].flit.data == FLIT_DATA_W'(32'h4444), "normal flit delivered");
    check(t_out - t_in == 5, $sformatf("head flit needs 5 cycles per hop (got %0d)", t_out - t_in));
    check(credit_out[loser].valid == 1'b0 || credit_out[loser].vc == VC_W'(2), "credit for the buffer VC");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
