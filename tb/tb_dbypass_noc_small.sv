// tb_dbypass_noc_small: the end-to-end test of tb_dbypass_noc on a 4 x 4 mesh, which builds
// and runs in a fraction of the time.
//
// Directed phases make each power-gating mechanism happen and check its effect:
//   A  one packet over three powered-off routers, crossing only bypass latches; no router
//      may wake up and every flit must cross three latches;
//   B  two packets that reach the same powered-off router in the same cycle: N_IC = 2 > th_IC
//      must wake it;
//   C  two packets queued at once in one NI for its powered-off router: N_IVC = 2 > th_IVC
//      raises WU and wakes it;
// then synthetic traffic (uniform random, bit-complement, transpose) at a low and a high
// injection rate. A scoreboard checks that every packet reaches its destination exactly
// once, in flit order, with its payload, source and virtual network intact. At the end every
// router must fall asleep again. Event counters (bypass forwards, multi-hop bypasses,
// ejections from a sleeping router, idle-detect aborts, wake-ups, hand-overs, crossbar
// traversals) must all be non-zero.
module tb_dbypass_noc_small;
  import dbp_pkg::*;

  localparam int MX = 4;
  localparam int MY = 4;
  localparam int N  = MX * MY;
  localparam int MAXP = 4096;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [N-1:0]  inj_valid;
  pkt_t          inj_pkt  [N];
  logic [N-1:0]  inj_ready;
  link_t         ej_link  [N];
  logic [N-1:0]  sleep;
  pstate_e       pstate   [N];
  pg_event_t     events   [N];

  always #5 clk = ~clk;

  dbypass_noc #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // inj_ready sampled just before the edge (the handshake happens on that edge)
  logic [N-1:0] inj_ready_q;
  always @(posedge clk) inj_ready_q <= inj_ready;

  // ------------------------------------------------------------ scoreboard
  int  p_dst [MAXP], p_src[MAXP], p_len[MAXP], p_vn[MAXP], p_got[MAXP];
  int  n_sent = 0, n_recv = 0, n_flit_err = 0;

  function automatic logic [FLIT_DATA_W-1:0] payload(input int id, input int fi);
    return {32'hA5A5_0000 | 32'(fi), 32'(id * 13 + 7), 32'(id) ^ 32'h5A5A_5A5A, 32'(id)};
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (ej_link[n].valid) begin
          flit_t f;
          int id, fi;
          f  = ej_link[n].flit;
          id = int'(f.data[31:0]);
          if (id < 0 || id >= n_sent) begin
            failures++; checks++;
            $display("FAIL @%0d: unknown packet id %0d at node %0d", cycle, id, n);
          end else begin
            fi = p_got[id];
            checks++;
            if (p_dst[id] != n || f.data != payload(id, fi) || fi >= p_len[id] ||
                f.head != (fi == 0) || f.tail != (fi == p_len[id] - 1) ||
                int'(vn_of(f.vc)) != p_vn[id] ||
                int'(f.src_y) * MX + int'(f.src_x) != p_src[id]) begin
              failures++;
              $display("FAIL @%0d: packet %0d flit %0d wrong at node %0d (dst %0d)", cycle, id, fi, n, p_dst[id]);
            end
            p_got[id] = fi + 1;
            if (p_got[id] == p_len[id]) n_recv++;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ event counters
  int ev_byp[N], ev_multi[N], ev_lej[N], ev_off[N], ev_wake_ic[N], ev_wake_wu[N],
      ev_abort[N], ev_drain[N], ev_grant[N], ev_xbar[N];
  initial for (int n = 0; n < N; n++) begin
    ev_byp[n] = 0; ev_multi[n] = 0; ev_lej[n] = 0; ev_off[n] = 0; ev_wake_ic[n] = 0; ev_wake_wu[n] = 0;
    ev_abort[n] = 0; ev_drain[n] = 0; ev_grant[n] = 0; ev_xbar[n] = 0;
  end

  pstate_e prev[N];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++) begin
        if (events[n].latch_send)       ev_byp[n]++;
        if (events[n].latch_send_gated) ev_multi[n]++;
        if (events[n].latch_eject)      ev_lej[n]++;
        if (events[n].resv_grant)       ev_grant[n]++;
        if (events[n].xbar_busy)        ev_xbar[n]++;
        if (events[n].wake_by_ic)       ev_wake_ic[n]++;
        if (events[n].wake_by_wu)       ev_wake_wu[n]++;
        if (pstate[n] == PS_OFF && prev[n] != PS_OFF)      ev_off[n]++;
        if (pstate[n] == PS_ON && prev[n] == PS_IDLE_DET)  ev_abort[n]++;
        if (pstate[n] == PS_ON && prev[n] == PS_DRAIN)     ev_drain[n]++;
      end
    end
    prev <= pstate;
  end

  function automatic int total(input int a[N]);
    int s = 0;
    for (int i = 0; i < N; i++) s += a[i];
    return s;
  endfunction

  // ------------------------------------------------------------ driver
  task automatic send(input int src, input int dst, input int vn, input int len);
    int id;
    id = n_sent++;
    p_dst[id] = dst; p_src[id] = src; p_len[id] = len; p_vn[id] = vn; p_got[id] = 0;
    inj_pkt[src].dst_x = COORD_W'(dst % MX);
    inj_pkt[src].dst_y = COORD_W'(dst / MX);
    inj_pkt[src].vn    = VN_W'(vn);
    inj_pkt[src].len   = LEN_W'(len);
    inj_pkt[src].data0 = payload(id, 0);
    inj_pkt[src].data1 = payload(id, 1);
    inj_valid[src] = 1'b1;
    do begin
      @(posedge clk);
      #1;
    end while (!inj_ready_q[src]);
    inj_valid[src] = 1'b0;
  endtask

  task automatic wait_drain(input int limit);
    int t = 0;
    while (n_recv < n_sent && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(n_recv == n_sent, $sformatf("all %0d packets delivered (got %0d)", n_sent, n_recv));
  endtask

  function automatic int all_sleep();
    return (sleep == '1);
  endfunction

  task automatic wait_all_sleep(input int limit);
    int t = 0;
    while (!all_sleep() && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(all_sleep() != 0, "every router powered off when the network is idle");
  endtask

  // random synthetic traffic: pattern 0 uniform, 1 bit-complement, 2 transpose
  task automatic traffic(input int pattern, input int rate_per_10k, input int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        if (!inj_valid[n] && n_sent < MAXP && $urandom_range(0, 9999) < rate_per_10k) begin
          int x, y, d, vn, id;
          x = n % MX; y = n / MX;
          case (pattern)
            0: d = $urandom_range(0, N - 1);
            1: d = (MY - 1 - y) * MX + (MX - 1 - x);
            default: d = x * MX + y;
          endcase
          if (d == n) continue;
          vn = $urandom_range(0, NUM_VN - 1);
          id = n_sent++;
          p_dst[id] = d; p_src[id] = n; p_vn[id] = vn; p_got[id] = 0;
          p_len[id] = (vn == DATA_VN) ? 2 : 1;
          inj_pkt[n].dst_x = COORD_W'(d % MX);
          inj_pkt[n].dst_y = COORD_W'(d / MX);
          inj_pkt[n].vn    = VN_W'(vn);
          inj_pkt[n].len   = LEN_W'(p_len[id]);
          inj_pkt[n].data0 = payload(id, 0);
          inj_pkt[n].data1 = payload(id, 1);
          inj_valid[n] = 1'b1;
        end
      end
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++) if (inj_valid[n] && inj_ready_q[n]) inj_valid[n] = 1'b0;
    end
    // let the last held packets go
    while (inj_valid != '0) begin
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++) if (inj_valid[n] && inj_ready_q[n]) inj_valid[n] = 1'b0;
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main sequence
  initial begin
    int w0, b0;
    inj_valid = '0;
    for (int n = 0; n < N; n++) inj_pkt[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(posedge clk);
    check(all_sleep() != 0, "all routers asleep after reset and idle detection");

    // A: node (0,0) -> (1,1), all routers off
    w0 = total(ev_wake_ic) + total(ev_wake_wu);
    b0 = total(ev_byp);
    @(negedge clk);
    send(0, 1 * MX + 1, DATA_VN, 2);
    wait_drain(200);
    check(total(ev_wake_ic) + total(ev_wake_wu) == w0, "single packet crossed powered-off routers without waking any");
    check(total(ev_byp) - b0 == 6, $sformatf("2 flits x 3 bypass latches = 6 forwards (got %0d)", total(ev_byp) - b0));
    check(all_sleep() != 0, "routers still asleep after phase A");

    // B: (0,1)->(2,1) and (1,0)->(1,2) meet at router (1,1) in the same cycle
    w0 = ev_wake_ic[1 * MX + 1];
    @(negedge clk);
    fork
      send(1 * MX + 0, 1 * MX + 2, 0, 1);
      send(0 * MX + 1, 2 * MX + 1, 0, 1);
    join
    wait_drain(300);
    check(ev_wake_ic[1 * MX + 1] > w0, "two simultaneous IC_up woke router (1,1)");
    wait_all_sleep(400);

    // C: two packets queued at once in NI (2,2), both for its sleeping router
    w0 = ev_wake_wu[2 * MX + 2];
    @(negedge clk);
    send(2 * MX + 2, 2 * MX + MX - 1, 0, 1);
    send(2 * MX + 2, 3 * MX + MX - 1, 1, 1);
    wait_drain(300);
    check(ev_wake_wu[2 * MX + 2] > w0, "N_IVC = 2 raised WU and woke router (2,2)");
    wait_all_sleep(400);

    // synthetic traffic at a low and a high injection rate
    for (int pat = 0; pat < 3; pat++) begin
      traffic(pat, 20, 1500);     // 0.002 packets/node/cycle
      wait_drain(3000);
      traffic(pat, 800, 150);     // 0.08 packets/node/cycle
      wait_drain(5000);
    end
    wait_all_sleep(2000);

    $display("packets %0d, bypass forwards %0d (multi-hop %0d, ejected from latch %0d), reservations %0d",
             n_sent, total(ev_byp), total(ev_multi), total(ev_lej), total(ev_grant));
    $display("power-offs %0d, wake by IC %0d, wake by WU %0d, idle-detect aborts %0d, drain hand-overs %0d, crossbar cycles %0d",
             total(ev_off), total(ev_wake_ic), total(ev_wake_wu), total(ev_abort), total(ev_drain), total(ev_xbar));
    check(total(ev_byp)     > 0, "bypass latch forwarding happened");
    check(total(ev_multi)   > 0, "bypass into another powered-off router happened");
    check(total(ev_lej)     > 0, "ejection from a powered-off router happened");
    check(total(ev_grant)   > 0, "latch reservations happened");
    check(total(ev_off)     > 0, "power-off happened");
    check(total(ev_wake_ic) > 0, "wake-up by N_IC happened");
    check(total(ev_wake_wu) > 0, "wake-up by WU happened");
    check(total(ev_abort)   > 0, "idle-detect abort happened");
    check(total(ev_drain)   > 0, "bypass-to-pipeline hand-over happened");
    check(total(ev_xbar)    > 0, "normal pipeline traffic happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
