// tb_pg_ctrlr: directed test of the ctrlr unit's power-gating states and latch reservation.
// Checks the cycle at which PG rises (one cycle after the router is idle) and sleep follows
// (T_idle_detect = 10 cycles later), the abort of idle detection by an IC, the RS answer one
// cycle after IC, exclusive reservation and its release, round-robin between two waiting
// upstream ports, wake-up by two simultaneous ICs (N_IC > th_IC) and by WU, the 8-cycle
// recharge, and the hand-back to the normal pipeline only after the latch is empty.
module tb_pg_ctrlr;
  import dbp_pkg::*;
  localparam int NP = NUM_PORTS;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [NP-1:0] ic_up, wu_up, rs_up;
  logic router_empty, latch_busy, latch_pkt, pg_up, sleep, latch_mode, to_pipeline, reserved;
  logic [2:0] owner;
  pstate_e state;
  logic ev_grant, ev_wake_ic, ev_wake_wu;
  pg_ctrlr dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask
  task automatic go_off();
    int t;
    t = 0;
    while (state != PS_OFF && t < 50) begin tick(); t++; end
    chk(state == PS_OFF && sleep, "router reaches PS_OFF");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, second, t;
    ic_up = '0; wu_up = '0; router_empty = 1'b0; latch_busy = 1'b0; latch_pkt = 1'b0;
    tick(2);
    rst_n = 1'b1;
    tick(3);
    chk(state == PS_ON && !pg_up, "on while the router holds packets");
    router_empty = 1'b1;
    tick();
    chk(pg_up && state == PS_IDLE_DET && !sleep, "PG one cycle after the router is idle");
    tick(3);
    ic_up[1] = 1'b1;
    tick();
    chk(state == PS_ON && !pg_up, "IC during idle detection aborts it");
    ic_up[1] = 1'b0;
    tick();
    chk(state == PS_IDLE_DET, "idle detection restarts");
    tick(T_IDLE_DETECT - 1);
    chk(!sleep, "not asleep before T_idle_detect cycles");
    tick();
    chk(sleep && state == PS_OFF && latch_mode, "asleep after T_idle_detect cycles");

    // reservation by a single IC
    ic_up[2] = 1'b1;
    chk(rs_up == '0, "no RS before IC is seen");
    tick();
    chk(rs_up == 5'b00100 && reserved && owner == 3'd2, "RS one cycle after IC");
    ic_up[4] = 1'b1;                   // second port asks while the latch is reserved
    tick();
    chk(rs_up == 5'b00100, "reservation exclusive");
    chk(state == PS_WAKE, "two IC at once: N_IC > th_IC wakes the router");
    // release while waking: port 2 drops IC, latch still busy
    latch_busy = 1'b1;
    ic_up[2] = 1'b0;
    tick();
    chk(reserved && owner == 3'd2, "held while the latch holds the packet");
    latch_busy = 1'b0;
    tick();
    chk(!reserved || owner == 3'd4, "released once empty");
    tick();
    chk(rs_up == 5'b10000, "then granted to the waiting port");
    // recharge: 8 cycles from the wake start, then drain
    t = 0;
    while (state == PS_WAKE && t < 20) begin tick(); t++; end
    chk(state == PS_DRAIN, "charged after the wakeup delay");
    chk(t == WAKEUP_DELAY - 3, $sformatf("wakeup delay of %0d cycles (remaining %0d)", WAKEUP_DELAY, t));
    tick();
    chk(rs_up == '0, "no new RS while draining");
    latch_busy = 1'b1; latch_pkt = 1'b1;
    tick(RS_GUARD + 3);
    chk(state == PS_DRAIN && pg_up && !to_pipeline, "stays in drain while a bypassed packet is in progress");
    latch_pkt = 1'b0;                  // only a head flit left in the latch
    #1 chk(to_pipeline, "hand-over of a waiting head once no packet is in progress");
    tick();
    latch_busy = 1'b0;
    chk(state == PS_ON && !pg_up && !reserved, "on after the hand-over");
    ic_up = '0;
    go_off();

    // wake-up by WU
    wu_up[3] = 1'b1;
    tick();
    chk(state == PS_WAKE && !sleep, "WU wakes the router");
    wu_up = '0;
    t = 0;
    while (state != PS_ON && t < 40) begin tick(); t++; end
    chk(state == PS_ON, "back on after WU wake-up");
    go_off();

    // round robin between two ports asking one after the other
    ic_up[1] = 1'b1;
    tick();
    first = owner;
    ic_up[1] = 1'b0;
    ic_up[3] = 1'b1;
    tick(2);
    second = owner;
    chk(first == 1 && second == 3 && rs_up == 5'b01000, "reservation moves to the next asking port");
    chk(state == PS_OFF, "one IC at a time does not wake the router");
    ic_up = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
