// tb_upstream_port_ctrl: random traffic on one link against a reference model of credits and
// VC state, then directed checks of the bypass rules: IC raised one cycle after demand towards
// a PG'd router, a head only after RS, one flit outstanding in the latch until its credit,
// body flits only for the owner, IC held until the last credit, WU when N_IVC > th_IVC.
module tb_upstream_port_ctrl;
  import dbp_pkg::*;
  localparam int NREQ = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc_valid, send_valid, send_head, send_tail, pg_down, rs_down, pending;
  logic [VC_W-1:0] alloc_vc, send_vc;
  logic [2:0] send_req, byp_owner;
  credit_t credit_in;
  logic [4:0] n_ivc;
  logic ic_down, wu_down, normal_ok, byp_head_ok, byp_body_ok;
  logic [NUM_VC-1:0] vc_busy, credit_ok;
  upstream_port_ctrl #(.NREQ(NREQ), .CNT_W(5)) dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask
  task automatic tick();
    @(posedge clk);
    #1;
  endtask
  task automatic idle();
    alloc_valid = 0; send_valid = 0; send_head = 0; send_tail = 0; credit_in = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cred[NUM_VC];
    bit busy[NUM_VC];
    int owed[$];
    int fv;
    idle();
    pg_down = 0; rs_down = 0; pending = 0; n_ivc = '0; alloc_vc = '0; send_vc = '0; send_req = '0;
    for (int v = 0; v < NUM_VC; v++) begin cred[v] = int'(vc_depth(v)); busy[v] = 0; end
    tick();
    rst_n = 1'b1;
    tick();
    // ---- random normal traffic
    for (int t = 0; t < 3000; t++) begin
      int v;
      idle();
      for (int k = 0; k < NUM_VC; k++) begin
        chk(credit_ok[k] == (cred[k] > 0), "credit availability matches the model");
        chk(vc_busy[k] == busy[k], "VC busy state matches the model");
      end
      chk(normal_ok && !ic_down && !wu_down, "plain link without PG");
      v = $urandom_range(0, NUM_VC - 1);
      if (!busy[v] && $urandom_range(0, 1)) begin alloc_valid = 1; alloc_vc = VC_W'(v); end
      v = $urandom_range(0, NUM_VC - 1);
      if (busy[v] && cred[v] > 0 && !(alloc_valid && alloc_vc == VC_W'(v)) && $urandom_range(0, 1)) begin
        send_valid = 1; send_vc = VC_W'(v); send_tail = ($urandom_range(0, 3) == 0);
      end
      if (owed.size() > 0 && $urandom_range(0, 1)) begin
        credit_in.valid = 1; credit_in.vc = VC_W'(owed.pop_front());
      end
      tick();
      if (alloc_valid) busy[alloc_vc] = 1;
      if (send_valid) begin
        cred[send_vc]--;
        owed.push_back(int'(send_vc));
        if (send_tail) busy[send_vc] = 0;
      end
      if (credit_in.valid) cred[credit_in.vc]++;
    end
    idle();
    while (owed.size() > 0) begin credit_in.valid = 1; credit_in.vc = VC_W'(owed.pop_front()); tick(); end
    idle();
    tick();
    // ---- bypass rules, on a VC that is free
    fv = -1;
    for (int v = NUM_VC - 1; v >= 0; v--) if (!busy[v]) fv = v;
    chk(fv >= 0, "a free VC exists");
    pg_down = 1; pending = 1; n_ivc = 5'd1;
    tick();
    chk(ic_down && !wu_down, "IC raised one cycle after demand towards a PG'd router");
    chk(!normal_ok && !byp_head_ok, "no head before RS");
    rs_down = 1;
    #1 chk(byp_head_ok, "head allowed after RS");
    alloc_valid = 1; alloc_vc = VC_W'(fv);
    tick();
    idle();
    send_valid = 1; send_vc = VC_W'(fv); send_head = 1; send_req = 3'd5;
    tick();
    idle();
    chk(!byp_head_ok && !byp_body_ok && byp_owner == 3'd5, "one flit outstanding blocks the next");
    tick(); tick();
    chk(!byp_body_ok, "still blocked without credit");
    credit_in.valid = 1; credit_in.vc = VC_W'(fv);
    tick();
    idle();
    chk(byp_body_ok && byp_owner == 3'd5 && !byp_head_ok, "credit lets the owner's body flit go, no new head");
    pending = 0;
    send_valid = 1; send_vc = VC_W'(fv); send_tail = 1; send_req = 3'd5;
    tick();
    idle();
    tick();
    chk(ic_down, "IC held while the last flit is outstanding");
    credit_in.valid = 1; credit_in.vc = VC_W'(fv);
    tick();
    idle();
    tick();
    chk(!ic_down && vc_busy[fv] == 0, "IC dropped after the last credit; VC freed");
    n_ivc = 5'd2;
    tick();
    chk(wu_down, "WU when N_IVC = 2 > th_IVC");
    n_ivc = 5'd1;
    tick();
    chk(!wu_down, "no WU for a single waiting VC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
