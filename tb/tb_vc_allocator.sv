// tb_vc_allocator: random requests against an independent check of the VA rules: a grant
// only to a requester, at most one per output port, always the lowest free VC of the
// requester's VN, a grant at every port that has an eligible requester, and every persistent
// requester served (round-robin) within NREQ cycles.
module tb_vc_allocator;
  import dbp_pkg::*;
  localparam int NREQ = 8, NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [NREQ-1:0] req, gnt;
  logic [PORT_W-1:0] req_port[NREQ];
  logic [VN_W-1:0]   req_vn[NREQ];
  logic [NUM_VC-1:0] vc_busy[NP];
  logic [VC_W-1:0]   gnt_vc[NREQ];
  logic [NP-1:0]     alloc_valid;
  logic [VC_W-1:0]   alloc_vc[NP];
  vc_allocator #(.NREQ(NREQ), .NP(NP)) dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic int lowest_free(input int p, input int vn);
    for (int k = 0; k < VCS_PER_VN; k++) if (!vc_busy[p][vn * VCS_PER_VN + k]) return vn * VCS_PER_VN + k;
    return -1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cnt[NREQ];
    req = '0;
    for (int p = 0; p < NP; p++) vc_busy[p] = '0;
    for (int r = 0; r < NREQ; r++) begin req_port[r] = '0; req_vn[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // random phase
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      req = NREQ'($urandom);
      for (int r = 0; r < NREQ; r++) begin
        req_port[r] = PORT_W'($urandom_range(0, NP - 1));
        req_vn[r]   = VN_W'($urandom_range(0, NUM_VN - 1));
      end
      for (int p = 0; p < NP; p++) vc_busy[p] = NUM_VC'($urandom);
      #1;
      for (int p = 0; p < NP; p++) begin
        int ng;
        bit elig;
        ng = 0;
        elig = 0;
        for (int r = 0; r < NREQ; r++) begin
          if (req[r] && req_port[r] == PORT_W'(p) && lowest_free(p, req_vn[r]) >= 0) elig = 1;
          if (gnt[r] && req_port[r] == PORT_W'(p)) begin
            ng++;
            chk(req[r], "grant only to a requester");
            chk(int'(gnt_vc[r]) == lowest_free(p, req_vn[r]), "lowest free VC of the VN");
            chk(alloc_valid[p] && alloc_vc[p] == gnt_vc[r], "port allocation matches the grant");
          end
        end
        chk(ng <= 1, "at most one grant per port");
        chk((ng == 1) == elig, "grant whenever a requester is eligible");
      end
    end
    // fairness: all request port 0 VN 0 with a free VC
    @(negedge clk);
    req = '1;
    for (int r = 0; r < NREQ; r++) begin req_port[r] = '0; req_vn[r] = '0; wait_cnt[r] = 0; end
    for (int p = 0; p < NP; p++) vc_busy[p] = '0;
    for (int t = 0; t < 3 * NREQ; t++) begin
      #1;
      for (int r = 0; r < NREQ; r++) begin
        if (gnt[r]) wait_cnt[r] = 0; else wait_cnt[r]++;
        chk(wait_cnt[r] < NREQ, "every persistent requester served within NREQ cycles");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
