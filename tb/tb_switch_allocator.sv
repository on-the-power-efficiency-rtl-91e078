// tb_switch_allocator: random VC requests on the 5-port, 6-VC switch allocator. Checks that
// grants go only to requesters, at most one per input port and per output port, that the
// crossbar select (out_sel, in_vc) names the granted VC, that something is granted whenever
// something is requested, and that persistent requests are all served in bounded time.
module tb_switch_allocator;
  import dbp_pkg::*;
  localparam int NP = NUM_PORTS, NV = NUM_VC;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [NV-1:0]     req[NP], gnt[NP];
  logic [PORT_W-1:0] req_port[NP][NV];
  logic [NP-1:0]     out_valid;
  logic [2:0]        out_sel[NP];
  logic [2:0]        in_vc[NP];
  switch_allocator #(.NP(NP), .NV(NV)) dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int starve[NP][NV];
    for (int i = 0; i < NP; i++) begin
      req[i] = '0;
      for (int v = 0; v < NV; v++) begin req_port[i][v] = '0; starve[i][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      bit fixed;
      fixed = (t >= 1000);          // second half: persistent requests, fixed ports
      @(negedge clk);
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < NV; v++) begin
          req[i][v]      = fixed ? 1'b1 : 1'($urandom);
          req_port[i][v] = fixed ? PORT_W'((i + v) % NP) : PORT_W'($urandom_range(0, NP - 1));
        end
      #1;
      begin
        int ng_out[NP];
        int total_req, total_gnt;
        total_req = 0;
        total_gnt = 0;
        for (int o = 0; o < NP; o++) ng_out[o] = 0;
        for (int i = 0; i < NP; i++) begin
          chk($countones(gnt[i]) <= 1, "one grant per input port");
          for (int v = 0; v < NV; v++) begin
            total_req += int'(req[i][v]);
            if (gnt[i][v]) begin
              int o;
              o = int'(req_port[i][v]);
              total_gnt++;
              ng_out[o]++;
              chk(req[i][v], "grant only to a requester");
              chk(out_valid[o] && int'(out_sel[o]) == i && int'(in_vc[i]) == v, "crossbar select matches grant");
            end
          end
        end
        for (int o = 0; o < NP; o++) chk(ng_out[o] <= 1 && out_valid[o] == (ng_out[o] == 1), "one grant per output port");
        chk(total_req == 0 || total_gnt > 0, "work conserving");
        if (fixed)
          for (int i = 0; i < NP; i++)
            for (int v = 0; v < NV; v++) begin
              starve[i][v] = gnt[i][v] ? 0 : starve[i][v] + 1;
              chk(starve[i][v] < 4 * NP * NV, "persistent request served in bounded time");
            end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
