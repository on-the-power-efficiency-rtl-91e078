// tb_vc_fifo: random push/pop against a queue model at depth 5 and depth 1 (the data-VC and
// control-VC buffers): order of data, empty/full flags, simultaneous push and pop when full,
// and synchronous clear.
module tb_vc_fifo;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          clr, push5, pop5, push1, pop1;
  logic [W-1:0]  din, dout5, dout1;
  logic          empty5, full5, empty1, full1;

  vc_fifo #(.W(W), .DEPTH(5)) dut5 (.clk, .rst_n, .clr, .push(push5), .din, .pop(pop5), .dout(dout5), .empty(empty5), .full(full5));
  vc_fifo #(.W(W), .DEPTH(1)) dut1 (.clk, .rst_n, .clr, .push(push1), .din, .pop(pop1), .dout(dout1), .empty(empty1), .full(full1));

  logic [W-1:0] q5[$], q1[$];

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
    clr = 0; push5 = 0; pop5 = 0; push1 = 0; pop1 = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk(empty5 == (q5.size() == 0) && full5 == (q5.size() == 5), "depth-5 flags");
      chk(empty1 == (q1.size() == 0) && full1 == (q1.size() == 1), "depth-1 flags");
      if (q5.size() > 0) chk(dout5 == q5[0], "depth-5 data order");
      if (q1.size() > 0) chk(dout1 == q1[0], "depth-1 data order");
      din   = W'($urandom);
      clr   = (t % 997 == 500);
      pop5  = (q5.size() > 0) && ($urandom_range(0, 2) != 0);
      push5 = (q5.size() < 5 || pop5) && ($urandom_range(0, 1) != 0);
      pop1  = (q1.size() > 0) && ($urandom_range(0, 1) != 0);
      push1 = (q1.size() < 1 || pop1) && ($urandom_range(0, 1) != 0);
      @(posedge clk);
      if (clr) begin
        q5.delete(); q1.delete();
      end else begin
        if (pop5) void'(q5.pop_front());
        if (push5) q5.push_back(din);
        if (pop1) void'(q1.pop_front());
        if (push1) q1.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
