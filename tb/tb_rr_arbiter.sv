// tb_rr_arbiter: checks the round-robin arbiter against a reference pointer model with
// random requests: one-hot grant, only to a requester, first requester at or after the
// pointer, pointer moving past the winner only when `advance` is high.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic [$clog2(N)-1:0] gnt_idx;
  logic advance, any;
  rr_arbiter #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  int ptr = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    req = '0; advance = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int exp_idx;
      @(negedge clk);
      req     = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(ptr + k) % N]) exp_idx = (ptr + k) % N;
      checks++;
      if ((exp_idx < 0 && (any || gnt != '0)) ||
          (exp_idx >= 0 && (!any || gnt != (N'(1) << exp_idx) || int'(gnt_idx) != exp_idx))) begin
        failures++;
        $display("FAIL t=%0d req=%b ptr=%0d gnt=%b", t, req, ptr, gnt);
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) ptr = (exp_idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
