// tb_crossbar: random select patterns on the 5 x 5 crossbar; every valid output must carry
// the selected input's flit and every invalid one an all-zero link.
module tb_crossbar;
  import dbp_pkg::*;
  localparam int NP = NUM_PORTS;
  flit_t        in_flit[NP];
  logic [NP-1:0] valid;
  logic [2:0]   sel[NP];
  link_t        out_link[NP];
  crossbar #(.NP(NP)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < NP; p++) begin
        in_flit[p] = '0;
        in_flit[p].data = {4{$urandom}};
        in_flit[p].vc   = VC_W'($urandom_range(0, NUM_VC - 1));
        sel[p]          = 3'($urandom_range(0, NP - 1));
      end
      valid = NP'($urandom);
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (out_link[p].valid != valid[p] ||
            (valid[p] && out_link[p].flit != in_flit[sel[p]]) ||
            (!valid[p] && out_link[p].flit != '0)) begin
          failures++;
          $display("FAIL t=%0d output %0d", t, p);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
