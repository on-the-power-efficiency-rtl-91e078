// vc_fifo: one virtual-channel input buffer.
//
// A first-word-fall-through FIFO of DEPTH flits: `dout` shows the oldest flit whenever
// `empty` is low, and `pop` removes it. A push and a pop may happen in the same cycle, also
// when the FIFO is full. `clr` empties it synchronously; the router drives it while its
// power is cut, since a gated buffer loses its contents. Depths follow the document
// (1 flit for a control VC, 5 for a data VC); the storage style is this design's choice.
module vc_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && (!full || pop)) wr_ptr <= inc(wr_ptr);
      if (pop && !empty)          rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push && (!full || pop)) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && (!full || pop)) mem[wr_ptr] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("vc_fifo: push into a full buffer");
endmodule
