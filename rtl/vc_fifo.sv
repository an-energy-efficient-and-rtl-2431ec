// vc_fifo: flit buffer of one virtual channel at a router input port.
//
// A circular buffer of DEPTH entries with read and write pointers. The head
// entry is visible on dout without a read (first-word fall-through), and a
// pop and a push may happen in the same cycle. Credit flow control upstream
// guarantees that a full buffer is never pushed; the assertions check that.
// Four entries per VC is the evaluated router configuration; the buffer
// organisation is this design's choice. Reset empties the buffer.
module vc_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0]   mem [DEPTH];
  logic [AW-1:0]      rd_ptr, wr_ptr;
  localparam int CW = $clog2(DEPTH + 1);
  logic [CW-1:0]      count;

  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] next(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next(wr_ptr);
      if (pop)  rd_ptr <= next(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
