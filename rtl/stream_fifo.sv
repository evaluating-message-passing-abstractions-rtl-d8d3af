// stream_fifo: synchronous first-in first-out queue with ready/valid on both
// sides, used for every channel between the cluster's units.
//
// DEPTH entries of type T are stored in a register array addressed by read and
// write pointers. in_ready is high while the queue is not full and out_valid
// while it is not empty; a write and a read may happen in the same cycle. Data
// written in cycle t is visible at the output in cycle t+1. Queue depths are
// not given for the source architecture; the cluster uses depth 2 by default,
// enough to stream one payload per cycle.
module stream_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  localparam int unsigned CW = $clog2(DEPTH+1);

  assign in_ready  = (count < CW'(DEPTH));
  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr] <= in_data;
        wr_ptr      <= incr(wr_ptr);
      end
      if (do_rd) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

endmodule
