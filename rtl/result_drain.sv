// result_drain: collects the cluster's result stream into the final output
// vector register file, which the host reads.
//
// A result with index i is written to element i mod NUM_ROWS of final_vec;
// the source design's drain used the same modulo, narrowed to the few index
// bits it needs. row_done pulses for one cycle when a result flagged last is
// taken, marking the end of a row partition; count is the number of results
// taken since reset. Always ready; one result per cycle.
module result_drain
  import hisparse_pkg::*;
#(
  parameter int unsigned NUM_ROWS = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  result_t     in_res,
  output logic [DATA_W-1:0] final_vec [NUM_ROWS],
  output logic        row_done,
  output logic [31:0] count
);
  localparam int unsigned IW = (NUM_ROWS > 1) ? $clog2(NUM_ROWS) : 1;

  assign in_ready = 1'b1;
  wire [IW-1:0] slot = IW'(in_res.index % IDX_W'(NUM_ROWS));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_ROWS; i++) final_vec[i] <= '0;
      row_done <= 1'b0;
      count    <= '0;
    end else begin
      row_done <= in_valid && in_res.last;
      if (in_valid) begin
        final_vec[slot] <= in_res.value;
        count           <= count + 1;
      end
    end
  end

endmodule
