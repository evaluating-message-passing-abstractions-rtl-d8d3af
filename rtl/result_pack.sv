// result_pack: merges the processing engines' result streams into the
// cluster's single result stream in row order.
//
// Engine s holds rows base + a*STREAMS + s for a = 0 .. OB_SIZE-1 and sends
// them in order of a, so taking one result from each engine in turn
// (engine 0, 1, .., STREAMS-1, then again) yields rows base, base+1, ... The
// output is flagged last together with the last engine's last result. A
// result passes combinationally from the selected input to the output.
//
// The source architecture only says that the cluster walks its streams'
// output banks to rebuild the result; the round-robin merge and the placement
// of the last flag are this implementation's choices. Interface: STREAMS
// ready/valid result inputs, one ready/valid result output, one result per
// cycle when the selected engine has one.
module result_pack
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS = 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [STREAMS-1:0] in_valid,
  output logic [STREAMS-1:0] in_ready,
  input  result_t            in_res [STREAMS],
  output logic               out_valid,
  input  logic               out_ready,
  output result_t            out_res
);
  localparam int unsigned PW = (STREAMS > 1) ? $clog2(STREAMS) : 1;
  logic [PW-1:0] ptr_q;

  always_comb begin
    in_ready         = '0;
    in_ready[ptr_q]  = out_ready;
    out_valid        = in_valid[ptr_q];
    out_res          = in_res[ptr_q];
    out_res.last     = in_res[ptr_q].last && (int'(ptr_q) == STREAMS - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) ptr_q <= '0;
    else if (out_valid && out_ready)
      ptr_q <= (int'(ptr_q) == STREAMS - 1) ? '0 : ptr_q + 1'b1;
  end

endmodule
