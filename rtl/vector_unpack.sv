// vector_unpack: splits the vector loader's packed words onto the cluster's
// streams. Element s of a word (bits [32s +: 32]) goes to stream s as a
// payload whose vval holds the element and whose col holds its position in
// the partition's bank (the word's index within the partition). Command
// markers are copied to every stream. A word is taken only when every lane
// can accept it, so all lanes advance together; no storage, no added latency.
// The source architecture names this stage in its cluster diagram but does
// not describe it; its behaviour here is this implementation's choice.
module vector_unpack
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS = 2,
  parameter int unsigned VB_SIZE = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [STREAMS*32-1:0]   in_data,
  input  vl_tag_t                 in_tag,
  output logic      [STREAMS-1:0] out_valid,
  input  logic      [STREAMS-1:0] out_ready,
  output lane_pld_t               out_pld [STREAMS]
);
  logic [IDX_W-1:0] pos_q;   // word index inside the current partition

  assign in_ready = &out_ready;

  always_comb begin
    for (int s = 0; s < STREAMS; s++) begin
      out_valid[s] = in_valid && in_ready;
      if (in_tag.cmd != CMD_DATA) begin
        out_pld[s] = cmd_pld(in_tag.cmd, in_tag.row_base);
      end else begin
        out_pld[s]      = '0;
        out_pld[s].cmd  = CMD_DATA;
        out_pld[s].row  = in_tag.row_base;
        out_pld[s].col  = pos_q;
        out_pld[s].vval = in_data[32*s +: 32];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pos_q <= '0;
    else if (in_valid && in_ready) begin
      if (in_tag.cmd == CMD_DATA) pos_q <= pos_q + 1'b1;
      else                        pos_q <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   (in_valid && in_tag.cmd == CMD_DATA) |-> (pos_q < IDX_W'(VB_SIZE)))
    else $error("vector_unpack: more than VB_SIZE words in one partition");

endmodule
