// ml_recv: the payload half of the matrix loader.
//
// It takes the words ml_send requested, in order, each with its tag. A command
// marker (SOD, EOD or EOS) is copied to every output stream at once; SOD also
// rewinds each stream's row counter to the first row the stream owns. A data
// word is a packed channel payload of STREAMS elements, element s in bits
// [64s +: 64] with its column index in the low 32 bits and its value in the
// high 32 bits. Element s belongs to stream s. If its column is the skip-row
// marker (all ones, i.e. -1) the value is the number of the stream's rows to
// skip: the stream's row counter k advances by it and nothing is sent.
// Otherwise the stream receives a COO payload (row, col, mval) with
// row = row_base + s + STREAMS * k, since stream s owns rows s, s+STREAMS, ...
// of each row partition, as in the source architecture.
//
// Interface: rsp is a ready/valid channel of (word, tag); out[s] are STREAMS
// ready/valid lanes of lane_pld_t. Timing: one word per cycle; a word is
// consumed when every output lane is ready, so all lanes advance together.
// The element layout inside a word is this implementation's choice.
module ml_recv
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       rsp_valid,
  output logic                       rsp_ready,
  input  logic [STREAMS*64-1:0]      rsp_data,
  input  ml_tag_t                    rsp_tag,
  output logic      [STREAMS-1:0]    out_valid,
  input  logic      [STREAMS-1:0]    out_ready,
  output lane_pld_t                  out_pld [STREAMS]
);
  logic [IDX_W-1:0] k_q [STREAMS];   // per-stream row counter

  assign rsp_ready = &out_ready;
  wire   fire      = rsp_valid && rsp_ready;

  always_comb begin
    for (int s = 0; s < STREAMS; s++) begin
      logic [IDX_W-1:0]  col;
      logic [DATA_W-1:0] val;
      col = rsp_data[64*s +: 32];
      val = rsp_data[64*s + 32 +: 32];
      if (rsp_tag.cmd != CMD_DATA) begin
        out_valid[s] = rsp_valid && rsp_ready;
        out_pld[s]   = cmd_pld(rsp_tag.cmd, rsp_tag.row_base);
      end else begin
        out_valid[s]     = rsp_valid && rsp_ready && (col != SKIP_ROW);
        out_pld[s]       = '0;
        out_pld[s].cmd   = CMD_DATA;
        out_pld[s].row   = rsp_tag.row_base + IDX_W'(s) + IDX_W'(STREAMS) * k_q[s];
        out_pld[s].col   = col;
        out_pld[s].mval  = val;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < STREAMS; s++) begin
      if (rst) begin
        k_q[s] <= '0;
      end else if (fire) begin
        if (rsp_tag.cmd == CMD_SOD)
          k_q[s] <= '0;
        else if (rsp_tag.cmd == CMD_DATA && rsp_data[64*s +: 32] == SKIP_ROW)
          k_q[s] <= k_q[s] + rsp_data[64*s + 32 +: 32];
      end
    end
  end

endmodule
