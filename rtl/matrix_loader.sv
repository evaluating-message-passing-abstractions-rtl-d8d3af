// matrix_loader: first unit of the cluster datapath. For one row partition it
// reads the cluster's channel memory (partition metadata, then packed channel
// payloads) and sends every stream its COO payloads, framed by SOD/EOD per
// column partition and a final EOS.
//
// It is built as in the streaming-optimised source design: ml_send issues the
// memory requests with a tag pipelined alongside each, bram_port_adapter
// performs the block-RAM read and queues the tagged words, a demultiplexer
// returns metadata words to ml_send and everything else to ml_recv, which
// restores row indices and fans out to the streams. Because request and
// decode sit on either side of the memory round trip, one packed payload is
// read per cycle while a partition streams.
//
// Interface: start (ready/valid) with row_part, num_col_parts, total_parts;
// mem_* is a block-RAM read port of width STREAMS*64 with one-cycle latency;
// out[s] are the STREAMS output lanes. idle is high when no work is pending.
module matrix_loader
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS       = 2,
  parameter int unsigned AW            = 11,
  parameter int unsigned ROWS_PER_PART = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start_valid,
  output logic                    start_ready,
  input  logic [IDX_W-1:0]        row_part,
  input  logic [IDX_W-1:0]        num_col_parts,
  input  logic [IDX_W-1:0]        total_parts,
  output logic                    mem_en,
  output logic [AW-1:0]           mem_addr,
  input  logic [STREAMS*64-1:0]   mem_dout,
  output logic      [STREAMS-1:0] out_valid,
  input  logic      [STREAMS-1:0] out_ready,
  output lane_pld_t               out_pld [STREAMS]
);
  localparam int unsigned W = STREAMS * 64;

  logic          req_valid, req_ready, req_rd;
  logic [AW-1:0] req_addr;
  ml_tag_t       req_tag;
  logic          rsp_valid, rsp_ready;
  logic [W-1:0]  rsp_data;
  ml_tag_t       rsp_tag;
  logic          meta_valid, meta_ready, data_valid, data_ready;

  ml_send #(.AW(AW), .ROWS_PER_PART(ROWS_PER_PART)) u_send (
    .clk, .rst,
    .start_valid, .start_ready, .row_part, .num_col_parts, .total_parts,
    .req_valid, .req_ready, .req_addr, .req_rd, .req_tag,
    .meta_valid, .meta_ready, .meta_data(rsp_data[DATA_W-1:0])
  );

  bram_port_adapter #(.WIDTH(W), .AW(AW), .TAG_T(ml_tag_t)) u_mem (
    .clk, .rst,
    .req_valid, .req_ready, .req_addr, .req_rd, .req_tag,
    .mem_en, .mem_addr, .mem_dout,
    .rsp_valid, .rsp_ready, .rsp_data, .rsp_tag
  );

  // Demultiplex returned words by their tag.
  assign meta_valid = rsp_valid &&  rsp_tag.meta;
  assign data_valid = rsp_valid && !rsp_tag.meta;
  assign rsp_ready  = rsp_tag.meta ? meta_ready : data_ready;

  ml_recv #(.STREAMS(STREAMS)) u_recv (
    .clk, .rst,
    .rsp_valid(data_valid), .rsp_ready(data_ready), .rsp_data, .rsp_tag,
    .out_valid, .out_ready, .out_pld
  );

endmodule
