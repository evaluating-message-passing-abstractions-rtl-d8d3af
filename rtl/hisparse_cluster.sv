// hisparse_cluster: one HiSparse cluster, the unit that computes one row
// partition of y = A * x for STREAMS interleaved rows at a time.
//
// Datapath, one lane per stream, a queue (stream_fifo) on every lane between
// units:
//   matrix_loader -> shuffle_unit (by column) -> vector_buffer_access[s]
//     -> shuffle_unit (by row) -> processing_engine[s] -> result_pack
//   vector_loader -> vector_unpack -> vector_buffer_access[s]
// The matrix loader turns the packed channel memory into per-stream COO
// payloads; the first shuffle moves each payload to the stream owning its
// column's vector bank, where the vector value is looked up; the second
// shuffle moves it to the stream owning its row's output bank, where it is
// multiplied and accumulated. On EOS the engines' banks are read out and
// packed into one result stream in row order. All units talk through
// ready/valid channels and pass the SOD/EOD/EOS commands along.
//
// Interface: start_ml / start_vl trigger one row partition; the memory ports
// follow the block-RAM wiring of the source design's FPGA build (one read port
// for the matrix channel, one for the vector, a single-port bank per vector
// buffer access unit and a dual-port bank per processing engine, all with one
// cycle of read latency). res_* is the result stream; ev_* count events for
// observation.
module hisparse_cluster
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS    = 2,
  parameter int unsigned VB_SIZE    = 2,
  parameter int unsigned OB_SIZE    = 2,
  parameter int unsigned AW         = 11,
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned MUL_W      = 18,
  parameter int unsigned IFWQ_DEPTH = 2,
  localparam int unsigned ROWS_PER_PART = OB_SIZE * STREAMS
) (
  input  logic                    clk,
  input  logic                    rst,
  // row-partition trigger
  input  logic                    ml_start_valid,
  output logic                    ml_start_ready,
  input  logic                    vl_start_valid,
  output logic                    vl_start_ready,
  input  logic [IDX_W-1:0]        row_part,
  input  logic [IDX_W-1:0]        num_col_parts,
  input  logic [IDX_W-1:0]        total_parts,
  // matrix channel memory
  output logic                    ml_bram_en,
  output logic [AW-1:0]           ml_bram_addr,
  input  logic [STREAMS*64-1:0]   ml_bram_dout,
  // vector memory
  output logic                    vl_bram_en,
  output logic [AW-1:0]           vl_bram_addr,
  input  logic [STREAMS*32-1:0]   vl_bram_dout,
  // vector banks
  output logic [STREAMS-1:0]      vau_bram_en,
  output logic [STREAMS-1:0]      vau_bram_we,
  output logic [AW-1:0]           vau_bram_addr [STREAMS],
  output logic [DATA_W-1:0]       vau_bram_din  [STREAMS],
  input  logic [DATA_W-1:0]       vau_bram_dout [STREAMS],
  // output banks: port S reads, port A writes
  output logic [STREAMS-1:0]      pes_bram_en,
  output logic [AW-1:0]           pes_bram_addr [STREAMS],
  input  logic [DATA_W-1:0]       pes_bram_dout [STREAMS],
  output logic [STREAMS-1:0]      pea_bram_en,
  output logic [STREAMS-1:0]      pea_bram_we,
  output logic [AW-1:0]           pea_bram_addr [STREAMS],
  output logic [DATA_W-1:0]       pea_bram_din  [STREAMS],
  // results
  output logic                    res_valid,
  input  logic                    res_ready,
  output result_t                 res,
  // event counters
  output logic [31:0]             ev_sh1_resend,
  output logic [31:0]             ev_sh2_resend,
  output logic [31:0]             ev_sh1_flush,
  output logic [31:0]             ev_pe_forward [STREAMS]
);
  // lane bundles between the units: *_v valid, *_r ready, *_p payload
  logic [STREAMS-1:0] ml_v,  ml_r,  sh1i_v, sh1i_r, sh1o_v, sh1o_r;
  logic [STREAMS-1:0] vau_mv, vau_mr, vu_v, vu_r, vau_vv, vau_vr;
  logic [STREAMS-1:0] vau_ov, vau_or, sh2i_v, sh2i_r, sh2o_v, sh2o_r;
  logic [STREAMS-1:0] pe_v, pe_r, pr_v, pr_r;
  lane_pld_t ml_p [STREAMS], sh1i_p [STREAMS], sh1o_p [STREAMS], vau_mp [STREAMS];
  lane_pld_t vu_p [STREAMS], vau_vp [STREAMS], vau_op [STREAMS], sh2i_p [STREAMS];
  lane_pld_t sh2o_p [STREAMS], pe_p [STREAMS];
  result_t   pr_p [STREAMS];
  logic [31:0] sh2_flush_unused;

  logic                  vl_v, vl_r;
  logic [STREAMS*32-1:0] vl_d;
  vl_tag_t               vl_t;

  matrix_loader #(.STREAMS(STREAMS), .AW(AW), .ROWS_PER_PART(ROWS_PER_PART)) u_ml (
    .clk, .rst,
    .start_valid(ml_start_valid), .start_ready(ml_start_ready),
    .row_part, .num_col_parts, .total_parts,
    .mem_en(ml_bram_en), .mem_addr(ml_bram_addr), .mem_dout(ml_bram_dout),
    .out_valid(ml_v), .out_ready(ml_r), .out_pld(ml_p)
  );

  vector_loader #(.STREAMS(STREAMS), .VB_SIZE(VB_SIZE), .AW(AW),
                  .ROWS_PER_PART(ROWS_PER_PART)) u_vl (
    .clk, .rst,
    .start_valid(vl_start_valid), .start_ready(vl_start_ready),
    .row_part, .num_col_parts,
    .mem_en(vl_bram_en), .mem_addr(vl_bram_addr), .mem_dout(vl_bram_dout),
    .out_valid(vl_v), .out_ready(vl_r), .out_data(vl_d), .out_tag(vl_t)
  );

  vector_unpack #(.STREAMS(STREAMS), .VB_SIZE(VB_SIZE)) u_unpack (
    .clk, .rst,
    .in_valid(vl_v), .in_ready(vl_r), .in_data(vl_d), .in_tag(vl_t),
    .out_valid(vu_v), .out_ready(vu_r), .out_pld(vu_p)
  );

  shuffle_unit #(.STREAMS(STREAMS), .KEY_IS_ROW(1'b0)) u_sh1 (
    .clk, .rst,
    .in_valid(sh1i_v), .in_ready(sh1i_r), .in_pld(sh1i_p),
    .out_valid(sh1o_v), .out_ready(sh1o_r), .out_pld(sh1o_p),
    .resend_count(ev_sh1_resend), .flush_count(ev_sh1_flush)
  );

  shuffle_unit #(.STREAMS(STREAMS), .KEY_IS_ROW(1'b1)) u_sh2 (
    .clk, .rst,
    .in_valid(sh2i_v), .in_ready(sh2i_r), .in_pld(sh2i_p),
    .out_valid(sh2o_v), .out_ready(sh2o_r), .out_pld(sh2o_p),
    .resend_count(ev_sh2_resend), .flush_count(sh2_flush_unused)
  );

  for (genvar s = 0; s < STREAMS; s++) begin : g_lane
    // matrix loader -> shuffle 1
    stream_fifo #(.T(lane_pld_t), .DEPTH(FIFO_DEPTH)) u_q_ml (
      .clk, .rst,
      .in_valid(ml_v[s]), .in_ready(ml_r[s]), .in_data(ml_p[s]),
      .out_valid(sh1i_v[s]), .out_ready(sh1i_r[s]), .out_data(sh1i_p[s]), .count()
    );
    // shuffle 1 -> vector buffer access (matrix side)
    stream_fifo #(.T(lane_pld_t), .DEPTH(FIFO_DEPTH)) u_q_sh1 (
      .clk, .rst,
      .in_valid(sh1o_v[s]), .in_ready(sh1o_r[s]), .in_data(sh1o_p[s]),
      .out_valid(vau_mv[s]), .out_ready(vau_mr[s]), .out_data(vau_mp[s]), .count()
    );
    // unpack -> vector buffer access (vector side)
    stream_fifo #(.T(lane_pld_t), .DEPTH(FIFO_DEPTH)) u_q_vec (
      .clk, .rst,
      .in_valid(vu_v[s]), .in_ready(vu_r[s]), .in_data(vu_p[s]),
      .out_valid(vau_vv[s]), .out_ready(vau_vr[s]), .out_data(vau_vp[s]), .count()
    );

    vector_buffer_access #(.STREAMS(STREAMS), .VB_SIZE(VB_SIZE), .AW(AW),
                           .STREAM_ID(s)) u_vau (
      .clk, .rst,
      .vec_valid(vau_vv[s]), .vec_ready(vau_vr[s]), .vec_pld(vau_vp[s]),
      .mat_valid(vau_mv[s]), .mat_ready(vau_mr[s]), .mat_pld(vau_mp[s]),
      .out_valid(vau_ov[s]), .out_ready(vau_or[s]), .out_pld(vau_op[s]),
      .bank_en(vau_bram_en[s]), .bank_we(vau_bram_we[s]), .bank_addr(vau_bram_addr[s]),
      .bank_din(vau_bram_din[s]), .bank_dout(vau_bram_dout[s])
    );

    // vector buffer access -> shuffle 2
    stream_fifo #(.T(lane_pld_t), .DEPTH(FIFO_DEPTH)) u_q_vau (
      .clk, .rst,
      .in_valid(vau_ov[s]), .in_ready(vau_or[s]), .in_data(vau_op[s]),
      .out_valid(sh2i_v[s]), .out_ready(sh2i_r[s]), .out_data(sh2i_p[s]), .count()
    );
    // shuffle 2 -> processing engine
    stream_fifo #(.T(lane_pld_t), .DEPTH(FIFO_DEPTH)) u_q_sh2 (
      .clk, .rst,
      .in_valid(sh2o_v[s]), .in_ready(sh2o_r[s]), .in_data(sh2o_p[s]),
      .out_valid(pe_v[s]), .out_ready(pe_r[s]), .out_data(pe_p[s]), .count()
    );

    processing_engine #(.STREAMS(STREAMS), .OB_SIZE(OB_SIZE), .AW(AW), .STREAM_ID(s),
                        .MUL_W(MUL_W), .IFWQ_DEPTH(IFWQ_DEPTH)) u_pe (
      .clk, .rst,
      .in_valid(pe_v[s]), .in_ready(pe_r[s]), .in_pld(pe_p[s]),
      .res_valid(pr_v[s]), .res_ready(pr_r[s]), .res(pr_p[s]),
      .s_en(pes_bram_en[s]), .s_addr(pes_bram_addr[s]), .s_dout(pes_bram_dout[s]),
      .a_en(pea_bram_en[s]), .a_we(pea_bram_we[s]), .a_addr(pea_bram_addr[s]),
      .a_din(pea_bram_din[s]),
      .fwd_count(ev_pe_forward[s])
    );
  end

  result_pack #(.STREAMS(STREAMS)) u_pack (
    .clk, .rst,
    .in_valid(pr_v), .in_ready(pr_r), .in_res(pr_p),
    .out_valid(res_valid), .out_ready(res_ready), .out_res(res)
  );

endmodule
