// hisparse_top: a complete single-cluster HiSparse sparse matrix-vector
// accelerator with its memories, computing y = A * x.
//
// It joins the cluster (hisparse_cluster) with the block RAMs it reads and
// writes, the driver that re-triggers the cluster once per row partition
// (spmv_driver) and the result drain that assembles y (result_drain). The
// host first writes the matrix channel memory (partition metadata followed by
// packed channel payloads) and the vector memory through the *_wr ports, then
// pulses start with the partition counts, and waits for finished. final_vec
// then holds y and num_cycles the run time in clock cycles.
//
// Default sizes are those of the source design's evaluated build: one cluster
// of two streams, vector and output banks of two words (partitions of 4 x 4),
// an 8-element result vector, 2048-word memories and an 18 x 18 multiply.
// Memory layout of the matrix channel (word = STREAMS x 64 bits):
//   word 2p     : start word of partition p's payloads (low 32 bits)
//   word 2p + 1 : packed payloads per stream in partition p (low 32 bits)
//   payload word: element s in bits [64s +: 64] = {value, column}; column
//                 all ones marks a row-skip token whose value is the count.
// Partition p = row_part * num_col_parts + col_part. Vector memory word
// c * VB_SIZE + i holds elements (c * VB_SIZE + i) * STREAMS + s in bits
// [32s +: 32].
module hisparse_top
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS    = 2,
  parameter int unsigned VB_SIZE    = 2,
  parameter int unsigned OB_SIZE    = 2,
  parameter int unsigned MEM_DEPTH  = 2048,
  parameter int unsigned NUM_ROWS   = 8,
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned MUL_W      = 18,
  parameter int unsigned IFWQ_DEPTH = 2,
  localparam int unsigned AW        = $clog2(MEM_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  // host preload of the matrix channel and vector memories
  input  logic                  ml_wr_en,
  input  logic [AW-1:0]         ml_wr_addr,
  input  logic [STREAMS*64-1:0] ml_wr_data,
  input  logic                  vl_wr_en,
  input  logic [AW-1:0]         vl_wr_addr,
  input  logic [STREAMS*32-1:0] vl_wr_data,
  // run control
  input  logic                  start,
  input  logic [IDX_W-1:0]      num_row_parts,
  input  logic [IDX_W-1:0]      num_col_parts,
  input  logic [IDX_W-1:0]      total_parts,
  output logic                  busy,
  output logic                  finished,
  output logic [31:0]           num_cycles,
  output logic [DATA_W-1:0]     final_vec [NUM_ROWS],
  output logic [31:0]           result_count,
  // event counters
  output logic [31:0]           ev_sh1_resend,
  output logic [31:0]           ev_sh2_resend,
  output logic [31:0]           ev_sh1_flush,
  output logic [31:0]           ev_pe_forward [STREAMS]
);
  logic             ml_sv, ml_sr, vl_sv, vl_sr, row_done;
  logic [IDX_W-1:0] row_part, ncol, ntotal;

  logic                  ml_en, vl_en;
  logic [AW-1:0]         ml_addr, vl_addr;
  logic [STREAMS*64-1:0] ml_dout, ml_b_unused;
  logic [STREAMS*32-1:0] vl_dout, vl_b_unused;

  logic [STREAMS-1:0] vau_en, vau_we, pes_en, pea_en, pea_we;
  logic [AW-1:0]      vau_addr [STREAMS], pes_addr [STREAMS], pea_addr [STREAMS];
  logic [DATA_W-1:0]  vau_din [STREAMS], vau_dout [STREAMS], vau_b_unused [STREAMS];
  logic [DATA_W-1:0]  pes_dout [STREAMS], pea_din [STREAMS], pea_unused [STREAMS];

  logic    res_valid, res_ready;
  result_t res;

  spmv_driver u_drv (
    .clk, .rst, .start, .num_row_parts, .num_col_parts, .total_parts,
    .ml_start_valid(ml_sv), .ml_start_ready(ml_sr),
    .vl_start_valid(vl_sv), .vl_start_ready(vl_sr),
    .row_part, .ncol, .ntotal, .row_done, .busy, .finished, .num_cycles
  );

  hisparse_cluster #(.STREAMS(STREAMS), .VB_SIZE(VB_SIZE), .OB_SIZE(OB_SIZE), .AW(AW),
                     .FIFO_DEPTH(FIFO_DEPTH), .MUL_W(MUL_W), .IFWQ_DEPTH(IFWQ_DEPTH)) u_cluster (
    .clk, .rst,
    .ml_start_valid(ml_sv), .ml_start_ready(ml_sr),
    .vl_start_valid(vl_sv), .vl_start_ready(vl_sr),
    .row_part, .num_col_parts(ncol), .total_parts(ntotal),
    .ml_bram_en(ml_en), .ml_bram_addr(ml_addr), .ml_bram_dout(ml_dout),
    .vl_bram_en(vl_en), .vl_bram_addr(vl_addr), .vl_bram_dout(vl_dout),
    .vau_bram_en(vau_en), .vau_bram_we(vau_we), .vau_bram_addr(vau_addr),
    .vau_bram_din(vau_din), .vau_bram_dout(vau_dout),
    .pes_bram_en(pes_en), .pes_bram_addr(pes_addr), .pes_bram_dout(pes_dout),
    .pea_bram_en(pea_en), .pea_bram_we(pea_we), .pea_bram_addr(pea_addr),
    .pea_bram_din(pea_din),
    .res_valid, .res_ready, .res,
    .ev_sh1_resend, .ev_sh2_resend, .ev_sh1_flush, .ev_pe_forward
  );

  result_drain #(.NUM_ROWS(NUM_ROWS)) u_drain (
    .clk, .rst, .in_valid(res_valid), .in_ready(res_ready), .in_res(res),
    .final_vec, .row_done, .count(result_count)
  );

  // Matrix channel memory: port A read by the cluster, port B written by the host.
  bram_tdp #(.WIDTH(STREAMS*64), .DEPTH(MEM_DEPTH)) u_ml_bram (
    .clk,
    .a_en(ml_en), .a_we(1'b0), .a_addr(ml_addr), .a_din('0), .a_dout(ml_dout),
    .b_en(ml_wr_en), .b_we(ml_wr_en), .b_addr(ml_wr_addr), .b_din(ml_wr_data),
    .b_dout(ml_b_unused)
  );

  bram_tdp #(.WIDTH(STREAMS*32), .DEPTH(MEM_DEPTH)) u_vl_bram (
    .clk,
    .a_en(vl_en), .a_we(1'b0), .a_addr(vl_addr), .a_din('0), .a_dout(vl_dout),
    .b_en(vl_wr_en), .b_we(vl_wr_en), .b_addr(vl_wr_addr), .b_din(vl_wr_data),
    .b_dout(vl_b_unused)
  );

  for (genvar s = 0; s < STREAMS; s++) begin : g_bank
    // vector bank: single port (port B unused)
    bram_tdp #(.WIDTH(DATA_W), .DEPTH(MEM_DEPTH)) u_vau_bram (
      .clk,
      .a_en(vau_en[s]), .a_we(vau_we[s]), .a_addr(vau_addr[s]), .a_din(vau_din[s]),
      .a_dout(vau_dout[s]),
      .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout(vau_b_unused[s])
    );
    // output bank: port A accumulates (writes), port B serves the reads
    bram_tdp #(.WIDTH(DATA_W), .DEPTH(MEM_DEPTH)) u_pe_bram (
      .clk,
      .a_en(pea_en[s]), .a_we(pea_we[s]), .a_addr(pea_addr[s]), .a_din(pea_din[s]),
      .a_dout(pea_unused[s]),
      .b_en(pes_en[s]), .b_we(1'b0), .b_addr(pes_addr[s]), .b_din('0), .b_dout(pes_dout[s])
    );
  end

endmodule
