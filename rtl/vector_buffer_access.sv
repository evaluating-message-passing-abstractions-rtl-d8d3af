// vector_buffer_access: one per stream. Keeps the stream's bank of the input
// vector and replaces the column index of each matrix payload with the vector
// element it multiplies.
//
// The bank lives in an external single-port block RAM and is double
// buffered: half h occupies words h*VB_SIZE .. h*VB_SIZE+VB_SIZE-1. The fill
// side takes the vector stream: at SOD it waits until the next half is free,
// writes the partition's VB_SIZE elements into it, and at EOD marks it full.
// The lookup side takes the matrix stream from the first shuffle unit: at SOD
// it waits until its current half is full and passes SOD on; for each data
// payload with column c it reads word c / STREAMS of that half (stream s owns
// columns c with c mod STREAMS = s); at EOD it releases the half and moves to
// the other one. So the vector for partition n+1 can be loaded while
// partition n is still streaming, which hides the refill time between
// partitions. EOS is passed on; the vector stream's own EOS is consumed.
//
// The lookup is split at the memory round trip as in the source design: the
// request side issues the read with the payload as its tag through
// bram_port_adapter, and the response side joins the returned element to it,
// so one payload per cycle streams through. The shared memory port gives
// reads priority; a vector write waits for a cycle without a read.
//
// Interface: vec, mat and out are ready/valid lanes of lane_pld_t; bank_* is a
// block-RAM port with one-cycle read latency. Output payloads carry row, mval
// and vval.
module vector_buffer_access
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS   = 2,
  parameter int unsigned VB_SIZE   = 2,
  parameter int unsigned AW        = 11,
  parameter int unsigned STREAM_ID = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              vec_valid,
  output logic              vec_ready,
  input  lane_pld_t         vec_pld,
  input  logic              mat_valid,
  output logic              mat_ready,
  input  lane_pld_t         mat_pld,
  output logic              out_valid,
  input  logic              out_ready,
  output lane_pld_t         out_pld,
  output logic              bank_en,
  output logic              bank_we,
  output logic [AW-1:0]     bank_addr,
  output logic [DATA_W-1:0] bank_din,
  input  logic [DATA_W-1:0] bank_dout
);
  logic [1:0] full_q;           // half holds a complete partition
  logic       fill_sel_q, rd_sel_q, filling_q;

  // ---------------- lookup side (request) ----------------
  logic          req_valid, req_ready, req_rd, rd_en;
  logic [AW-1:0] req_addr, rd_addr;
  lane_pld_t     rsp_tag;
  logic [DATA_W-1:0] rsp_data;
  logic          rsp_valid;

  always_comb begin
    req_valid = mat_valid;
    req_rd    = (mat_pld.cmd == CMD_DATA);
    req_addr  = AW'(int'(rd_sel_q) * VB_SIZE) + AW'(mat_pld.col / IDX_W'(STREAMS));
    // SOD may only pass once the bank half it opens is full.
    if (mat_pld.cmd == CMD_SOD && !full_q[rd_sel_q]) req_valid = 1'b0;
  end
  assign mat_ready = req_valid && req_ready;

  bram_port_adapter #(.WIDTH(DATA_W), .AW(AW), .TAG_T(lane_pld_t)) u_rd (
    .clk, .rst,
    .req_valid, .req_ready, .req_addr, .req_rd, .req_tag(mat_pld),
    .mem_en(rd_en), .mem_addr(rd_addr), .mem_dout(bank_dout),
    .rsp_valid, .rsp_ready(out_ready), .rsp_data, .rsp_tag
  );

  // ---------------- lookup side (response) ----------------
  always_comb begin
    out_valid = rsp_valid;
    out_pld   = rsp_tag;
    if (rsp_tag.cmd == CMD_DATA) begin
      out_pld.vval = rsp_data;
      out_pld.col  = '0;
    end
  end

  // ---------------- fill side ----------------
  wire wr_en = vec_valid && vec_pld.cmd == CMD_DATA && filling_q && !rd_en;
  always_comb begin
    unique case (vec_pld.cmd)
      CMD_SOD:  vec_ready = !filling_q && !full_q[fill_sel_q];
      CMD_DATA: vec_ready = wr_en;
      CMD_EOD:  vec_ready = filling_q;
      default:  vec_ready = !filling_q;   // EOS
    endcase
  end

  // ---------------- shared memory port ----------------
  assign bank_en   = rd_en || wr_en;
  assign bank_we   = !rd_en && wr_en;
  assign bank_addr = rd_en ? rd_addr
                           : AW'(int'(fill_sel_q) * VB_SIZE) + AW'(vec_pld.col);
  assign bank_din  = vec_pld.vval;

  wire mat_fire = mat_valid && mat_ready;
  wire vec_fire = vec_valid && vec_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      full_q     <= '0;
      fill_sel_q <= 1'b0;
      rd_sel_q   <= 1'b0;
      filling_q  <= 1'b0;
    end else begin
      if (vec_fire && vec_pld.cmd == CMD_SOD) filling_q <= 1'b1;
      if (vec_fire && vec_pld.cmd == CMD_EOD) begin
        filling_q          <= 1'b0;
        full_q[fill_sel_q] <= 1'b1;
        fill_sel_q         <= !fill_sel_q;
      end
      if (mat_fire && mat_pld.cmd == CMD_EOD) begin
        full_q[rd_sel_q] <= 1'b0;
        rd_sel_q         <= !rd_sel_q;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   (vec_fire && vec_pld.cmd == CMD_DATA) |-> (vec_pld.col < IDX_W'(VB_SIZE)))
    else $error("vector_buffer_access: vector element outside its bank");
  assert property (@(posedge clk) disable iff (rst)
                   (mat_fire && mat_pld.cmd == CMD_DATA) |->
                   ((mat_pld.col % IDX_W'(STREAMS)) == IDX_W'(STREAM_ID)))
    else $error("vector_buffer_access: column %0d is not in bank %0d", mat_pld.col, STREAM_ID);

endmodule
