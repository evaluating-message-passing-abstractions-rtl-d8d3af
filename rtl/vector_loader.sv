// vector_loader: streams the input-vector partitions that match the matrix
// loader's column partitions, framed with the same SOD/EOD/EOS commands.
//
// For one row partition it visits column partitions 0 .. num_col_parts-1. A
// column partition covers VB_SIZE * STREAMS vector elements, stored as VB_SIZE
// packed words of STREAMS 32-bit elements (element s of a word in bits
// [32s +: 32]) starting at word address c * VB_SIZE. Each partition is sent as
// an SOD marker, its VB_SIZE words and an EOD marker; an EOS marker follows
// the last partition. The whole vector is re-sent for every row partition, as
// the source architecture requires. Reads go through bram_port_adapter, so one
// word is read per cycle and markers stay in order with the data.
//
// Interface: start (ready/valid) with row_part and num_col_parts; mem_* is a
// STREAMS*32-bit block-RAM read port with one-cycle latency; out is a
// ready/valid channel of (packed word, vl_tag_t) for vector_unpack. The word
// addressing is this implementation's choice.
module vector_loader
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS       = 2,
  parameter int unsigned VB_SIZE       = 2,
  parameter int unsigned AW            = 11,
  parameter int unsigned ROWS_PER_PART = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_valid,
  output logic                  start_ready,
  input  logic [IDX_W-1:0]      row_part,
  input  logic [IDX_W-1:0]      num_col_parts,
  output logic                  mem_en,
  output logic [AW-1:0]         mem_addr,
  input  logic [STREAMS*32-1:0] mem_dout,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [STREAMS*32-1:0] out_data,
  output vl_tag_t               out_tag
);
  typedef enum logic [2:0] { S_IDLE, S_SOD, S_DATA, S_EOD, S_EOS } state_e;

  state_e           state_q;
  logic [IDX_W-1:0] ncol_q, col_part_q, row_base_q;
  logic [AW-1:0]    addr_q;
  logic [$clog2(VB_SIZE+1)-1:0] cnt_q;

  logic             req_valid, req_ready, req_rd;
  logic [AW-1:0]    req_addr;
  vl_tag_t          req_tag;

  wire fire = req_valid && req_ready;

  assign start_ready = (state_q == S_IDLE);
  assign req_valid   = (state_q != S_IDLE);
  assign req_rd      = (state_q == S_DATA);
  assign req_addr    = addr_q;

  always_comb begin
    req_tag.row_base = row_base_q;
    unique case (state_q)
      S_SOD:   req_tag.cmd = CMD_SOD;
      S_EOD:   req_tag.cmd = CMD_EOD;
      S_EOS:   req_tag.cmd = CMD_EOS;
      default: req_tag.cmd = CMD_DATA;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_IDLE;
      ncol_q     <= '0;
      col_part_q <= '0;
      row_base_q <= '0;
      addr_q     <= '0;
      cnt_q      <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_valid) begin
          ncol_q     <= num_col_parts;
          row_base_q <= row_part * IDX_W'(ROWS_PER_PART);
          col_part_q <= '0;
          addr_q     <= '0;
          state_q    <= (num_col_parts == 0) ? S_EOS : S_SOD;
        end
        S_SOD: if (fire) begin
          cnt_q   <= '0;
          state_q <= S_DATA;
        end
        S_DATA: if (fire) begin
          addr_q <= addr_q + 1'b1;
          cnt_q  <= cnt_q + 1'b1;
          if (cnt_q == $bits(cnt_q)'(VB_SIZE - 1)) state_q <= S_EOD;
        end
        S_EOD: if (fire) begin
          col_part_q <= col_part_q + 1'b1;
          state_q    <= (col_part_q + 1 >= ncol_q) ? S_EOS : S_SOD;
        end
        S_EOS: if (fire) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  bram_port_adapter #(.WIDTH(STREAMS*32), .AW(AW), .TAG_T(vl_tag_t)) u_mem (
    .clk, .rst,
    .req_valid, .req_ready, .req_addr, .req_rd, .req_tag,
    .mem_en, .mem_addr, .mem_dout,
    .rsp_valid(out_valid), .rsp_ready(out_ready), .rsp_data(out_data), .rsp_tag(out_tag)
  );

endmodule
