// ml_send: the request half of the matrix loader.
//
// For one row partition it walks the column partitions in order. For each it
// reads the two metadata words of partition p = row_part * num_col_parts +
// col_part (word 2p holds the address where that partition's packed payloads
// start, word 2p+1 the number of packed payloads per stream), then issues one
// read per packed payload. Around the data it places command markers that do
// not read memory: SOD before a partition, EOD after it and EOS after the last
// partition of the row. Every request carries an ml_tag_t so that ml_recv,
// across the memory latency, knows what the returned word is; this is the
// split of the loader at its memory round trip that the source design uses to
// stream one address per cycle. Metadata words come back to this unit (they
// decide its addresses), data words go to ml_recv.
//
// Interface: start is a ready/valid command; req is a ready/valid memory
// request; meta is the ready/valid return of metadata words. Timing: one data
// request per cycle while streaming; each partition adds the metadata round
// trip plus the SOD and EOD marker cycles. Placing the metadata in the
// partition's first two words and each value in the low 32 bits of a memory
// word are choices of this implementation.
module ml_send
  import hisparse_pkg::*;
#(
  parameter int unsigned AW            = 11,
  parameter int unsigned ROWS_PER_PART = 4
) (
  input  logic              clk,
  input  logic              rst,
  // start of one row partition
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [IDX_W-1:0]  row_part,
  input  logic [IDX_W-1:0]  num_col_parts,
  input  logic [IDX_W-1:0]  total_parts,
  // memory requests
  output logic              req_valid,
  input  logic              req_ready,
  output logic [AW-1:0]     req_addr,
  output logic              req_rd,
  output ml_tag_t           req_tag,
  // returned metadata words
  input  logic              meta_valid,
  output logic              meta_ready,
  input  logic [DATA_W-1:0] meta_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_META0, S_META1, S_WAIT0, S_WAIT1, S_SOD, S_DATA, S_EOD, S_EOS
  } state_e;

  state_e           state_q;
  logic [IDX_W-1:0] row_part_q, ncol_q, col_part_q, row_base_q, total_q;
  logic [AW-1:0]    base_q, pos_q;
  logic [DATA_W-1:0] len_q, cnt_q;
  logic             last_part_q;  // current column partition is the row's last

  wire [IDX_W-1:0] part_idx = row_part_q * ncol_q + col_part_q;
  wire             fire     = req_valid && req_ready;

  assign start_ready = (state_q == S_IDLE);
  assign meta_ready  = (state_q == S_WAIT0) || (state_q == S_WAIT1);

  always_comb begin
    req_valid = 1'b0;
    req_addr  = '0;
    req_rd    = 1'b0;
    req_tag   = '{meta: 1'b0, cmd: CMD_DATA, row_base: row_base_q};
    unique case (state_q)
      S_META0: begin req_valid = 1'b1; req_rd = 1'b1; req_addr = AW'(2 * part_idx);     req_tag.meta = 1'b1; end
      S_META1: begin req_valid = 1'b1; req_rd = 1'b1; req_addr = AW'(2 * part_idx + 1); req_tag.meta = 1'b1; end
      S_SOD:   begin req_valid = 1'b1; req_tag.cmd = CMD_SOD; end
      S_DATA:  begin req_valid = 1'b1; req_rd = 1'b1; req_addr = pos_q; end
      S_EOD:   begin req_valid = 1'b1; req_tag.cmd = CMD_EOD; end
      S_EOS:   begin req_valid = 1'b1; req_tag.cmd = CMD_EOS; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q     <= S_IDLE;
      row_part_q  <= '0;
      ncol_q      <= '0;
      col_part_q  <= '0;
      row_base_q  <= '0;
      total_q     <= '0;
      base_q      <= '0;
      pos_q       <= '0;
      len_q       <= '0;
      cnt_q       <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_valid) begin
          row_part_q <= row_part;
          ncol_q     <= num_col_parts;
          total_q    <= total_parts;
          row_base_q <= row_part * IDX_W'(ROWS_PER_PART);
          col_part_q <= '0;
          state_q    <= S_META0;
        end
        S_META0: if (fire) state_q <= S_META1;
        S_META1: if (fire) state_q <= S_WAIT0;
        S_WAIT0: if (meta_valid) begin
          base_q  <= AW'(meta_data);
          state_q <= S_WAIT1;
        end
        S_WAIT1: if (meta_valid) begin
          len_q   <= meta_data;
          pos_q   <= base_q;
          cnt_q   <= '0;
          state_q <= S_SOD;
        end
        S_SOD: if (fire) state_q <= (len_q == 0) ? S_EOD : S_DATA;
        S_DATA: if (fire) begin
          pos_q <= pos_q + 1'b1;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q + 1 == len_q) state_q <= S_EOD;
        end
        S_EOD: if (fire) begin
          col_part_q <= col_part_q + 1'b1;
          state_q    <= last_part_q ? S_EOS : S_META0;
        end
        S_EOS: if (fire) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign last_part_q = (col_part_q + 1 >= ncol_q);

  // Partitions addressed by a start command must exist in the metadata.
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == S_META0) |-> (part_idx < total_q))
    else $error("ml_send: partition %0d outside the %0d stored", part_idx, total_q);

endmodule
