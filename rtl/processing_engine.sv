// processing_engine: one per stream. Accumulates mval * vval into the stream's
// bank of the output vector for a whole row partition, then streams the bank
// out as results.
//
// The bank lives in an external dual-port block RAM: port S (the request
// side) reads, port A (the accumulate side) writes. Stream s owns rows r with
// r mod STREAMS = s; row r of the partition sits at word (r / STREAMS) mod
// OB_SIZE. Per row partition the engine
//   1. clears the bank (OB_SIZE writes of zero) when the first SOD arrives,
//   2. streams: for each data payload the request stage reads the row's
//      partial sum and the accumulate stage, one cycle later, adds the product
//      and writes it back; SOD and EOD of inner column partitions are
//      consumed,
//   3. on EOS reads the bank and sends one result per word, with index
//      row_base + a * STREAMS + STREAM_ID, the last one flagged.
// A payload for the same row as one still in flight would read a stale sum (a
// read-after-write hazard). The in-flight write queue (IFWQ) holds the writes
// of the last IFWQ_DEPTH cycles, one entry per cycle whether or not a write
// happened, and the accumulate stage takes the newest matching entry instead
// of the memory word. Its depth is the memory's read plus write latency, as in
// the source design, so one payload per cycle is accepted with no stall even
// when every payload hits the same row.
//
// The product uses the low MUL_W bits of each operand as signed numbers: the
// source design narrowed its 32x32 multiply to 18x18 so the multiply fits one
// FPGA DSP slice at 100 MHz. Sums are 32 bits and wrap.
module processing_engine
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS    = 2,
  parameter int unsigned OB_SIZE    = 2,
  parameter int unsigned AW         = 11,
  parameter int unsigned STREAM_ID  = 0,
  parameter int unsigned MUL_W      = 18,
  parameter int unsigned IFWQ_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  lane_pld_t         in_pld,
  output logic              res_valid,
  input  logic              res_ready,
  output result_t           res,
  // output bank, port S (reads)
  output logic              s_en,
  output logic [AW-1:0]     s_addr,
  input  logic [DATA_W-1:0] s_dout,
  // output bank, port A (writes)
  output logic              a_en,
  output logic              a_we,
  output logic [AW-1:0]     a_addr,
  output logic [DATA_W-1:0] a_din,
  // observation: payloads whose sum came from the IFWQ
  output logic [31:0]       fwd_count
);
  typedef enum logic [2:0] { S_IDLE, S_CLEAR, S_STREAM, S_WAIT, S_DRAIN, S_DONE } state_e;

  typedef struct packed {
    logic              valid;
    logic [AW-1:0]     addr;
    logic [DATA_W-1:0] value;
  } ifwq_t;

  typedef struct packed {
    logic             last;
    logic [IDX_W-1:0] index;
  } drain_tag_t;

  state_e            state_q;
  logic [IDX_W-1:0]  row_base_q;
  logic [AW-1:0]     cnt_q;
  ifwq_t             ifwq_q [IFWQ_DEPTH];

  // accumulate-stage register
  logic              acc_v_q;
  logic [AW-1:0]     acc_addr_q;
  logic signed [DATA_W-1:0] acc_prod_q;

  function automatic logic [AW-1:0] bank_word(logic [IDX_W-1:0] row);
    return AW'((row / IDX_W'(STREAMS)) % IDX_W'(OB_SIZE));
  endfunction

  // ---------------- request stage ----------------
  wire is_data  = in_pld.cmd == CMD_DATA;
  wire in_fire  = in_valid && in_ready;
  wire data_go  = in_fire && is_data;

  always_comb begin
    unique case (state_q)
      S_IDLE:   in_ready = (in_pld.cmd == CMD_SOD);   // first SOD starts the clear
      S_STREAM: in_ready = 1'b1;
      default:  in_ready = 1'b0;
    endcase
  end

  wire signed [MUL_W-1:0]    m_op = in_pld.mval[MUL_W-1:0];
  wire signed [MUL_W-1:0]    v_op = in_pld.vval[MUL_W-1:0];
  wire signed [2*MUL_W-1:0]  prod = m_op * v_op;

  // ---------------- accumulate stage ----------------
  logic [DATA_W-1:0] old_sum;
  logic              fwd_hit;
  always_comb begin
    old_sum = s_dout;
    fwd_hit = 1'b0;
    for (int i = IFWQ_DEPTH - 1; i >= 0; i--) begin   // newest entry (0) wins
      if (ifwq_q[i].valid && ifwq_q[i].addr == acc_addr_q) begin
        old_sum = ifwq_q[i].value;
        fwd_hit = 1'b1;
      end
    end
  end
  wire [DATA_W-1:0] new_sum = old_sum + acc_prod_q;

  // ---------------- drain (result read) ----------------
  logic          dr_req_valid, dr_req_ready, dr_en;
  logic [AW-1:0] dr_addr;
  drain_tag_t    dr_tag, dr_rsp_tag;
  logic [DATA_W-1:0] dr_data;

  assign dr_req_valid = (state_q == S_DRAIN);
  assign dr_tag.last  = (cnt_q == AW'(OB_SIZE - 1));
  assign dr_tag.index = row_base_q + IDX_W'(cnt_q) * IDX_W'(STREAMS) + IDX_W'(STREAM_ID);

  bram_port_adapter #(.WIDTH(DATA_W), .AW(AW), .TAG_T(drain_tag_t)) u_drain (
    .clk, .rst,
    .req_valid(dr_req_valid), .req_ready(dr_req_ready), .req_addr(cnt_q), .req_rd(1'b1),
    .req_tag(dr_tag),
    .mem_en(dr_en), .mem_addr(dr_addr), .mem_dout(s_dout),
    .rsp_valid(res_valid), .rsp_ready(res_ready), .rsp_data(dr_data), .rsp_tag(dr_rsp_tag)
  );
  assign res.last  = dr_rsp_tag.last;
  assign res.index = dr_rsp_tag.index;
  assign res.value = dr_data;

  // ---------------- memory ports ----------------
  assign s_en   = (state_q == S_STREAM) ? data_go : dr_en;
  assign s_addr = (state_q == S_STREAM) ? bank_word(in_pld.row) : dr_addr;
  assign a_en   = (state_q == S_CLEAR) || acc_v_q;
  assign a_we   = a_en;
  assign a_addr = (state_q == S_CLEAR) ? cnt_q : acc_addr_q;
  assign a_din  = (state_q == S_CLEAR) ? '0 : new_sum;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_IDLE;
      row_base_q <= '0;
      cnt_q      <= '0;
      acc_v_q    <= 1'b0;
      acc_addr_q <= '0;
      acc_prod_q <= '0;
      fwd_count  <= '0;
      for (int i = 0; i < IFWQ_DEPTH; i++) ifwq_q[i] <= '0;
    end else begin
      // request stage -> accumulate stage
      acc_v_q    <= (state_q == S_STREAM) && data_go;
      acc_addr_q <= bank_word(in_pld.row);
      acc_prod_q <= DATA_W'(prod);
      // one IFWQ entry per cycle
      ifwq_q[0] <= '{valid: acc_v_q, addr: acc_addr_q, value: new_sum};
      for (int i = 1; i < IFWQ_DEPTH; i++) ifwq_q[i] <= ifwq_q[i-1];
      if (acc_v_q && fwd_hit) fwd_count <= fwd_count + 1;

      unique case (state_q)
        S_IDLE: if (in_fire) begin
          row_base_q <= in_pld.row;
          cnt_q      <= '0;
          state_q    <= S_CLEAR;
        end
        S_CLEAR: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == AW'(OB_SIZE - 1)) state_q <= S_STREAM;
        end
        S_STREAM: if (in_fire && in_pld.cmd == CMD_EOS) state_q <= S_WAIT;
        // let the last accumulation land before reading the bank
        S_WAIT: if (!acc_v_q) begin
          cnt_q   <= '0;
          state_q <= S_DRAIN;
        end
        S_DRAIN: if (dr_req_ready) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == AW'(OB_SIZE - 1)) state_q <= S_DONE;
        end
        S_DONE: if (res_valid && res_ready && res.last) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst)
                   (in_fire && is_data) |-> ((in_pld.row % IDX_W'(STREAMS)) == IDX_W'(STREAM_ID)))
    else $error("processing_engine: row %0d is not in bank %0d", in_pld.row, STREAM_ID);

endmodule
