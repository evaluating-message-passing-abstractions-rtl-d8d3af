// shuffle_unit: moves each stream's payloads onto the stream that owns the
// bank they need, and keeps the streams' SOD/EOD/EOS commands aligned.
//
// The cluster uses two of these. The first (KEY_IS_ROW = 0) routes a payload
// with column c to stream c mod STREAMS, the owner of that input-vector bank;
// the second (KEY_IS_ROW = 1) routes by row r to stream r mod STREAMS, the
// owner of that output-vector bank. Two payloads that need the same bank in
// the same cycle conflict; only one may pass.
//
// How it works. Each input stream has one arbiter slot. Every cycle the
// shuffle_arbiter grants at most one slot per bank, with the top-priority
// input rotating every cycle, and the shuffle_crossbar delivers the granted
// payloads to their banks' output streams. A slot whose payload was not
// granted keeps it and offers it again next cycle (the resend); its input is
// then not read, which back-pressures the upstream unit. A free slot reads
// its input without blocking: a data payload fills it, an EOD marks the
// stream finished and is consumed. Once every stream has delivered EOD the
// unit runs STREAMS flush cycles (arbiter stages x streams), which empties the
// slots even if all of them conflicted, then sends one EOD on every output.
// Between partitions the unit is in its command-sync state: it waits until
// every input shows the same command (SOD or EOS), consumes it from all
// streams together and sends it once on every output; SOD starts streaming.
// This merges the source design's separate outer shuffle module and stream
// sync procs into the unit's own state machine.
//
// Interface: STREAMS ready/valid lanes of lane_pld_t in and out. Timing: the
// unit advances only in cycles where every output is ready; without conflicts
// each stream passes one payload per cycle with one cycle of latency.
module shuffle_unit
  import hisparse_pkg::*;
#(
  parameter int unsigned STREAMS    = 2,
  parameter bit          KEY_IS_ROW = 1'b0,
  parameter int unsigned ARB_STAGES = 1,
  localparam int unsigned DW        = (STREAMS > 1) ? $clog2(STREAMS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic      [STREAMS-1:0] in_valid,
  output logic      [STREAMS-1:0] in_ready,
  input  lane_pld_t               in_pld    [STREAMS],
  output logic      [STREAMS-1:0] out_valid,
  input  logic      [STREAMS-1:0] out_ready,
  output lane_pld_t               out_pld   [STREAMS],
  // event counters for observation: conflicts seen (resends) and partitions
  output logic [31:0]             resend_count,
  output logic [31:0]             flush_count
);
  localparam int unsigned FLUSH_CYCLES = ARB_STAGES * STREAMS;

  typedef enum logic [1:0] { S_SYNC, S_STREAM, S_FLUSH, S_EXIT } state_e;

  state_e             state_q;
  logic [STREAMS-1:0] hold_v_q, eod_q;
  lane_pld_t          hold_p_q [STREAMS];
  logic [DW-1:0]      offset_q;
  logic [IDX_W-1:0]   row_base_q;
  logic [$clog2(FLUSH_CYCLES+1)-1:0] flush_q;

  logic [DW-1:0]      dest  [STREAMS];
  logic [STREAMS-1:0] grant, xb_valid;
  lane_pld_t          xb_pld [STREAMS];

  wire adv = &out_ready;

  for (genvar i = 0; i < STREAMS; i++) begin : g_dest
    wire [IDX_W-1:0] key = KEY_IS_ROW ? hold_p_q[i].row : hold_p_q[i].col;
    assign dest[i] = DW'(key % IDX_W'(STREAMS));
  end

  shuffle_arbiter #(.STREAMS(STREAMS)) u_arb (
    .valid(hold_v_q), .dest, .offset(offset_q), .grant
  );

  shuffle_crossbar #(.STREAMS(STREAMS), .T(lane_pld_t)) u_xbar (
    .grant, .dest, .in_pld(hold_p_q), .out_valid(xb_valid), .out_pld(xb_pld)
  );

  // Command sync: every input presents the same command.
  logic all_cmd;
  cmd_e sync_cmd;
  always_comb begin
    all_cmd  = &in_valid;
    sync_cmd = in_pld[0].cmd;
    for (int i = 0; i < STREAMS; i++)
      if (in_pld[i].cmd == CMD_DATA || in_pld[i].cmd != sync_cmd) all_cmd = 1'b0;
  end

  // Slot refill: a slot is free if empty or granted this cycle.
  logic [STREAMS-1:0] slot_free, take;
  always_comb begin
    slot_free = ~hold_v_q | grant;
    take      = '0;
    in_ready  = '0;
    unique case (state_q)
      S_SYNC:   if (adv && all_cmd) in_ready = '1;
      S_STREAM: begin
        take     = adv ? (slot_free & ~eod_q & in_valid) : '0;
        in_ready = adv ? (slot_free & ~eod_q) : '0;
      end
      default: ;
    endcase
  end

  always_comb begin
    for (int d = 0; d < STREAMS; d++) begin
      out_valid[d] = 1'b0;
      out_pld[d]   = xb_pld[d];
      unique case (state_q)
        S_SYNC: begin
          out_valid[d] = adv && all_cmd;
          out_pld[d]   = in_pld[0];
        end
        S_STREAM, S_FLUSH: out_valid[d] = adv && xb_valid[d];
        S_EXIT: begin
          out_valid[d] = adv;
          out_pld[d]   = cmd_pld(CMD_EOD, row_base_q);
        end
        default: ;
      endcase
    end
  end

  logic [STREAMS-1:0] eod_next;
  always_comb begin
    eod_next = eod_q;
    for (int i = 0; i < STREAMS; i++)
      if (take[i] && in_pld[i].cmd == CMD_EOD) eod_next[i] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_SYNC;
      hold_v_q     <= '0;
      eod_q        <= '0;
      offset_q     <= '0;
      row_base_q   <= '0;
      flush_q      <= '0;
      resend_count <= '0;
      flush_count  <= '0;
      for (int i = 0; i < STREAMS; i++) hold_p_q[i] <= '0;
    end else if (adv) begin
      offset_q <= (int'(offset_q) == STREAMS - 1) ? '0 : offset_q + 1'b1;
      if (state_q == S_STREAM || state_q == S_FLUSH)
        resend_count <= resend_count + 32'($countones(hold_v_q & ~grant));
      unique case (state_q)
        S_SYNC: if (all_cmd) begin
          if (sync_cmd == CMD_SOD) state_q <= S_STREAM;
          eod_q <= '0;
          row_base_q <= in_pld[0].row;   // for the EOD sent at exit
        end
        S_STREAM: begin
          for (int i = 0; i < STREAMS; i++) begin
            if (take[i] && in_pld[i].cmd == CMD_DATA) begin
              hold_v_q[i] <= 1'b1;
              hold_p_q[i] <= in_pld[i];
            end else if (grant[i]) begin
              hold_v_q[i] <= 1'b0;
            end
          end
          eod_q <= eod_next;
          if (&eod_next) begin
            state_q <= S_FLUSH;
            flush_q <= ($bits(flush_q))'(FLUSH_CYCLES);
          end
        end
        S_FLUSH: begin
          hold_v_q <= hold_v_q & ~grant;
          flush_q  <= flush_q - 1'b1;
          if (flush_q == 1) begin
            state_q     <= S_EXIT;
            flush_count <= flush_count + 1;
          end
        end
        S_EXIT: state_q <= S_SYNC;
        default: state_q <= S_SYNC;
      endcase
    end
  end

  // Protocol rules of the command streams.
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == S_EXIT) |-> (hold_v_q == '0))
    else $error("shuffle_unit: payload left in the arbiter after the flush");
  assert property (@(posedge clk) disable iff (rst)
                   (state_q == S_SYNC && in_valid[0]) |-> (in_pld[0].cmd != CMD_DATA))
    else $error("shuffle_unit: data outside a SOD/EOD frame");
  for (genvar i = 0; i < STREAMS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst)
                     take[i] |-> (in_pld[i].cmd == CMD_DATA || in_pld[i].cmd == CMD_EOD))
      else $error("shuffle_unit: SOD/EOS inside a partition on stream %0d", i);
  end

endmodule
