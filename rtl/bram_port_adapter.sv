// bram_port_adapter: connects a ready/valid read-request channel to one read
// port of a block RAM and returns the words on a ready/valid response channel,
// each paired with the tag that travelled with its request.
//
// The source design pipelines metadata alongside every memory request, so a
// receiving unit can tell what each returned word means, and puts skid buffers
// in the memory wrappers so nothing is dropped under backpressure. Here a
// request is accepted only while the response queue has room for it and for
// the word already in flight (credit counting), so the block RAM's fixed
// one-cycle read latency never overruns the queue. A request with rd == 0
// does not touch the memory and returns a zero word with its tag, in order:
// loaders use this to carry pure command markers through the same channel.
//
// Timing: a request accepted in cycle t drives mem_en/mem_addr in cycle t, the
// word is captured in cycle t+1 and is offered at the response in cycle t+2.
// With the default DEPTH of 3 one request per cycle is sustained.
module bram_port_adapter #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 11,
  parameter type         TAG_T = logic [3:0],
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  // request channel
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [AW-1:0]    req_addr,
  input  logic             req_rd,
  input  TAG_T             req_tag,
  // block RAM read port (one-cycle latency)
  output logic             mem_en,
  output logic [AW-1:0]    mem_addr,
  input  logic [WIDTH-1:0] mem_dout,
  // response channel
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output logic [WIDTH-1:0] rsp_data,
  output TAG_T             rsp_tag
);
  typedef struct packed {
    TAG_T             tag;
    logic [WIDTH-1:0] data;
  } rsp_t;

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic            inflight_q, inflight_rd_q;
  TAG_T            inflight_tag_q;
  logic [CW-1:0]   q_count;
  rsp_t            q_in, q_out;
  logic            q_in_ready;

  wire req_fire = req_valid && req_ready;

  assign req_ready = (q_count + CW'(inflight_q)) < CW'(DEPTH);
  assign mem_en    = req_fire && req_rd;
  assign mem_addr  = req_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      inflight_q     <= 1'b0;
      inflight_rd_q  <= 1'b0;
      inflight_tag_q <= '0;
    end else begin
      inflight_q     <= req_fire;
      inflight_rd_q  <= req_rd;
      inflight_tag_q <= req_tag;
    end
  end

  assign q_in.tag  = inflight_tag_q;
  assign q_in.data = inflight_rd_q ? mem_dout : '0;

  stream_fifo #(.T(rsp_t), .DEPTH(DEPTH)) u_rsp_q (
    .clk, .rst,
    .in_valid (inflight_q), .in_ready (q_in_ready), .in_data (q_in),
    .out_valid(rsp_valid),  .out_ready(rsp_ready),  .out_data(q_out),
    .count    (q_count)
  );

  assign rsp_data = q_out.data;
  assign rsp_tag  = q_out.tag;

  // The credit check guarantees the queue can always take the in-flight word.
  assert property (@(posedge clk) disable iff (rst) inflight_q |-> q_in_ready)
    else $error("bram_port_adapter: response queue overrun");

endmodule
