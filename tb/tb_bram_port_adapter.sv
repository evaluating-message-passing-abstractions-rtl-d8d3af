// tb_bram_port_adapter: random tagged read requests (some without a memory
// read) against a block RAM holding a known pattern, with a randomly stalling
// consumer. Every response must carry the word of its request's address (or
// zero for a no-read request) and its tag, in request order. With a consumer
// that never stalls, 64 requests must be accepted in 64 consecutive cycles,
// the one-per-cycle rate the memory wrappers need to sustain.
module tb_bram_port_adapter;
  localparam int W = 32, AW = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          req_valid, req_ready, req_rd, rsp_valid, rsp_ready, mem_en;
  logic [AW-1:0] req_addr, mem_addr;
  logic [7:0]    req_tag, rsp_tag;
  logic [W-1:0]  mem_dout, rsp_data, unused_b;
  logic init_en; logic [AW-1:0] init_addr; logic [W-1:0] init_data;

  bram_port_adapter #(.WIDTH(W), .AW(AW), .TAG_T(logic [7:0])) dut (.*);
  bram_tdp #(.WIDTH(W), .DEPTH(64)) mem (
    .clk, .a_en(mem_en), .a_we(1'b0), .a_addr(mem_addr), .a_din('0), .a_dout(mem_dout),
    .b_en(init_en), .b_we(init_en), .b_addr(init_addr), .b_din(init_data), .b_dout(unused_b));

  int checks = 0, failures = 0;
  logic [W+7:0] expq[$];
  bit stall_mode = 1;
  int accepted = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pat(int a); return W'(32'hA5000000 + a * 17); endfunction

  always @(posedge clk) if (!rst) begin
    if (req_valid && req_ready) begin
      expq.push_back({req_tag, req_rd ? pat(int'(req_addr)) : W'(0)});
      accepted++;
    end
    if (rsp_valid && rsp_ready) begin
      logic [W+7:0] e;
      checks++;
      e = expq.pop_front();
      if ({rsp_tag, rsp_data} !== e) begin
        failures++;
        $display("FAIL: got %h/%h expected %h/%h", rsp_tag, rsp_data, e[W+7:W], e[W-1:0]);
      end
    end
  end

  always @(negedge clk) rsp_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    req_valid = 0; req_addr = 0; req_rd = 0; req_tag = 0; init_en = 0; init_addr = 0; init_data = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); init_en = 1; init_addr = AW'(i); init_data = pat(i);
    end
    @(negedge clk); init_en = 0; rst = 0;
    // random traffic with a stalling consumer
    for (int n = 0; n < 300; ) begin
      @(negedge clk);
      if (req_valid && req_ready) n++;
      req_valid = $urandom_range(1);
      req_addr  = AW'($urandom_range(63));
      req_rd    = ($urandom_range(4) != 0);
      req_tag   = 8'(n);
    end
    @(negedge clk); req_valid = 0;
    repeat (20) @(negedge clk);
    // throughput: no stalls downstream
    stall_mode = 0;
    repeat (4) @(negedge clk);
    begin
      int start_acc, cyc;
      start_acc = accepted; cyc = 0;
      req_valid = 1; req_rd = 1;
      while (accepted - start_acc < 64) begin
        req_addr = AW'(cyc); req_tag = 8'(cyc);
        @(negedge clk);
        cyc++;
      end
      req_valid = 0;
      checks++;
      if (cyc != 64) begin failures++; $display("FAIL: 64 requests took %0d cycles", cyc); end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d responses missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
