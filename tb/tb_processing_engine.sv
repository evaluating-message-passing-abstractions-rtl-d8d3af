// tb_processing_engine: one processing engine (stream 1 of two, two rows per
// bank) with a block RAM as its output bank. Each of several row partitions
// sends SOD, a random number of column partitions of data payloads for the
// rows this stream owns, EODs and finally EOS; the engine must return one
// result per bank word with the right index, sum and last flag. Operand values
// go beyond 18 bits so the signed 18x18 product is checked. One partition
// sends a burst of 16 payloads all for the same row with valid held high: it
// must be accepted in 16 cycles (one payload per cycle, the paper's goal for
// the in-flight write queue) and the queue must forward sums.
module tb_processing_engine;
  import hisparse_pkg::*;
  localparam int S = 2, OB = 2, AW = 11, SID = 1, RP = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, res_valid, res_ready;
  lane_pld_t in_pld;
  result_t res;
  logic s_en, a_en, a_we;
  logic [AW-1:0] s_addr, a_addr;
  logic [31:0] s_dout, a_din, a_dout, fwd_count;

  processing_engine #(.STREAMS(S), .OB_SIZE(OB), .AW(AW), .STREAM_ID(SID)) dut (.*);
  bram_tdp #(.WIDTH(32), .DEPTH(2048)) bank (
    .clk, .a_en, .a_we, .a_addr, .a_din, .a_dout,
    .b_en(s_en), .b_we(1'b0), .b_addr(s_addr), .b_din('0), .b_dout(s_dout));

  int checks = 0, failures = 0;
  lane_pld_t iq[$];
  result_t eq[$];
  bit burst_mode = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mul18(logic [31:0] a, logic [31:0] b);
    logic signed [17:0] x, y;
    logic signed [35:0] p;
    x = a[17:0]; y = b[17:0]; p = x * y;
    return p[31:0];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    in_valid  = iq.size() > 0 && (burst_mode || $urandom_range(3) != 0);
    in_pld    = iq.size() > 0 ? iq[0] : '0;
    res_ready = $urandom_range(3) != 0;
  end
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) void'(iq.pop_front());
    if (res_valid && res_ready) begin
      result_t e;
      e = eq.pop_front();
      check(res == e, $sformatf("result last=%0d index=%0d value=%0d, expected last=%0d index=%0d value=%0d",
                                res.last, res.index, res.value, e.last, e.index, e.value));
    end
  end

  task automatic add_partition(int rp, bit burst);
    logic [31:0] sum [OB];
    int rb, ncp;
    rb = rp * S * OB;
    foreach (sum[a]) sum[a] = 0;
    ncp = burst ? 1 : $urandom_range(1, 3);
    for (int c = 0; c < ncp; c++) begin
      int n;
      iq.push_back(cmd_pld(CMD_SOD, 32'(rb)));
      n = burst ? 16 : $urandom_range(0, 8);
      for (int i = 0; i < n; i++) begin
        lane_pld_t d;
        int a;
        a = burst ? 1 : $urandom_range(OB - 1);
        d = '0; d.cmd = CMD_DATA; d.row = 32'(rb + a * S + SID);
        d.mval = $urandom; d.vval = $urandom;
        iq.push_back(d);
        sum[a] += mul18(d.mval, d.vval);
      end
      iq.push_back(cmd_pld(CMD_EOD, 32'(rb)));
    end
    iq.push_back(cmd_pld(CMD_EOS, 32'(rb)));
    for (int a = 0; a < OB; a++) begin
      result_t r;
      r.last = (a == OB - 1); r.index = 32'(rb + a * S + SID); r.value = sum[a];
      eq.push_back(r);
    end
  endtask

  initial begin
    int t0, t1, f0;
    in_valid = 0; res_ready = 0; in_pld = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int rp = 0; rp < RP; rp++) add_partition(rp, 0);
    while (eq.size() > 0) @(posedge clk);
    // same-row burst
    f0 = fwd_count;
    burst_mode = 1;
    add_partition(RP, 1);
    while (dut.state_q != 3'd2) @(posedge clk);
    @(posedge clk);  // SOD-of-burst payloads: 16 data + EOD + EOS follow
    t0 = $time;
    while (iq.size() > 0) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 10 <= 18, $sformatf("16 same-row payloads plus EOD/EOS took %0d cycles (max 18)", (t1 - t0) / 10));
    while (eq.size() > 0) @(posedge clk);
    check(fwd_count - f0 >= 15, $sformatf("IFWQ forwarded %0d of 16 same-row sums", fwd_count - f0));
    $display("burst cycles=%0d forwards=%0d", (t1 - t0) / 10, fwd_count - f0);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
