// tb_vector_buffer_access: one vector buffer access unit (stream 1 of two)
// with a block RAM as its bank. The vector side sends, per partition p,
// SOD, elements v(p, j) = 1000 p + j for bank words j = 0, 1, and EOD; the
// matrix side sends SOD, payloads with columns 1 and 3 (the columns this
// stream owns) in random order, and EOD; EOS ends both. Both sides run with
// random gaps and the output stalls at random. Every output payload must carry
// vval = v(p, col / 2) of its own partition, with row and mval unchanged, and
// the commands in order. The vector side is started well ahead, so the second
// bank half is filled while the first is still read (double buffering), which
// the testbench counts.
module tb_vector_buffer_access;
  import hisparse_pkg::*;
  localparam int S = 2, AW = 11, P = 6;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic vec_valid, vec_ready, mat_valid, mat_ready, out_valid, out_ready;
  lane_pld_t vec_pld, mat_pld, out_pld;
  logic bank_en, bank_we;
  logic [AW-1:0] bank_addr;
  logic [31:0] bank_din, bank_dout, unused_b;

  vector_buffer_access #(.STREAMS(S), .VB_SIZE(2), .AW(AW), .STREAM_ID(1)) dut (.*);
  bram_tdp #(.WIDTH(32), .DEPTH(2048)) bank (
    .clk, .a_en(bank_en), .a_we(bank_we), .a_addr(bank_addr), .a_din(bank_din), .a_dout(bank_dout),
    .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout(unused_b));

  int checks = 0, failures = 0, n_overlap = 0;
  lane_pld_t vq[$], mq[$], eq[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    vec_valid = vq.size() > 0 && $urandom_range(3) != 0;
    vec_pld   = vq.size() > 0 ? vq[0] : '0;
    mat_valid = mq.size() > 0 && $urandom_range(3) != 0;
    mat_pld   = mq.size() > 0 ? mq[0] : '0;
    out_ready = $urandom_range(3) != 0;
  end
  always @(posedge clk) if (!rst) begin
    if (vec_valid && vec_ready) void'(vq.pop_front());
    if (mat_valid && mat_ready) void'(mq.pop_front());
    if (bank_we && dut.full_q[!dut.fill_sel_q]) n_overlap++;
    if (out_valid && out_ready) begin
      lane_pld_t e;
      e = eq.pop_front();
      check(out_pld.cmd == e.cmd && (e.cmd != CMD_DATA ||
            (out_pld.vval == e.vval && out_pld.row == e.row && out_pld.mval == e.mval)),
            $sformatf("got cmd=%0d row=%0d mval=%0d vval=%0d expected cmd=%0d row=%0d mval=%0d vval=%0d",
                      out_pld.cmd, out_pld.row, out_pld.mval, out_pld.vval, e.cmd, e.row, e.mval, e.vval));
    end
  end

  initial begin
    vec_valid = 0; mat_valid = 0; out_ready = 0; vec_pld = '0; mat_pld = '0;
    for (int p = 0; p < P; p++) begin
      int n;
      vq.push_back(cmd_pld(CMD_SOD, 0));
      for (int j = 0; j < 2; j++) begin
        lane_pld_t v;
        v = '0; v.cmd = CMD_DATA; v.col = 32'(j); v.vval = 32'(1000 * p + j);
        vq.push_back(v);
      end
      vq.push_back(cmd_pld(CMD_EOD, 0));
      mq.push_back(cmd_pld(CMD_SOD, 0)); eq.push_back(cmd_pld(CMD_SOD, 0));
      n = $urandom_range(6);
      for (int i = 0; i < n; i++) begin
        lane_pld_t m, e;
        m = '0; m.cmd = CMD_DATA; m.col = 32'(2 * $urandom_range(1) + 1);
        m.row = 32'($urandom_range(7)); m.mval = 32'($urandom);
        mq.push_back(m);
        e = m; e.col = '0; e.vval = 32'(1000 * p + int'(m.col) / 2);
        eq.push_back(e);
      end
      mq.push_back(cmd_pld(CMD_EOD, 0)); eq.push_back(cmd_pld(CMD_EOD, 0));
    end
    vq.push_back(cmd_pld(CMD_EOS, 0));
    mq.push_back(cmd_pld(CMD_EOS, 0)); eq.push_back(cmd_pld(CMD_EOS, 0));
    repeat (3) @(posedge clk);
    rst = 0;
    while (eq.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(vq.size() == 0 && mq.size() == 0, "inputs not fully consumed");
    check(n_overlap > 0, "no bank refill overlapped with reads of the other half");
    $display("overlapping fills=%0d", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
