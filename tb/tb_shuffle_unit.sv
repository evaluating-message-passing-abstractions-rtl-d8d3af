// tb_shuffle_unit: the shuffle unit (column-keyed, two streams) with random
// traffic. Each input stream sends, per partition, SOD, a random number of
// payloads with random columns and unique values, and EOD; after the last
// partition, EOS. Inputs arrive and outputs drain with random gaps. For every
// output stream and partition the testbench checks: SOD first, then exactly
// the payloads (by value) whose column is congruent to the stream number,
// then EOD; EOS at the end. Payloads of one input to one output keep their
// order. It also checks that conflicts really occurred (resends counted), that
// every partition ended with a flush, and that a conflict-free partition of 32
// payloads per stream with no stalls passes in at most 32 + 8 cycles.
module tb_shuffle_unit;
  import hisparse_pkg::*;
  localparam int S = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [S-1:0] in_valid, in_ready, out_valid, out_ready;
  lane_pld_t in_pld [S], out_pld [S];
  logic [31:0] resend_count, flush_count;

  shuffle_unit #(.STREAMS(S), .KEY_IS_ROW(1'b0)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  bit random_gaps = 1;
  lane_pld_t src_q [S][$];          // what each input will send
  int exp_vals [S][8][$];           // data values each output expects, per partition
  int part_of [S];                  // partition each output is in
  cmd_e exp_cmd [S][$];             // command sequence per output
  int got_vals [S][$];
  int last_from [S][S];             // last value seen from input i at output d
  int sod_cyc, eod_cyc;

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

  always @(posedge clk) cyc++;

  // drive inputs
  always @(negedge clk) begin
    for (int s = 0; s < S; s++) begin
      in_valid[s] = (src_q[s].size() > 0) && (!random_gaps || $urandom_range(3) != 0);
      in_pld[s]   = (src_q[s].size() > 0) ? src_q[s][0] : '0;
    end
    out_ready = random_gaps ? S'($urandom_range(3)) | S'($urandom_range(3)) : '1;
  end
  always @(posedge clk) for (int s = 0; s < S; s++) if (in_valid[s] && in_ready[s]) void'(src_q[s].pop_front());

  // check outputs
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < S; d++) if (out_valid[d] && out_ready[d]) begin
      if (out_pld[d].cmd == CMD_DATA) begin
        int src;
        got_vals[d].push_back(int'(out_pld[d].mval));
        check(int'(out_pld[d].col) % S == d, $sformatf("column %0d delivered to stream %0d", out_pld[d].col, d));
        src = int'(out_pld[d].mval) / 100000;
        check(int'(out_pld[d].mval) > last_from[src][d], "order from one input not kept");
        last_from[src][d] = int'(out_pld[d].mval);
      end else begin
        cmd_e e;
        e = CMD_DATA;
        if (exp_cmd[d].size() > 0) e = exp_cmd[d].pop_front();
        check(out_pld[d].cmd == e, $sformatf("stream %0d command %0d, expected %0d", d, out_pld[d].cmd, e));
        if (d == 0 && out_pld[d].cmd == CMD_SOD) sod_cyc = cyc;
        if (d == 0 && out_pld[d].cmd == CMD_EOD) eod_cyc = cyc;
        if (out_pld[d].cmd == CMD_EOD) begin
          int a[$], b[$];
          a.delete(); b.delete();
          foreach (got_vals[d][k]) a.push_back(got_vals[d][k]);
          foreach (exp_vals[d][part_of[d]][k]) b.push_back(exp_vals[d][part_of[d]][k]);
          a.sort(); b.sort();
          check(a == b, $sformatf("stream %0d partition payload set differs (%0d vs %0d)", d, a.size(), b.size()));
          got_vals[d].delete();
          part_of[d]++;
        end
      end
    end
  end

  task automatic partition(int n_max, int mode, int idx);
    // mode 0: random columns, 1: all on bank 0 (full conflict), 2: conflict free
    foreach (exp_cmd[d]) exp_cmd[d].push_back(CMD_SOD);
    for (int s = 0; s < S; s++) begin
      int n;
      src_q[s].push_back(cmd_pld(CMD_SOD, 0));
      n = (mode == 0) ? $urandom_range(n_max) : n_max;
      for (int j = 0; j < n; j++) begin
        lane_pld_t p;
        int c;
        c = (mode == 0) ? $urandom_range(15) : (mode == 1) ? 2 * $urandom_range(7) : S * $urandom_range(7) + s;
        p = '0; p.cmd = CMD_DATA; p.col = 32'(c); p.row = 32'(s);
        p.mval = 32'(s * 100000 + idx * 1000 + j + 1);
        src_q[s].push_back(p);
        exp_vals[c % S][idx].push_back(int'(p.mval));
      end
      src_q[s].push_back(cmd_pld(CMD_EOD, 0));
    end
    foreach (exp_cmd[d]) exp_cmd[d].push_back(CMD_EOD);
  endtask

  initial begin
    foreach (in_pld[s]) in_pld[s] = '0;
    in_valid = '0; out_ready = '0;
    foreach (last_from[i, d]) last_from[i][d] = 0;
    foreach (part_of[d]) part_of[d] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int p = 0; p < 6; p++) partition(12, p == 3 ? 1 : 0, p);
    partition(0, 1, 6);    // empty partition
    for (int s = 0; s < S; s++) src_q[s].push_back(cmd_pld(CMD_EOS, 0));
    foreach (exp_cmd[d]) exp_cmd[d].push_back(CMD_EOS);
    while (exp_cmd[0].size() + exp_cmd[1].size() > 0) @(posedge clk);
    check(resend_count > 0, "no conflict was resolved");
    check(flush_count == 7, $sformatf("%0d flushes for 7 partitions", flush_count));
    // throughput: conflict-free, no gaps
    random_gaps = 0;
    partition(32, 2, 7);
    for (int s = 0; s < S; s++) src_q[s].push_back(cmd_pld(CMD_EOS, 0));
    foreach (exp_cmd[d]) exp_cmd[d].push_back(CMD_EOS);
    while (exp_cmd[0].size() + exp_cmd[1].size() > 0) @(posedge clk);
    check(eod_cyc - sod_cyc <= 40, $sformatf("32 conflict-free payloads took %0d cycles", eod_cyc - sod_cyc));
    $display("resends=%0d flushes=%0d partition cycles=%0d", resend_count, flush_count, eod_cyc - sod_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
