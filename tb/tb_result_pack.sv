// tb_result_pack: four engines (a parameter override of the default two) each
// hold a queue of results for rows base + a*4 + s, a = 0..2, released with
// random valid gaps, and the output stalls at random. The packed stream must
// list rows base, base+1, ... in order with the values intact, and only the
// final row of each partition may be flagged last. When every input is valid
// and the output is always ready, one result must pass per cycle.
module tb_result_pack;
  import hisparse_pkg::*;
  localparam int S = 4, OB = 3, NP = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [S-1:0] in_valid, in_ready;
  result_t in_res [S];
  logic out_valid, out_ready;
  result_t out_res;

  result_pack #(.STREAMS(S)) dut (.*);

  int checks = 0, failures = 0, expect_row = 0, n_out = 0;
  result_t q [S][$];
  bit full_rate = 0;

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
    for (int s = 0; s < S; s++) begin
      in_valid[s] = q[s].size() > 0 && (full_rate || $urandom_range(2) != 0);
      in_res[s]   = q[s].size() > 0 ? q[s][0] : '0;
    end
    out_ready = full_rate || $urandom_range(3) != 0;
  end
  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < S; s++) if (in_valid[s] && in_ready[s]) void'(q[s].pop_front());
    if (out_valid && out_ready) begin
      bit last_row;
      last_row = (expect_row % (S * OB)) == S * OB - 1;
      check(out_res.index == 32'(expect_row) && out_res.value == 32'(expect_row * 7 + 1) &&
            out_res.last == last_row,
            $sformatf("out index=%0d value=%0d last=%0d, expected row %0d last=%0d",
                      out_res.index, out_res.value, out_res.last, expect_row, last_row));
      expect_row++;
      n_out++;
    end
  end

  task automatic load(int np);
    for (int p = 0; p < np; p++)
      for (int s = 0; s < S; s++)
        for (int a = 0; a < OB; a++) begin
          result_t r;
          int row;
          row = p * S * OB + a * S + s;
          r.last = (a == OB - 1); r.index = 32'(row); r.value = 32'(row * 7 + 1);
          q[s].push_back(r);
        end
  endtask

  initial begin
    int n0;
    longint t0;
    in_valid = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    load(NP);
    while (expect_row < NP * S * OB) @(posedge clk);
    // full-rate phase: 2 partitions = 24 results in 24 cycles
    full_rate = 1;
    expect_row = 0;
    n0 = n_out;
    load(2);
    while (n_out == n0) @(posedge clk);
    t0 = $time;
    while (n_out - n0 < 2 * S * OB) @(posedge clk);
    check(($time - t0) / 10 == 2 * S * OB - 1,
          $sformatf("%0d results took %0d cycles at full rate", 2 * S * OB, ($time - t0) / 10 + 1));
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
