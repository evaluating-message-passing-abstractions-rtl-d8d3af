// tb_spmv_driver: the driver against models of the two loaders (start ready
// at random, independently) and of the result drain (row_done some cycles
// after both loaders were started). Each run must start both loaders exactly
// once per row partition with row_part 0, 1, .. in order and the column and
// total partition counts passed through, must never start row partition r+1
// before row r's row_done, and must raise finished after the last one, with
// num_cycles equal to the cycles spent busy. Runs with 1, 3 and 5 row
// partitions follow one another.
module tb_spmv_driver;
  import hisparse_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, ml_start_valid, ml_start_ready, vl_start_valid, vl_start_ready;
  logic row_done, busy, finished;
  logic [31:0] num_row_parts, num_col_parts, total_parts, row_part, ncol, ntotal, num_cycles;

  spmv_driver dut (.*);

  int checks = 0, failures = 0;
  int ml_starts [$], vl_starts [$];
  int pending, busy_cycles;

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

  // loader and drain models
  int delay;
  always @(negedge clk) begin
    ml_start_ready = $urandom_range(2) == 0;
    vl_start_ready = $urandom_range(2) == 0;
  end
  always @(posedge clk) if (!rst) begin
    if (busy) busy_cycles++;
    row_done <= 1'b0;
    if (ml_start_valid && ml_start_ready) begin
      ml_starts.push_back(row_part);
      check(ncol == num_col_parts && ntotal == total_parts, "partition counts not passed through");
    end
    if (vl_start_valid && vl_start_ready) vl_starts.push_back(row_part);
    if (ml_starts.size() == vl_starts.size() && ml_starts.size() > pending) begin
      if (delay == 0) delay = $urandom_range(1, 12);
      else if (--delay == 0) begin row_done <= 1'b1; pending++; end
    end
  end

  initial begin
    int runs [3] = '{1, 3, 5};
    start = 0; row_done = 0; delay = 0;
    num_row_parts = 0; num_col_parts = 0; total_parts = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (runs[k]) begin
      ml_starts.delete(); vl_starts.delete(); pending = 0; busy_cycles = 0;
      @(negedge clk);
      start = 1; num_row_parts = runs[k]; num_col_parts = k + 2; total_parts = runs[k] * (k + 2);
      @(negedge clk); start = 0;
      while (!finished) @(posedge clk);
      #1;
      check(ml_starts.size() == runs[k] && vl_starts.size() == runs[k],
            $sformatf("%0d/%0d loader starts for %0d row partitions", ml_starts.size(), vl_starts.size(), runs[k]));
      foreach (ml_starts[i])
        check(ml_starts[i] == i && vl_starts[i] == i, $sformatf("start %0d was for row partition %0d/%0d", i, ml_starts[i], vl_starts[i]));
      check(!busy, "busy after finished");
      check(num_cycles == 32'(busy_cycles), $sformatf("num_cycles %0d, busy for %0d", num_cycles, busy_cycles));
      repeat (4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // never two loader starts outstanding without a row_done between them
  always @(posedge clk) if (!rst)
    if (ml_starts.size() > pending + 1) begin
      failures++; $display("FAIL: row partition started before the previous one finished");
    end
endmodule
