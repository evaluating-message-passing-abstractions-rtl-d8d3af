// tb_result_drain: sends results for four passes over 8 rows (each pass a row
// partition ending in a last flag) with random gaps. final_vec must hold the
// newest value per row index mod 8, row_done must pulse exactly once per last
// flag, in the cycle after the flagged result is taken, and count must equal the number of results.
// The drain is always ready, so one result per cycle is also checked.
module tb_result_drain;
  import hisparse_pkg::*;
  localparam int NR = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, row_done;
  result_t in_res;
  logic [31:0] final_vec [NR];
  logic [31:0] count;

  result_drain #(.NUM_ROWS(NR)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [NR];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, dones;
    in_valid = 0; in_res = '0; n = 0; dones = 0;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int pass = 0; pass < 4; pass++)
      for (int r = 0; r < NR; r++) begin
        while ($urandom_range(2) == 0) begin
          @(negedge clk); in_valid = 0;
          @(posedge clk); #1;
          check(!row_done, "row_done without a last flag");
        end
        @(negedge clk);
        in_valid = 1;
        in_res.index = 32'(pass * NR + r); in_res.value = $urandom; in_res.last = (r == NR - 1);
        check(in_ready, "drain not ready");
        model[r] = in_res.value;
        n++;
        @(posedge clk); #1;
        check(row_done == in_res.last, "row_done does not follow the last flag");
        if (row_done) dones++;
      end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    check(!row_done, "row_done longer than one cycle");
    check(dones == 4, $sformatf("row_done pulsed %0d times, expected 4", dones));
    check(count == 32'(n), $sformatf("count %0d, expected %0d", count, n));
    for (int i = 0; i < NR; i++)
      check(final_vec[i] == model[i], $sformatf("final_vec[%0d]=%0d, expected %0d", i, final_vec[i], model[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
