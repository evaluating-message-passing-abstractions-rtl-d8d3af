// tb_hisparse_top: end-to-end test of the accelerator at its default sizes
// (one cluster, two streams, 4 x 4 partitions, 8-row result).
//
// Run 1 is the 8 x 8 benchmark matrix with x = 0..7, whose product is known
// by hand: y = 4 0 36 62 76 94 48 54. Run 2 is a random 8 x 8 matrix with
// one all-zero partition and rows dense enough to make streams collide in
// both shuffle units. Each run preloads the memories through the host ports,
// starts the driver, waits for finished and compares final_vec with the
// reference. The benchmark's cycle count is checked against 237 cycles, the
// figure reported for the fully streaming design. The test also counts how
// often each mechanism of the design fired and fails if one never did:
// shuffle resends in both units, shuffle flushes, IFWQ forwarding, row-skip
// tokens, an empty partition, matrix-loader backpressure and a vector bank
// being refilled while the other half is still in use.
module tb_hisparse_top;
  import hisparse_pkg::*;
  import spmv_image_pkg::*;

  localparam int S = 2, VB = 2, OB = 2, NR = 8, NC = 8, AW = 11;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                ml_wr_en = 0, vl_wr_en = 0, start = 0;
  logic [AW-1:0]       ml_wr_addr = 0, vl_wr_addr = 0;
  logic [S*64-1:0]     ml_wr_data = 0;
  logic [S*32-1:0]     vl_wr_data = 0;
  logic [31:0]         num_row_parts = 0, num_col_parts = 0, total_parts = 0;
  logic                busy, finished;
  logic [31:0]         num_cycles, result_count;
  logic [31:0]         final_vec [NR];
  logic [31:0]         ev_sh1_resend, ev_sh2_resend, ev_sh1_flush;
  logic [31:0]         ev_pe_forward [S];

  hisparse_top dut (.*);

  int checks = 0, failures = 0;
  int n_tokens = 0, n_empty = 0, n_ml_stall = 0, n_dbuf = 0;

  // observation of internal mechanisms
  always @(posedge clk) if (!rst) begin
    if (dut.u_cluster.u_ml.data_valid && !dut.u_cluster.u_ml.data_ready) n_ml_stall++;
    if (dut.u_cluster.g_lane[0].u_vau.wr_en &&
        dut.u_cluster.g_lane[0].u_vau.full_q[!dut.u_cluster.g_lane[0].u_vau.fill_sel_q]) n_dbuf++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(spmv_image img, string name, int max_cycles);
    img.build();
    n_tokens += img.n_tokens;
    n_empty  += img.n_empty_parts;
    for (int w = 0; w < img.ml_words(); w++) begin
      @(negedge clk);
      ml_wr_en   = 1;
      ml_wr_addr = AW'(w);
      for (int s = 0; s < S; s++) ml_wr_data[64*s +: 64] = img.ml[w*S + s];
    end
    for (int w = 0; w < img.vl_words(); w++) begin
      @(negedge clk);
      ml_wr_en   = 0;
      vl_wr_en   = 1;
      vl_wr_addr = AW'(w);
      for (int s = 0; s < S; s++) vl_wr_data[32*s +: 32] = 32'(img.vl[w*S + s]);
    end
    @(negedge clk);
    ml_wr_en = 0; vl_wr_en = 0;
    num_row_parts = img.nrp; num_col_parts = img.ncp; total_parts = img.total_parts;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (finished);
    @(negedge clk);
    for (int r = 0; r < NR; r++)
      check(final_vec[r] == 32'(img.y[r]),
            $sformatf("%s y[%0d] = %0d, expected %0d", name, r, $signed(final_vec[r]), img.y[r]));
    $display("%s: %0d cycles, %0d nonzeros, %0d tokens, %0d matrix words", name, num_cycles, img.n_nonzeros, img.n_tokens, img.ml_words());
    check(num_cycles <= 32'(max_cycles), $sformatf("%s took %0d cycles, limit %0d", name, num_cycles, max_cycles));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spmv_image bench, rnd;
    repeat (4) @(posedge clk);
    rst = 0;

    // Run 1: benchmark matrix
    bench = new(S, VB, OB, NR, NC);
    bench.A[0][0] = 1; bench.A[0][2] = 2;
    bench.A[2][4] = 3; bench.A[2][6] = 4;
    bench.A[3][4] = 5; bench.A[3][7] = 6;
    bench.A[4][0] = 7; bench.A[4][5] = 2; bench.A[4][6] = 4; bench.A[4][7] = 6;
    bench.A[5][0] = 8; bench.A[5][5] = 3; bench.A[5][6] = 5; bench.A[5][7] = 7;
    bench.A[6][0] = 9; bench.A[6][6] = 8;
    bench.A[7][0] = 1; bench.A[7][6] = 9;
    foreach (bench.x[i]) bench.x[i] = i;
    run(bench, "benchmark", 237);
    begin
      automatic int exp_y[8] = '{4, 0, 36, 62, 76, 94, 48, 54};
      foreach (exp_y[i]) check(bench.y[i] == exp_y[i], $sformatf("reference y[%0d]", i));
    end

    // Run 2: random matrix, partition (row 0, col 1) left empty
    rnd = new(S, VB, OB, NR, NC);
    void'($urandom(7));
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        if (!(r < 4 && c >= 4) && ($urandom_range(99) < 60))
          rnd.A[r][c] = int'($urandom_range(200)) - 100;
    foreach (rnd.x[i]) rnd.x[i] = int'($urandom_range(2000)) - 1000;
    run(rnd, "random", 2000);

    // every mechanism must have happened
    check(ev_sh1_resend > 0, "shuffle 1 never resent a payload");
    check(ev_sh2_resend > 0, "shuffle 2 never resent a payload");
    check(ev_sh1_flush  > 0, "shuffle flush never ran");
    check(ev_pe_forward[0] + ev_pe_forward[1] > 0, "IFWQ never forwarded");
    check(n_tokens > 0, "no row-skip token");
    check(n_empty > 0, "no empty partition");
    check(n_ml_stall > 0, "matrix loader never back-pressured");
    check(n_dbuf > 0, "vector bank never refilled while the other half was in use");
    $display("events: sh1_resend=%0d sh2_resend=%0d flushes=%0d fwd=%0d/%0d tokens=%0d empty=%0d ml_stall=%0d dbuf=%0d",
             ev_sh1_resend, ev_sh2_resend, ev_sh1_flush, ev_pe_forward[0], ev_pe_forward[1],
             n_tokens, n_empty, n_ml_stall, n_dbuf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
