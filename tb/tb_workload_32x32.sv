// tb_workload_32x32: the larger workload run on the single-cluster,
// two-stream accelerator: a 32 x 32 matrix that is 99% sparse (10 non-zeros
// out of 1024, at random places with random values) times a random vector.
// The default top holds an 8-row result vector (the size of the 8 x 8
// benchmark), so this test widens only the result drain to 32 rows
// (NUM_ROWS = 32); every other parameter stays at its default. The matrix
// has 8 x 8 = 64 partitions of 4 x 4, most of them empty. The result must
// equal y = A * x computed here, and the run must take no more than 727
// cycles, the figure reported for this workload, which itself is well below
// the 2016 cycles of a dense one-operation-per-cycle product
// (32 * (2 * 32 - 1)). Three different random matrices are run.
module tb_workload_32x32;
  import hisparse_pkg::*;
  import spmv_image_pkg::*;

  localparam int S = 2, VB = 2, OB = 2, N = 32, AW = 11, NNZ = 10;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                ml_wr_en = 0, vl_wr_en = 0, start = 0;
  logic [AW-1:0]       ml_wr_addr = 0, vl_wr_addr = 0;
  logic [S*64-1:0]     ml_wr_data = 0;
  logic [S*32-1:0]     vl_wr_data = 0;
  logic [31:0]         num_row_parts = 0, num_col_parts = 0, total_parts = 0;
  logic                busy, finished;
  logic [31:0]         num_cycles, result_count;
  logic [31:0]         final_vec [N];
  logic [31:0]         ev_sh1_resend, ev_sh2_resend, ev_sh1_flush;
  logic [31:0]         ev_pe_forward [S];

  hisparse_top #(.NUM_ROWS(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(spmv_image img, string name);
    img.build();
    for (int w = 0; w < img.ml_words(); w++) begin
      @(negedge clk);
      ml_wr_en = 1; ml_wr_addr = AW'(w);
      for (int s = 0; s < S; s++) ml_wr_data[64*s +: 64] = img.ml[w*S + s];
    end
    for (int w = 0; w < img.vl_words(); w++) begin
      @(negedge clk);
      ml_wr_en = 0; vl_wr_en = 1; vl_wr_addr = AW'(w);
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
    for (int r = 0; r < N; r++)
      check(final_vec[r] == 32'(img.y[r]),
            $sformatf("%s y[%0d] = %0d, expected %0d", name, r, $signed(final_vec[r]), img.y[r]));
    check(num_cycles <= 727, $sformatf("%s took %0d cycles, reported 727", name, num_cycles));
    $display("%s: %0d cycles, %0d nonzeros, %0d empty partitions of %0d, %0d memory words",
             name, num_cycles, img.n_nonzeros, img.n_empty_parts, img.total_parts, img.ml_words());
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 3; k++) begin
      spmv_image img;
      int placed;
      img = new(S, VB, OB, N, N);
      placed = 0;
      while (placed < NNZ) begin
        int r, c;
        r = $urandom_range(N - 1); c = $urandom_range(N - 1);
        if (img.A[r][c] == 0) begin
          img.A[r][c] = int'($urandom_range(500)) + 1;
          placed++;
        end
      end
      foreach (img.x[i]) img.x[i] = int'($urandom_range(2000)) - 1000;
      run(img, $sformatf("32x32 run %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
