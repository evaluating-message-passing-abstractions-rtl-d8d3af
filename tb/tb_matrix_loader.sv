// tb_matrix_loader: the whole matrix loader (request half, memory wrapper,
// demultiplexer, payload half) reading a block RAM loaded with a formatted
// matrix. Two matrices are used: the 8 x 8 benchmark and a random 8 x 16
// matrix with an empty partition. For every row partition, each stream's
// output must equal the list built directly from the dense matrix: per column
// partition an SOD, the stream's non-zeros (row, local column, value) in row
// order, an EOD, and an EOS at the end. Outputs stall at random.
module tb_matrix_loader;
  import hisparse_pkg::*;
  import spmv_image_pkg::*;
  localparam int S = 2, AW = 11;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start_valid, start_ready, mem_en;
  logic [IDX_W-1:0] row_part, num_col_parts, total_parts;
  logic [AW-1:0] mem_addr;
  logic [S*64-1:0] mem_dout, unused_b;
  logic [S-1:0] out_valid, out_ready;
  lane_pld_t out_pld [S];
  logic wr_en; logic [AW-1:0] wr_addr; logic [S*64-1:0] wr_data;

  matrix_loader #(.STREAMS(S), .AW(AW), .ROWS_PER_PART(4)) dut (.*);
  bram_tdp #(.WIDTH(S*64), .DEPTH(2048)) mem (
    .clk, .a_en(mem_en), .a_we(1'b0), .a_addr(mem_addr), .a_din('0), .a_dout(mem_dout),
    .b_en(wr_en), .b_we(wr_en), .b_addr(wr_addr), .b_din(wr_data), .b_dout(unused_b));

  int checks = 0, failures = 0;
  typedef struct { cmd_e cmd; int row; int col; int val; } exp_s;
  exp_s exp_q [S][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    for (int s = 0; s < S; s++) if (out_valid[s] && out_ready[s]) begin
      exp_s e;
      checks++;
      if (exp_q[s].size() == 0) begin failures++; $display("FAIL: extra output on %0d", s); end
      else begin
        e = exp_q[s].pop_front();
        if (out_pld[s].cmd != e.cmd || (e.cmd == CMD_DATA &&
            (int'(out_pld[s].row) != e.row || int'(out_pld[s].col) != e.col || int'(out_pld[s].mval) != e.val))) begin
          failures++;
          $display("FAIL: stream %0d got cmd=%0d row=%0d col=%0d val=%0d expected cmd=%0d row=%0d col=%0d val=%0d",
                   s, out_pld[s].cmd, out_pld[s].row, out_pld[s].col, out_pld[s].mval, e.cmd, e.row, e.col, e.val);
        end
      end
    end
  end

  always @(negedge clk) out_ready = S'($urandom_range(3)) | {S{1'b0}};

  task automatic run(spmv_image img);
    img.build();
    for (int w = 0; w < img.ml_words(); w++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(w);
      for (int s = 0; s < S; s++) wr_data[64*s +: 64] = img.ml[w*S + s];
    end
    @(negedge clk); wr_en = 0;
    for (int rp = 0; rp < img.nrp; rp++) begin
      for (int cp = 0; cp < img.ncp; cp++) begin
        foreach (exp_q[s]) exp_q[s].push_back('{CMD_SOD, 0, 0, 0});
        for (int s = 0; s < S; s++)
          for (int k = 0; k < 2; k++)
            for (int c = 0; c < 4; c++) begin
              int r, v;
              r = rp * 4 + s + 2 * k;
              v = img.A[r][cp * 4 + c];
              if (v != 0) exp_q[s].push_back('{CMD_DATA, r, c, v});
            end
        foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOD, 0, 0, 0});
      end
      foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOS, 0, 0, 0});
      start_valid = 1; row_part = rp; num_col_parts = img.ncp; total_parts = img.total_parts;
      @(negedge clk);
      while (!start_ready) @(negedge clk);
      start_valid = 0;
      while (exp_q[0].size() + exp_q[1].size() > 0) @(negedge clk);
    end
  endtask

  initial begin
    spmv_image bench, rnd;
    start_valid = 0; row_part = 0; num_col_parts = 0; total_parts = 0; wr_en = 0; wr_addr = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    bench = new(S, 2, 2, 8, 8);
    bench.A[0][0] = 1; bench.A[0][2] = 2; bench.A[2][4] = 3; bench.A[2][6] = 4;
    bench.A[3][4] = 5; bench.A[3][7] = 6; bench.A[4][0] = 7; bench.A[4][5] = 2;
    bench.A[4][6] = 4; bench.A[4][7] = 6; bench.A[5][0] = 8; bench.A[5][5] = 3;
    bench.A[5][6] = 5; bench.A[5][7] = 7; bench.A[6][0] = 9; bench.A[6][6] = 8;
    bench.A[7][0] = 1; bench.A[7][6] = 9;
    run(bench);
    rnd = new(S, 2, 2, 8, 16);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 16; c++)
        if (!(r >= 4 && c >= 8 && c < 12) && $urandom_range(2) == 0) rnd.A[r][c] = int'($urandom_range(50)) + 1;
    run(rnd);
    checks++;
    if (rnd.n_empty_parts == 0) begin failures++; $display("FAIL: no empty partition exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
