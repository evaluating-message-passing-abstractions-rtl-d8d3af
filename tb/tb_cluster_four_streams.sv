// tb_cluster_four_streams: the cluster built with four streams instead of the
// default two (banks of two words, so partitions of 8 x 8), to show that the
// units generalise over STREAMS. Testbench memories and block-RAM banks are
// connected as in tb_hisparse_cluster. A random 32 x 32 matrix (4 x 4
// partitions, some rows and one partition empty, so row-skip tokens and an
// empty partition occur) is computed one row partition at a time; the result
// stream, taken with random back-pressure, must give the rows of y = A * x in
// order with the last flag only on the final row of each row partition. A
// second matrix places every non-zero of a row partition in one column, so all
// four streams collide in the first shuffle. Each row partition must finish
// within ml words + vector words + 40 cycles.
module tb_cluster_four_streams;
  import hisparse_pkg::*;
  import spmv_image_pkg::*;
  localparam int S = 4, VB = 2, OB = 2, AW = 11, N = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ml_start_valid, ml_start_ready, vl_start_valid, vl_start_ready;
  logic [31:0] row_part, num_col_parts, total_parts;
  logic ml_bram_en, vl_bram_en;
  logic [AW-1:0] ml_bram_addr, vl_bram_addr;
  logic [S*64-1:0] ml_bram_dout;
  logic [S*32-1:0] vl_bram_dout;
  logic [S-1:0] vau_bram_en, vau_bram_we, pes_bram_en, pea_bram_en, pea_bram_we;
  logic [AW-1:0] vau_bram_addr [S], pes_bram_addr [S], pea_bram_addr [S];
  logic [31:0] vau_bram_din [S], vau_bram_dout [S], pes_bram_dout [S], pea_bram_din [S];
  logic [31:0] vau_unused [S], pea_unused [S];
  logic res_valid, res_ready;
  result_t res;
  logic [31:0] ev_sh1_resend, ev_sh2_resend, ev_sh1_flush, ev_pe_forward [S];

  hisparse_cluster #(.STREAMS(S), .VB_SIZE(VB), .OB_SIZE(OB), .AW(AW)) dut (.*);

  for (genvar s = 0; s < S; s++) begin : g_bank
    bram_tdp #(.WIDTH(32), .DEPTH(2048)) u_vau (
      .clk, .a_en(vau_bram_en[s]), .a_we(vau_bram_we[s]), .a_addr(vau_bram_addr[s]),
      .a_din(vau_bram_din[s]), .a_dout(vau_bram_dout[s]),
      .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout(vau_unused[s]));
    bram_tdp #(.WIDTH(32), .DEPTH(2048)) u_pe (
      .clk, .a_en(pea_bram_en[s]), .a_we(pea_bram_we[s]), .a_addr(pea_bram_addr[s]),
      .a_din(pea_bram_din[s]), .a_dout(pea_unused[s]),
      .b_en(pes_bram_en[s]), .b_we(1'b0), .b_addr(pes_bram_addr[s]), .b_din('0),
      .b_dout(pes_bram_dout[s]));
  end

  logic [S*64-1:0] ml_mem [2048];
  logic [S*32-1:0] vl_mem [2048];
  always @(posedge clk) begin
    if (ml_bram_en) ml_bram_dout <= ml_mem[ml_bram_addr];
    if (vl_bram_en) vl_bram_dout <= vl_mem[vl_bram_addr];
  end

  int checks = 0, failures = 0;
  result_t got [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) res_ready = $urandom_range(3) != 0;
  always @(posedge clk) if (!rst && res_valid && res_ready) got.push_back(res);

  task automatic run(spmv_image img, string name);
    int bound;
    img.build();
    foreach (ml_mem[w]) ml_mem[w] = '0;
    foreach (vl_mem[w]) vl_mem[w] = '0;
    for (int w = 0; w < img.ml_words(); w++)
      for (int s = 0; s < S; s++) ml_mem[w][64*s +: 64] = img.ml[w*S + s];
    for (int w = 0; w < img.vl_words(); w++)
      for (int s = 0; s < S; s++) vl_mem[w][32*s +: 32] = 32'(img.vl[w*S + s]);
    bound = img.ml_words() + img.vl_words() + 40;
    num_col_parts = img.ncp; total_parts = img.total_parts;
    for (int rp = 0; rp < img.nrp; rp++) begin
      int t0, cyc;
      got.delete();
      @(negedge clk);
      row_part = rp; ml_start_valid = 1; vl_start_valid = 1;
      t0 = $time;
      fork
        begin @(posedge clk); while (!ml_start_ready) @(posedge clk); @(negedge clk); ml_start_valid = 0; end
        begin @(posedge clk); while (!vl_start_ready) @(posedge clk); @(negedge clk); vl_start_valid = 0; end
      join
      while (got.size() < S * OB) @(posedge clk);
      cyc = ($time - t0) / 10;
      check(cyc <= bound, $sformatf("%s row partition %0d took %0d cycles (bound %0d)", name, rp, cyc, bound));
      foreach (got[i]) begin
        int r;
        r = rp * S * OB + i;
        check(got[i].index == 32'(r) && got[i].value == 32'(img.y[r]) && got[i].last == (i == S * OB - 1),
              $sformatf("%s result %0d: index=%0d value=%0d last=%0d, expected row %0d value %0d",
                        name, i, got[i].index, $signed(got[i].value), got[i].last, r, img.y[r]));
      end
    end
    $display("%s: %0d nonzeros, %0d tokens, %0d empty partitions", name, img.n_nonzeros, img.n_tokens, img.n_empty_parts);
  endtask

  initial begin
    spmv_image a, b;
    int tokens;
    ml_start_valid = 0; vl_start_valid = 0; row_part = 0; res_ready = 0;
    repeat (4) @(posedge clk);
    rst = 0;

    a = new(S, VB, OB, N, N);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (r % 5 != 3 && !(r >= 8 && r < 16 && c >= 8 && c < 16) && $urandom_range(99) < 40)
          a.A[r][c] = int'($urandom_range(2000)) - 1000;
    foreach (a.x[i]) a.x[i] = int'($urandom_range(200000)) - 100000;
    run(a, "random");
    tokens = a.n_tokens;
    check(a.n_empty_parts > 0, "no empty partition in the random matrix");

    b = new(S, VB, OB, N, N);
    for (int r = 0; r < N; r++) b.A[r][(r / 8) * 8 % N] = r + 1;
    foreach (b.x[i]) b.x[i] = 3 * i + 1;
    run(b, "same-column");
    tokens += b.n_tokens;

    check(tokens > 0, "no row-skip token");
    check(ev_sh1_resend > 0 && ev_sh2_resend > 0, "a shuffle unit never resent a payload");
    check(ev_sh1_flush > 0, "shuffle flush never ran");
    check(ev_pe_forward[0] + ev_pe_forward[1] + ev_pe_forward[2] + ev_pe_forward[3] > 0, "IFWQ never forwarded");
    $display("events: sh1_resend=%0d sh2_resend=%0d flushes=%0d fwd=%0d/%0d/%0d/%0d", ev_sh1_resend, ev_sh2_resend,
             ev_sh1_flush, ev_pe_forward[0], ev_pe_forward[1], ev_pe_forward[2], ev_pe_forward[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
