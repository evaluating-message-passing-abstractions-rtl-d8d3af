// tb_vector_loader: the vector loader reading a block RAM holding
// x[i] = 1000 + 3i (packed two elements per word). For two row partitions of
// a matrix with 3 column partitions it must send, per column partition c, an
// SOD, the VB_SIZE = 2 words c*2 and c*2+1 in order and an EOD, then one EOS;
// commands carry the row partition's first row (4 * row_part). The consumer
// stalls at random. A second run without stalls checks that the two words of
// a partition arrive on consecutive cycles.
module tb_vector_loader;
  import hisparse_pkg::*;
  localparam int S = 2, AW = 11, VB = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start_valid, start_ready, mem_en, out_valid, out_ready;
  logic [IDX_W-1:0] row_part, num_col_parts;
  logic [AW-1:0] mem_addr;
  logic [S*32-1:0] mem_dout, out_data, unused_b;
  vl_tag_t out_tag;
  logic wr_en; logic [AW-1:0] wr_addr; logic [S*32-1:0] wr_data;

  vector_loader #(.STREAMS(S), .VB_SIZE(VB), .AW(AW), .ROWS_PER_PART(4)) dut (.*);
  bram_tdp #(.WIDTH(S*32), .DEPTH(2048)) mem (
    .clk, .a_en(mem_en), .a_we(1'b0), .a_addr(mem_addr), .a_din('0), .a_dout(mem_dout),
    .b_en(wr_en), .b_we(wr_en), .b_addr(wr_addr), .b_din(wr_data), .b_dout(unused_b));

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { cmd_e cmd; int rb; logic [63:0] d; } exp_s;
  exp_s exp_q[$];
  int data_cyc[$];
  bit stall = 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    exp_s e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: extra output"); end
    else begin
      e = exp_q.pop_front();
      if (out_tag.cmd != e.cmd || int'(out_tag.row_base) != e.rb || (e.cmd == CMD_DATA && out_data != e.d)) begin
        failures++;
        $display("FAIL: got cmd=%0d rb=%0d data=%h expected cmd=%0d rb=%0d data=%h",
                 out_tag.cmd, out_tag.row_base, out_data, e.cmd, e.rb, e.d);
      end
      if (e.cmd == CMD_DATA) data_cyc.push_back(cyc);
    end
  end
  always @(negedge clk) out_ready = stall ? ($urandom_range(2) != 0) : 1'b1;

  function automatic logic [31:0] xv(int i); return 32'(1000 + 3 * i); endfunction

  initial begin
    start_valid = 0; row_part = 0; num_col_parts = 0; wr_en = 0; wr_addr = 0; wr_data = 0;
    for (int w = 0; w < 6; w++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(w); wr_data = {xv(2*w+1), xv(2*w)};
    end
    @(negedge clk); wr_en = 0; rst = 0;
    for (int pass = 0; pass < 3; pass++) begin
      int rp;
      rp = pass % 2;
      stall = (pass < 2);
      data_cyc.delete();
      for (int c = 0; c < 3; c++) begin
        exp_q.push_back('{CMD_SOD, 4 * rp, 0});
        for (int i = 0; i < VB; i++) exp_q.push_back('{CMD_DATA, 4 * rp, {xv(2*(c*VB+i)+1), xv(2*(c*VB+i))}});
        exp_q.push_back('{CMD_EOD, 4 * rp, 0});
      end
      exp_q.push_back('{CMD_EOS, 4 * rp, 0});
      start_valid = 1; row_part = rp; num_col_parts = 3;
      @(negedge clk);
      while (!start_ready) @(negedge clk);
      start_valid = 0;
      while (exp_q.size() > 0) @(negedge clk);
    end
    checks++;
    if (!(data_cyc.size() == 6 && data_cyc[1] == data_cyc[0] + 1 && data_cyc[3] == data_cyc[2] + 1)) begin
      failures++; $display("FAIL: partition words not on consecutive cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
