// tb_ml_send: drives the matrix loader's request half for one row partition
// of three column partitions (lengths 3, 0 and 2) and answers its metadata
// reads. It checks the exact request sequence: metadata reads of words 2p and
// 2p+1, an SOD marker, one data read per payload starting at the partition's
// start word, an EOD marker per partition and a final EOS, with the tags that
// tell the receiving half what each word is. It also checks that the data
// reads of a partition leave on consecutive cycles (one address per cycle).
module tb_ml_send;
  import hisparse_pkg::*;
  localparam int AW = 11;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start_valid, start_ready, req_valid, req_ready, req_rd, meta_valid, meta_ready;
  logic [IDX_W-1:0] row_part, num_col_parts, total_parts;
  logic [AW-1:0] req_addr;
  ml_tag_t req_tag;
  logic [DATA_W-1:0] meta_data;

  ml_send #(.AW(AW), .ROWS_PER_PART(4)) dut (.*);

  int checks = 0, failures = 0;
  // expected request list: {rd, meta, cmd, addr}
  typedef struct { bit rd; bit meta; cmd_e cmd; int addr; } req_s;
  req_s exp_q[$];
  int meta_words[$];
  int data_cycles[$];
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // memory for metadata: returns the value with 2-cycle latency in order
  int meta_pipe[$];
  always @(posedge clk) if (!rst) begin
    if (req_valid && req_ready) begin
      req_s e;
      if (exp_q.size() == 0) check(0, "unexpected request");
      else begin
        e = exp_q.pop_front();
        check(req_rd == e.rd && req_tag.meta == e.meta && req_tag.cmd == e.cmd &&
              (!e.rd || int'(req_addr) == e.addr) && req_tag.row_base == 32'd8,
              $sformatf("request rd=%0d meta=%0d cmd=%0d addr=%0d, expected rd=%0d meta=%0d cmd=%0d addr=%0d",
                        req_rd, req_tag.meta, req_tag.cmd, req_addr, e.rd, e.meta, e.cmd, e.addr));
        if (e.meta) meta_pipe.push_back(meta_words.pop_front());
        if (e.rd && !e.meta) data_cycles.push_back(cyc);
      end
    end
  end

  always @(negedge clk) begin
    req_ready  = ($urandom_range(5) != 0) || (exp_q.size() > 0 && exp_q[0].rd && !exp_q[0].meta);
    meta_valid = (meta_pipe.size() > 0) && ($urandom_range(1) == 1);
    meta_data  = (meta_pipe.size() > 0) ? meta_pipe[0] : 0;
  end
  always @(posedge clk) if (meta_valid && meta_ready) void'(meta_pipe.pop_front());

  initial begin
    int lens[3] = '{3, 0, 2};
    int starts[3] = '{40, 43, 50};
    start_valid = 0; row_part = 0; num_col_parts = 0; total_parts = 0;
    // row partition 2 of a matrix with 3 column partitions: p = 6, 7, 8
    for (int c = 0; c < 3; c++) begin
      int p;
      p = 2 * 3 + c;
      exp_q.push_back('{1, 1, CMD_DATA, 2 * p});
      exp_q.push_back('{1, 1, CMD_DATA, 2 * p + 1});
      meta_words.push_back(starts[c]);
      meta_words.push_back(lens[c]);
      exp_q.push_back('{0, 0, CMD_SOD, 0});
      for (int j = 0; j < lens[c]; j++) exp_q.push_back('{1, 0, CMD_DATA, starts[c] + j});
      exp_q.push_back('{0, 0, CMD_EOD, 0});
    end
    exp_q.push_back('{0, 0, CMD_EOS, 0});
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    start_valid = 1; row_part = 2; num_col_parts = 3; total_parts = 9;
    @(negedge clk);
    while (!start_ready) @(negedge clk);
    start_valid = 0;
    repeat (200) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d requests never issued", exp_q.size()));
    check(start_ready, "not idle after EOS");
    // the first partition's three data reads are back to back (ready forced high)
    check(data_cycles.size() == 5, "wrong number of data reads");
    if (data_cycles.size() == 5)
      check(data_cycles[1] == data_cycles[0] + 1 && data_cycles[2] == data_cycles[1] + 1 &&
            data_cycles[4] == data_cycles[3] + 1, "data reads not one per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
