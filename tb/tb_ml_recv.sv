// tb_ml_recv: feeds the matrix loader's payload half the packed channel of
// the document's worked example (one partition, two streams: stream one holds
// a skip-1 token then (col 0, 3) and (col 2, 4); stream two a skip-1 token then
// (col 0, 5) and (col 3, 6)) framed by SOD, EOD and EOS markers, and then a
// second partition with row base 4 whose tokens skip 0 and 3 rows. Outputs are
// consumed with random stalls. Expected per-stream outputs are written out by
// hand: stream one gets SOD, (row 2, col 0, 3), (row 2, col 2, 4), EOD, EOS.
module tb_ml_recv;
  import hisparse_pkg::*;
  localparam int S = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rsp_valid, rsp_ready;
  logic [S*64-1:0] rsp_data;
  ml_tag_t rsp_tag;
  logic [S-1:0] out_valid, out_ready;
  lane_pld_t out_pld [S];

  ml_recv #(.STREAMS(S)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { cmd_e cmd; int row; int col; int val; } exp_s;
  exp_s exp_q [S][$];

  initial begin
    repeat (3000) @(posedge clk);
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
            (int'(out_pld[s].row) != e.row || int'(out_pld[s].col) != e.col || int'(out_pld[s].mval) != e.val))
            || (e.cmd != CMD_DATA && int'(out_pld[s].row) != e.row)) begin
          failures++;
          $display("FAIL: stream %0d got cmd=%0d row=%0d col=%0d val=%0d expected cmd=%0d row=%0d col=%0d val=%0d",
                   s, out_pld[s].cmd, out_pld[s].row, out_pld[s].col, out_pld[s].mval, e.cmd, e.row, e.col, e.val);
        end
      end
    end
  end

  always @(negedge clk) out_ready = S'($urandom_range(3));

  task automatic send(cmd_e c, int rb, logic [63:0] e0, logic [63:0] e1);
    rsp_valid = 1; rsp_tag = '{meta: 1'b0, cmd: c, row_base: IDX_W'(rb)}; rsp_data = {e1, e0};
    @(posedge clk);
    while (!rsp_ready) @(posedge clk);
    #1 rsp_valid = 0;
  endtask

  function automatic logic [63:0] el(int v, int c); return {32'(v), 32'(c)}; endfunction

  initial begin
    rsp_valid = 0; rsp_data = 0; rsp_tag = '0;
    // partition 1: the worked example
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_SOD, 0, 0, 0});
    exp_q[0].push_back('{CMD_DATA, 2, 0, 3}); exp_q[0].push_back('{CMD_DATA, 2, 2, 4});
    exp_q[1].push_back('{CMD_DATA, 3, 0, 5}); exp_q[1].push_back('{CMD_DATA, 3, 3, 6});
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOD, 0, 0, 0});
    // partition 2, row base 4: stream 0 (0,7) skip0 (1,8) skip3 (2,9); stream 1 skip3 (3,1)
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_SOD, 4, 0, 0});
    exp_q[0].push_back('{CMD_DATA, 4, 0, 7}); exp_q[0].push_back('{CMD_DATA, 4, 1, 8});
    exp_q[0].push_back('{CMD_DATA, 10, 2, 9});
    exp_q[1].push_back('{CMD_DATA, 11, 3, 1});
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOD, 4, 0, 0});
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOS, 4, 0, 0});
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(CMD_SOD, 0, 0, 0);
    send(CMD_DATA, 0, el(1, -1), el(1, -1));
    send(CMD_DATA, 0, el(3, 0), el(5, 0));
    send(CMD_DATA, 0, el(4, 2), el(6, 3));
    send(CMD_EOD, 0, 0, 0);
    send(CMD_SOD, 4, 0, 0);
    send(CMD_DATA, 4, el(7, 0), el(3, -1));
    send(CMD_DATA, 4, el(0, -1), el(1, 3));
    send(CMD_DATA, 4, el(8, 1), el(0, -1));
    send(CMD_DATA, 4, el(3, -1), el(0, -1));
    send(CMD_DATA, 4, el(9, 2), el(0, -1));
    send(CMD_EOD, 4, 0, 0);
    send(CMD_EOS, 4, 0, 0);
    repeat (20) @(posedge clk);
    foreach (exp_q[s]) begin
      checks++;
      if (exp_q[s].size() != 0) begin failures++; $display("FAIL: stream %0d missing %0d outputs", s, exp_q[s].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
