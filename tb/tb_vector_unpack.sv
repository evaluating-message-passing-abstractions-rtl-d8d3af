// tb_vector_unpack: packed vector words framed by SOD/EOD/EOS go in; each
// stream must receive the commands, and for data word j of a partition a
// payload with vval = element s of the word and col = j (its bank address).
// The lanes stall independently at random; a word may only be taken when
// both lanes take it, so the lanes must stay in step.
module tb_vector_unpack;
  import hisparse_pkg::*;
  localparam int S = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  logic [S*32-1:0] in_data;
  vl_tag_t in_tag;
  logic [S-1:0] out_valid, out_ready;
  lane_pld_t out_pld [S];

  vector_unpack #(.STREAMS(S), .VB_SIZE(2)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { cmd_e cmd; int col; int v; } exp_s;
  exp_s exp_q [S][$];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    checks++;
    if (out_valid[0] != out_valid[1]) begin failures++; $display("FAIL: lanes out of step"); end
    for (int s = 0; s < S; s++) if (out_valid[s] && out_ready[s]) begin
      exp_s e;
      checks++;
      e = exp_q[s].pop_front();
      if (out_pld[s].cmd != e.cmd || (e.cmd == CMD_DATA && (int'(out_pld[s].col) != e.col || int'(out_pld[s].vval) != e.v))) begin
        failures++;
        $display("FAIL: lane %0d got cmd=%0d col=%0d v=%0d expected cmd=%0d col=%0d v=%0d",
                 s, out_pld[s].cmd, out_pld[s].col, out_pld[s].vval, e.cmd, e.col, e.v);
      end
    end
  end
  always @(negedge clk) out_ready = S'($urandom_range(3));

  task automatic put(cmd_e c, int v0, int v1);
    in_valid = 1; in_tag = '{cmd: c, row_base: 0}; in_data = {32'(v1), 32'(v0)};
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; in_tag = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < 4; p++) begin
      foreach (exp_q[s]) exp_q[s].push_back('{CMD_SOD, 0, 0});
      for (int j = 0; j < 2; j++) begin
        exp_q[0].push_back('{CMD_DATA, j, 100 * p + 10 * j});
        exp_q[1].push_back('{CMD_DATA, j, 100 * p + 10 * j + 1});
      end
      foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOD, 0, 0});
      put(CMD_SOD, 0, 0);
      for (int j = 0; j < 2; j++) put(CMD_DATA, 100 * p + 10 * j, 100 * p + 10 * j + 1);
      put(CMD_EOD, 0, 0);
    end
    foreach (exp_q[s]) exp_q[s].push_back('{CMD_EOS, 0, 0});
    put(CMD_EOS, 0, 0);
    repeat (10) @(posedge clk);
    foreach (exp_q[s]) begin
      checks++;
      if (exp_q[s].size() != 0) begin failures++; $display("FAIL: lane %0d missing outputs", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
