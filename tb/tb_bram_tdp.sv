// tb_bram_tdp: checks the dual-port block RAM model: one-cycle read latency
// on both ports, read-first behaviour on a write, independent ports, and
// port B winning a same-address double write. Random traffic is compared
// with a reference array kept by the testbench.
module tb_bram_tdp;
  localparam int W = 16, D = 32, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_din, b_din, a_dout, b_dout;
  bram_tdp #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [D];
  logic [W-1:0] exp_a, exp_b;
  logic         chk_a, chk_b;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_din = 0; b_din = 0;
    chk_a = 0; chk_b = 0;
    // initialise through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_din = W'(i * 3 + 1); ref_mem[i] = W'(i * 3 + 1);
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (a_dout !== exp_a) begin failures++; $display("FAIL a %h %h", a_dout, exp_a); end end
      if (chk_b) begin checks++; if (b_dout !== exp_b) begin failures++; $display("FAIL b %h %h", b_dout, exp_b); end end
      a_en = $urandom_range(1); b_en = $urandom_range(1);
      a_we = $urandom_range(1); b_we = $urandom_range(1);
      a_addr = AW'($urandom_range(D - 1)); b_addr = (t % 7 == 0) ? a_addr : AW'($urandom_range(D - 1));
      a_din = W'($urandom); b_din = W'($urandom);
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];   // read-first
      if (a_en && a_we) ref_mem[a_addr] = a_din;
      if (b_en && b_we) ref_mem[b_addr] = b_din;           // port B wins
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
