// tb_shuffle_crossbar: random conflict-free grant patterns for 4 streams.
// Each output must carry exactly the payload of the granted input routed to
// it, and be invalid when no granted input targets it.
module tb_shuffle_crossbar;
  localparam int S = 4, DW = 2;
  logic [S-1:0] grant, out_valid;
  logic [DW-1:0] dest [S];
  logic [15:0] in_pld [S], out_pld [S];
  shuffle_crossbar #(.STREAMS(S), .T(logic [15:0])) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 1000; t++) begin
      int perm[S];
      int src[S];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (src[b]) src[b] = -1;
      grant = S'($urandom);
      for (int i = 0; i < S; i++) begin
        dest[i] = DW'(perm[i]);
        in_pld[i] = 16'($urandom);
        if (grant[i]) src[perm[i]] = i;
      end
      #1;
      for (int b = 0; b < S; b++) begin
        checks++;
        if (src[b] < 0 ? out_valid[b] : (!out_valid[b] || out_pld[b] != in_pld[src[b]])) begin
          failures++;
          $display("FAIL: output %0d valid=%b data=%h expected source %0d", b, out_valid[b], out_pld[b], src[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
