// tb_shuffle_arbiter: checks the arbiter for 4 streams over random requests
// and all offsets, against the rules it must satisfy, computed here without
// its priority loop: (1) a granted input was valid; (2) no two grants share a
// bank; (3) every bank some valid input asks for is granted; (4) for each
// bank, the granted input is the one nearest after `offset` in circular order
// among the inputs asking for that bank.
module tb_shuffle_arbiter;
  localparam int S = 4, DW = 2;
  logic [S-1:0] valid, grant;
  logic [DW-1:0] dest [S];
  logic [DW-1:0] offset;
  shuffle_arbiter #(.STREAMS(S)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      valid = S'($urandom);
      offset = DW'($urandom);
      foreach (dest[i]) dest[i] = DW'($urandom);
      if (t < 256) begin  // exhaustive-ish: all valid patterns with all-equal banks
        valid = S'(t);
        foreach (dest[i]) dest[i] = DW'(t >> 4);
        offset = DW'(t >> 6);
      end
      #1;
      for (int b = 0; b < S; b++) begin
        int winner, best_dist, ngrant;
        winner = -1; best_dist = S; ngrant = 0;
        for (int i = 0; i < S; i++) begin
          int gap;
          gap = (i - int'(offset) + S) % S;
          if (valid[i] && int'(dest[i]) == b && gap < best_dist) begin best_dist = gap; winner = i; end
          if (grant[i] && int'(dest[i]) == b) ngrant++;
        end
        checks++;
        if ((winner < 0 && ngrant != 0) || (winner >= 0 && (ngrant != 1 || !grant[winner]))) begin
          failures++;
          $display("FAIL: bank %0d valid=%b offset=%0d grant=%b winner=%0d", b, valid, offset, grant, winner);
        end
      end
      checks++;
      if ((grant & ~valid) != 0) begin failures++; $display("FAIL: grant without request"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
