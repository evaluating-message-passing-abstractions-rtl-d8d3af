// shuffle_crossbar: all-to-all connection from the shuffle core's STREAMS
// arbiter slots to its STREAMS output streams.
//
// Output d carries the payload of the granted input whose destination is d;
// out_valid[d] is low when no granted input targets d. The arbiter guarantees
// at most one granted input per destination (checked by an assertion).
// Combinational, parameterised by the payload type T.
// The all-to-all connection follows the source architecture; building it as
// one multiplexer per output is this implementation's choice.
module shuffle_crossbar #(
  parameter int unsigned STREAMS = 2,
  parameter type         T       = logic [31:0],
  localparam int unsigned DW     = (STREAMS > 1) ? $clog2(STREAMS) : 1
) (
  input  logic [STREAMS-1:0] grant,
  input  logic [DW-1:0]      dest      [STREAMS],
  input  T                   in_pld    [STREAMS],
  output logic [STREAMS-1:0] out_valid,
  output T                   out_pld   [STREAMS]
);
  always_comb begin
    for (int d = 0; d < STREAMS; d++) begin
      out_valid[d] = 1'b0;
      out_pld[d]   = in_pld[0];
      for (int i = 0; i < STREAMS; i++) begin
        if (grant[i] && int'(dest[i]) == d) begin
          out_valid[d] = 1'b1;
          out_pld[d]   = in_pld[i];
        end
      end
    end
  end

  always_comb begin
    for (int d = 0; d < STREAMS; d++) begin
      int unsigned hits;
      hits = 0;
      for (int i = 0; i < STREAMS; i++)
        if (grant[i] && int'(dest[i]) == d) hits++;
      assert (hits <= 1) else $error("shuffle_crossbar: two grants for output %0d", d);
    end
  end

endmodule
