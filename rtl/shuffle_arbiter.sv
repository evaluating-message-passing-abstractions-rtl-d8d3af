// shuffle_arbiter: grants the payloads offered by the shuffle core's STREAMS
// inputs so that no two granted payloads go to the same bank.
//
// Input i offers a payload (valid[i]) bound for bank dest[i]. Inputs are
// visited in priority order starting at input `offset` and wrapping around;
// an input is granted when no input visited before it was granted the same
// bank. Every bank that is asked for is therefore granted exactly once per
// cycle, and the input holding top priority is always granted. The shuffle
// core rotates `offset` for fairness, as the source arbiter does. The
// crossbar routing is dest[] itself: granted input i goes to output dest[i].
//
// Purely combinational (one arbitration stage). The source arbiter is split
// over several pipeline stages by its compiler; this version resolves in one
// cycle, so the core's flush lasts STREAMS cycles.
module shuffle_arbiter #(
  parameter int unsigned STREAMS = 2,
  localparam int unsigned DW     = (STREAMS > 1) ? $clog2(STREAMS) : 1
) (
  input  logic [STREAMS-1:0] valid,
  input  logic [DW-1:0]      dest   [STREAMS],
  input  logic [DW-1:0]      offset,
  output logic [STREAMS-1:0] grant
);
  always_comb begin
    logic [STREAMS-1:0] taken;   // banks already granted this cycle
    taken = '0;
    grant = '0;
    for (int n = 0; n < STREAMS; n++) begin
      logic [DW-1:0] i;
      i = DW'((int'(offset) + n) % STREAMS);
      if (valid[i] && !taken[dest[i]]) begin
        grant[i]       = 1'b1;
        taken[dest[i]] = 1'b1;
      end
    end
  end

endmodule
