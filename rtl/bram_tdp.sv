// bram_tdp: true dual-port block RAM with one clock, as inferred by FPGA tools.
//
// Two independent ports A and B each read or write one word per cycle. A read
// returns the word one cycle after the address is presented (registered
// output). A port that writes returns the old word (read-first). When both
// ports write the same address in the same cycle, port B wins. The cluster
// uses this model for its matrix, vector, vector-bank and output-bank memories;
// the source architecture places these in vendor block RAMs with 11-bit
// addresses, which sets the DEPTH default of 2048.
// The read-first behaviour and the collision rule are this implementation's
// choices; the source design used the FPGA vendor's block memory generator.
module bram_tdp #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_din;
    end
    if (b_en) begin
      b_dout <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_din;
    end
  end

endmodule
