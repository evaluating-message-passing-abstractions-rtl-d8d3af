// spmv_driver: runs a complete sparse matrix-vector product on the cluster.
//
// The cluster computes one row partition per trigger, so the driver loops:
// for row partition 0 .. num_row_parts-1 it starts the matrix loader and the
// vector loader (each a ready/valid start; both must have accepted), then
// waits for the result drain's row_done before starting the next one. After
// the last row partition it raises finished. num_cycles counts the clock
// cycles from the start pulse until finished, the figure by which the
// source design's runs are compared. A new start pulse restarts it.
module spmv_driver
  import hisparse_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [IDX_W-1:0] num_row_parts,
  input  logic [IDX_W-1:0] num_col_parts,
  input  logic [IDX_W-1:0] total_parts,
  output logic             ml_start_valid,
  input  logic             ml_start_ready,
  output logic             vl_start_valid,
  input  logic             vl_start_ready,
  output logic [IDX_W-1:0] row_part,
  output logic [IDX_W-1:0] ncol,
  output logic [IDX_W-1:0] ntotal,
  input  logic             row_done,
  output logic             busy,
  output logic             finished,
  output logic [31:0]      num_cycles
);
  typedef enum logic [1:0] { S_IDLE, S_TRIGGER, S_WAIT } state_e;

  state_e           state_q;
  logic             ml_done_q, vl_done_q;
  logic [IDX_W-1:0] nrow_q;

  assign ml_start_valid = (state_q == S_TRIGGER) && !ml_done_q;
  assign vl_start_valid = (state_q == S_TRIGGER) && !vl_done_q;
  assign busy           = (state_q != S_IDLE);

  wire ml_ok = ml_done_q || ml_start_ready;
  wire vl_ok = vl_done_q || vl_start_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_IDLE;
      ml_done_q  <= 1'b0;
      vl_done_q  <= 1'b0;
      nrow_q     <= '0;
      row_part   <= '0;
      ncol       <= '0;
      ntotal     <= '0;
      finished   <= 1'b0;
      num_cycles <= '0;
    end else begin
      if (busy) num_cycles <= num_cycles + 1;
      unique case (state_q)
        S_IDLE: if (start) begin
          nrow_q     <= num_row_parts;
          ncol       <= num_col_parts;
          ntotal     <= total_parts;
          row_part   <= '0;
          finished   <= 1'b0;
          num_cycles <= '0;
          state_q    <= (num_row_parts == 0) ? S_IDLE : S_TRIGGER;
        end
        S_TRIGGER: begin
          ml_done_q <= ml_ok;
          vl_done_q <= vl_ok;
          if (ml_ok && vl_ok) begin
            ml_done_q <= 1'b0;
            vl_done_q <= 1'b0;
            state_q   <= S_WAIT;
          end
        end
        S_WAIT: if (row_done) begin
          if (row_part + 1 >= nrow_q) begin
            finished <= 1'b1;
            state_q  <= S_IDLE;
          end else begin
            row_part <= row_part + 1'b1;
            state_q  <= S_TRIGGER;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
