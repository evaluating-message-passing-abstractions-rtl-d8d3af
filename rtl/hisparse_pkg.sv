// hisparse_pkg: types and constants shared by the single-cluster HiSparse
// sparse matrix-vector (SpMV) accelerator.
//
// Every stream inside the cluster carries one lane_pld_t per transfer. A
// payload is either a data element (cmd == CMD_DATA) or one of the three
// stream commands that keep the lanes in step: Start of Data (SOD) opens a
// column partition, End of Data (EOD) closes it and End of Stream (EOS) closes
// the whole row partition. The command set, the -1 skip-row marker of the
// packed matrix format and the 32-bit element width follow the source
// architecture; the field layout and the packing of memory words are this
// implementation's choices.
package hisparse_pkg;

  localparam int unsigned DATA_W = 32;      // matrix, vector and result elements
  localparam int unsigned IDX_W  = 32;      // row and column indices

  typedef enum logic [1:0] {
    CMD_DATA = 2'd0,
    CMD_SOD  = 2'd1,
    CMD_EOD  = 2'd2,
    CMD_EOS  = 2'd3
  } cmd_e;

  // One lane payload. After the matrix loader the fields row, col and mval are
  // used; after the vector buffer access unit col is replaced by vval. On a
  // command payload, row carries the first row of the current row partition.
  typedef struct packed {
    cmd_e                     cmd;
    logic [IDX_W-1:0]         row;
    logic [IDX_W-1:0]         col;
    logic signed [DATA_W-1:0] mval;
    logic signed [DATA_W-1:0] vval;
  } lane_pld_t;

  // One finished output-vector element, leaving a processing engine.
  typedef struct packed {
    logic                     last;   // final element of this engine / cluster
    logic [IDX_W-1:0]         index;
    logic signed [DATA_W-1:0] value;
  } result_t;

  // Tag that travels with each matrix-loader memory request: metadata reads
  // are returned to ml_send, data reads and command markers go to ml_recv.
  typedef struct packed {
    logic             meta;
    cmd_e             cmd;
    logic [IDX_W-1:0] row_base;
  } ml_tag_t;

  // Tag that travels with each vector-loader memory request.
  typedef struct packed {
    cmd_e             cmd;
    logic [IDX_W-1:0] row_base;
  } vl_tag_t;

  // The skip-row marker in the column half of a packed matrix element.
  localparam logic [IDX_W-1:0] SKIP_ROW = '1;

  function automatic lane_pld_t cmd_pld(cmd_e c, logic [IDX_W-1:0] row_base);
    lane_pld_t p;
    p      = '0;
    p.cmd  = c;
    p.row  = row_base;
    return p;
  endfunction

endpackage
