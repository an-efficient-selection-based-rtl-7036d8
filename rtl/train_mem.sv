// train_mem: on-chip buffer holding the training set.
//
// The training samples and their class labels (the "Modality" of each
// sample) are stored so that the distance calculation can read UNROLL_N
// samples times UNROLL_F features in one clock. Sample s lives in row
// s / UNROLL_N, lane s % UNROLL_N; feature f lives in group f / UNROLL_F,
// slot f % UNROLL_F. One word of the feature array is one (row, group) pair
// and holds UNROLL_N x UNROLL_F features; the class labels sit in a second
// array with one word per row.
//
// The write port stores one feature (or one class label) per clock, as
// delivered by the data-acquisition block. The read port is synchronous:
// rdata/rcls are valid one clock after rd_en. Reads and writes are not used
// at the same time by the classifier, so no bypass is provided.
//
// The layout follows from the 6 x 4 unrolling of the distance calculation;
// holding the set in one on-chip buffer instead of reading it from external
// memory for every query is this implementation's choice.
module train_mem
  import knn_pkg::*;
#(
  parameter int unsigned NT = N_TRAIN,
  parameter int unsigned NF = N_FEAT,
  parameter int unsigned UN = UNROLL_N,
  parameter int unsigned UF = UNROLL_F,
  localparam int unsigned ROWS   = NT / UN,
  localparam int unsigned GROUPS = NF / UF,
  localparam int unsigned RW = (ROWS   > 1) ? $clog2(ROWS)   : 1,
  localparam int unsigned GW = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned LW = (UN     > 1) ? $clog2(UN)     : 1,
  localparam int unsigned SW = (UF     > 1) ? $clog2(UF)     : 1
) (
  input  logic                   clk,
  // feature write port
  input  logic                   we,
  input  logic [RW-1:0]          w_row,
  input  logic [GW-1:0]          w_grp,
  input  logic [LW-1:0]          w_lane,
  input  logic [SW-1:0]          w_slot,
  input  feat_t                  w_data,
  // class-label write port
  input  logic                   cls_we,
  input  logic [RW-1:0]          cls_row,
  input  logic [LW-1:0]          cls_lane,
  input  logic [CLS_W-1:0]       cls_data,
  // read port, one clock latency
  input  logic                   rd_en,
  input  logic [RW-1:0]          rd_row,
  input  logic [GW-1:0]          rd_grp,
  output feat_t [UN-1:0][UF-1:0] rdata,
  output logic  [UN-1:0][CLS_W-1:0] rcls
);

  feat_t [UN-1:0][UF-1:0]  feat_mem [ROWS*GROUPS];
  logic  [UN-1:0][CLS_W-1:0] cls_mem [ROWS];

  always_ff @(posedge clk) begin
    if (we)
      feat_mem[int'(w_row) * GROUPS + int'(w_grp)][w_lane][w_slot] <= w_data;
    if (cls_we)
      cls_mem[cls_row][cls_lane] <= cls_data;
    if (rd_en) begin
      rdata <= feat_mem[int'(rd_row) * GROUPS + int'(rd_grp)];
      rcls  <= cls_mem[rd_row];
    end
  end

endmodule
