// dist_mem: the combined Distance/Modality array.
//
// Instead of two arrays, one for the distances and one for the class labels
// of the training samples, each element holds both ({distance, class}), so
// that whenever the selector picks a neighbour its class is available in the
// same clock ("array map", horizontal). One row holds the UNROLL_N results of
// one distance-calculation interval and is written in a single clock.
//
// Write: we, waddr, wdata (whole row). Read: synchronous, rdata valid one
// clock after rd_en. Element i of the distance vector is in row
// i / UNROLL_N, lane i % UNROLL_N.
module dist_mem
  import knn_pkg::*;
#(
  parameter int unsigned NT = N_TRAIN,
  parameter int unsigned UN = UNROLL_N,
  localparam int unsigned ROWS = NT / UN,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [RW-1:0]         waddr,
  input  dm_entry_t [UN-1:0]    wdata,
  input  logic                  rd_en,
  input  logic [RW-1:0]         raddr,
  output dm_entry_t [UN-1:0]    rdata
);

  dm_entry_t [UN-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    if (rd_en)
      rdata <= mem[raddr];
  end

endmodule
