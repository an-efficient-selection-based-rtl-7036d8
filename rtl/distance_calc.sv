// distance_calc: complete unrolled distance calculation.
//
// After start, computes the squared Euclidean distance from the query
// sample to every training sample with UNROLL_N udc units side by side. The
// training buffer is read one (row, group) word per clock: UNROLL_N samples
// times UNROLL_F features. After N_FEAT/UNROLL_F clocks a row of UNROLL_N
// distances is complete and is written, together with the class labels of
// those samples, as one row of the Distance/Modality array. With the default
// sizes the 672 training samples take 672/6 = 112 intervals of 16/4 = 4
// clocks each.
//
// Pipeline: clock 0 issues the buffer read, clock 1 feeds the udc units,
// clock 2 writes the finished row. 'done' pulses together with the write
// of the last row, ROWS*GROUPS + 2 clock edges after the edge that samples
// start, and
// 'intervals' then holds the number of rows written. 'query' must not change
// while busy is high.
//
// The 6 x 4 unrolling is the design's; the row-per-interval write and the
// three-stage pipeline are this implementation's.
module distance_calc
  import knn_pkg::*;
#(
  parameter int unsigned NT = N_TRAIN,
  parameter int unsigned NF = N_FEAT,
  parameter int unsigned UN = UNROLL_N,
  parameter int unsigned UF = UNROLL_F,
  localparam int unsigned ROWS   = NT / UN,
  localparam int unsigned GROUPS = NF / UF,
  localparam int unsigned RW = (ROWS   > 1) ? $clog2(ROWS)   : 1,
  localparam int unsigned GW = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic [RW:0]                intervals,
  input  feat_t [NF-1:0]             query,
  // training-buffer read port
  output logic                       tm_rd_en,
  output logic [RW-1:0]              tm_row,
  output logic [GW-1:0]              tm_grp,
  input  feat_t [UN-1:0][UF-1:0]     tm_rdata,
  input  logic  [UN-1:0][CLS_W-1:0]  tm_rcls,
  // Distance/Modality array write port
  output logic                       dm_we,
  output logic [RW-1:0]              dm_waddr,
  output dm_entry_t [UN-1:0]         dm_wdata
);

  logic          issuing;
  // stage 1: buffer data valid
  logic          s1_valid, s1_first, s1_last;
  logic [GW-1:0] s1_grp;
  logic [RW-1:0] s1_row;
  // stage 2: udc results valid
  logic [RW-1:0] s2_row;
  logic  [UN-1:0][CLS_W-1:0] s2_cls;
  logic  [UN-1:0]            u_valid;
  dist_t [UN-1:0]            u_dist;
  feat_t [UF-1:0]            q_slice;

  assign tm_rd_en = issuing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing   <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      intervals <= '0;
      tm_row    <= '0;
      tm_grp    <= '0;
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_grp    <= '0;
      s1_row    <= '0;
      s2_row    <= '0;
      s2_cls    <= '0;
      dm_we     <= 1'b0;
      dm_waddr  <= '0;
      dm_wdata  <= '0;
    end else begin
      done  <= 1'b0;
      dm_we <= 1'b0;
      if (start && !busy) begin
        issuing   <= 1'b1;
        busy      <= 1'b1;
        intervals <= '0;
        tm_row    <= '0;
        tm_grp    <= '0;
      end else if (issuing) begin
        if (tm_grp == GW'(GROUPS - 1)) begin
          tm_grp <= '0;
          if (tm_row == RW'(ROWS - 1)) issuing <= 1'b0;
          else                         tm_row  <= tm_row + 1'b1;
        end else begin
          tm_grp <= tm_grp + 1'b1;
        end
      end
      // stage 1
      s1_valid <= issuing;
      s1_first <= (tm_grp == '0);
      s1_last  <= (tm_grp == GW'(GROUPS - 1));
      s1_grp   <= tm_grp;
      s1_row   <= tm_row;
      // stage 2: capture the row and its class labels with the last group
      if (s1_valid && s1_last) begin
        s2_row <= s1_row;
        s2_cls <= tm_rcls;
      end
      // stage 3: write the finished row
      if (&u_valid) begin   // all lanes finish together
        dm_we     <= 1'b1;
        dm_waddr  <= s2_row;
        intervals <= intervals + 1'b1;
        for (int l = 0; l < int'(UN); l++)
          dm_wdata[l] <= '{distance: u_dist[l], cls: s2_cls[l]};
        if (s2_row == RW'(ROWS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int j = 0; j < int'(UF); j++)
      q_slice[j] = query[int'(s1_grp) * UF + j];

  for (genvar l = 0; l < int'(UN); l++) begin : g_udc
    udc #(.UF(UF)) u_udc (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (s1_valid),
      .in_first (s1_first),
      .in_last  (s1_last),
      .q        (q_slice),
      .t        (tm_rdata[l]),
      .out_valid(u_valid[l]),
      .out_dist (u_dist[l])
    );
  end

endmodule
