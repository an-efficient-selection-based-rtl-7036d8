// knn_top: selection-based k-nearest-neighbour classifier.
//
// Classifies one query sample against a training set held on chip. The
// flow for every query is:
//   1. data_acq receives the query words (the training set was loaded
//      before through the same stream);
//   2. distance_calc computes the squared Euclidean distance to every
//      training sample with UNROLL_N distance units, UNROLL_F features per
//      clock, and writes {distance, class} rows to dist_mem;
//   3. selector scans dist_mem once and keeps the K nearest neighbours in K
//      shift registers, V1/V2 split SPLIT:(100-SPLIT);
//   4. class_det takes the majority class of those K neighbours.
// A small controller sequences the steps; while it is busy, query words are
// held off (s_ready low) so the query register stays stable.
//
// Training set: either fetched from external memory (fetch_start with the
// byte address of the packed set in fetch_base; burst_fetch reads it over
// the AXI4 read port in 16-beat bursts and feeds data_acq, which is cleared
// first; fetch_start is ignored while a classification runs) or streamed in
// on the word port. The word port is held off while a fetch runs.
//
// Interface: one valid/ready word stream (s_query selects query or training
// words, see data_acq), train_clear to start a new training set, early_out
// to let the selector stop at the first V2 element not below the K-th
// minimum (sampled when the selector starts; low gives the exact result), and a
// result that is valid for one clock on res_valid: the class, the K
// neighbours (nearest first), the vote counts, the number of clocks from the
// last query word to the result, and the selector's V2 statistics.
//
// Timing: res_cycles counts the clocks from the query_done pulse to the
// result. With R = N_TRAIN/UNROLL_N rows and G = N_FEAT/UNROLL_F groups it is
// R*G + N_TRAIN + 6 for a full scan, or R*G + i + 7 when an early-out scan
// stops at element i. With the defaults (112 intervals of 4 clocks, 672
// elements) that is 448 + 672 + 6 = 1126 clocks, 11.26 us at 100 MHz.
//
// The split into acquisition, distance calculation, selector and class
// determination, the unroll factors, K = 3, the 6:4 split and the 24-bit
// <6,18> arithmetic, and fetching the training set from external memory in
// bursts follow the design. Keeping the fetched set in an on-chip buffer so
// that it is read once rather than per query is this implementation's
// choice; the processor, interconnect and memory controller are outside
// this module.
module knn_top
  import knn_pkg::*;
#(
  parameter int unsigned NT    = N_TRAIN,
  parameter int unsigned NF    = N_FEAT,
  parameter int unsigned K     = K_NN,
  parameter int unsigned UN    = UNROLL_N,
  parameter int unsigned UF    = UNROLL_F,
  parameter int unsigned SPLIT = SPLIT_PCT,
  localparam int unsigned ROWS   = NT / UN,
  localparam int unsigned GROUPS = NF / UF,
  localparam int unsigned RW = (ROWS   > 1) ? $clog2(ROWS)   : 1,
  localparam int unsigned GW = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned LW = (UN     > 1) ? $clog2(UN)     : 1,
  localparam int unsigned SW = (UF     > 1) ? $clog2(UF)     : 1,
  localparam int unsigned IW = $clog2(NT + 1),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // sample stream
  input  logic                        s_valid,
  output logic                        s_ready,
  input  feat_t                       s_data,
  input  logic                        s_query,
  input  logic                        train_clear,
  input  logic                        early_out,
  // training-set fetch from external memory
  input  logic                        fetch_start,
  input  logic [31:0]                 fetch_base,
  output logic                        fetch_busy,
  output logic [15:0]                 fetch_bursts,
  output logic [7:0]                  fetch_errors,
  output logic                        m_axi_arvalid,
  input  logic                        m_axi_arready,
  output logic [31:0]                 m_axi_araddr,
  output logic [7:0]                  m_axi_arlen,
  output logic [2:0]                  m_axi_arsize,
  output logic [1:0]                  m_axi_arburst,
  input  logic                        m_axi_rvalid,
  output logic                        m_axi_rready,
  input  logic [31:0]                 m_axi_rdata,
  input  logic [1:0]                  m_axi_rresp,
  input  logic                        m_axi_rlast,
  // status
  output logic                        train_full,
  output logic                        busy,
  // result
  output logic                        res_valid,
  output logic [CLS_W-1:0]            res_class,
  output dm_entry_t [K-1:0]           res_nn,
  output logic [N_CLASS-1:0][CW-1:0]  res_counts,
  output logic [31:0]                 res_cycles,
  output logic [IW-1:0]               res_v2_inserts,
  output logic                        res_aborted
);

  typedef enum logic [1:0] {ST_IDLE, ST_DIST, ST_SEL, ST_VOTE} state_t;
  state_t state;

  // word stream into data_acq: the burst fetch while it runs, else the port
  logic             acq_valid, acq_ready, acq_query, acq_clear;
  feat_t            acq_data;
  logic             bf_valid, bf_done, fetch_go;
  feat_t            bf_data;

  // data_acq <-> train_mem
  logic             tm_we, tm_cls_we;
  logic [RW-1:0]    tm_wrow;
  logic [GW-1:0]    tm_wgrp;
  logic [LW-1:0]    tm_wlane;
  logic [SW-1:0]    tm_wslot;
  feat_t            tm_wdata;
  logic [CLS_W-1:0] tm_wcls;
  logic             query_done;
  feat_t [NF-1:0]   query;
  // distance_calc <-> train_mem / dist_mem
  logic             tm_rd_en;
  logic [RW-1:0]    tm_rrow;
  logic [GW-1:0]    tm_rgrp;
  feat_t [UN-1:0][UF-1:0]     tm_rdata;
  logic  [UN-1:0][CLS_W-1:0]  tm_rcls;
  logic             dc_start, dc_busy, dc_done;
  logic [RW:0]      dc_intervals;
  logic             dm_we;
  logic [RW-1:0]    dm_waddr;
  dm_entry_t [UN-1:0] dm_wdata;
  // selector <-> dist_mem
  logic             sel_start, sel_busy, sel_done;
  logic             dm_rd_en;
  logic [RW-1:0]    dm_raddr;
  dm_entry_t [UN-1:0] dm_rdata;
  dm_entry_t [K-1:0]  sel_nn;
  logic [IW-1:0]    sel_v2_inserts;
  logic             sel_aborted;
  // class determination
  logic [K-1:0][CLS_W-1:0]     nn_cls;
  logic                        cd_valid;
  logic [CLS_W-1:0]            cd_class;
  logic [N_CLASS-1:0][CW-1:0]  cd_counts;
  logic [31:0]                 cycles;

  assign busy = (state != ST_IDLE);

  burst_fetch #(.NT(NT), .NF(NF)) u_fetch (
    .clk, .rst_n,
    .start(fetch_go), .base_addr(fetch_base),
    .busy(fetch_busy), .done(bf_done), .bursts(fetch_bursts), .err_count(fetch_errors),
    .arvalid(m_axi_arvalid), .arready(m_axi_arready), .araddr(m_axi_araddr),
    .arlen(m_axi_arlen), .arsize(m_axi_arsize), .arburst(m_axi_arburst),
    .rvalid(m_axi_rvalid), .rready(m_axi_rready), .rdata(m_axi_rdata),
    .rresp(m_axi_rresp), .rlast(m_axi_rlast),
    .m_valid(bf_valid), .m_ready(acq_ready && fetch_busy), .m_data(bf_data)
  );

  // a fetch replaces the training set, so it starts by clearing it; it is
  // ignored while a classification is running
  assign fetch_go  = fetch_start && !fetch_busy && !busy;
  assign acq_clear = train_clear || fetch_go;
  assign acq_valid = fetch_busy ? bf_valid : s_valid;
  assign acq_data  = fetch_busy ? bf_data  : s_data;
  assign acq_query = fetch_busy ? 1'b0     : s_query;
  assign s_ready   = acq_ready && !fetch_busy;

  data_acq #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) u_acq (
    .clk, .rst_n,
    .s_valid(acq_valid), .s_ready(acq_ready), .s_data(acq_data), .s_query(acq_query),
    .train_clear(acq_clear), .hold(busy), .train_full, .query_done, .query,
    .tm_we, .tm_row(tm_wrow), .tm_grp(tm_wgrp), .tm_lane(tm_wlane),
    .tm_slot(tm_wslot), .tm_data(tm_wdata), .tm_cls_we, .tm_cls(tm_wcls)
  );

  train_mem #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) u_tmem (
    .clk,
    .we(tm_we), .w_row(tm_wrow), .w_grp(tm_wgrp), .w_lane(tm_wlane),
    .w_slot(tm_wslot), .w_data(tm_wdata),
    .cls_we(tm_cls_we), .cls_row(tm_wrow), .cls_lane(tm_wlane), .cls_data(tm_wcls),
    .rd_en(tm_rd_en), .rd_row(tm_rrow), .rd_grp(tm_rgrp),
    .rdata(tm_rdata), .rcls(tm_rcls)
  );

  distance_calc #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) u_distc (
    .clk, .rst_n,
    .start(dc_start), .busy(dc_busy), .done(dc_done), .intervals(dc_intervals),
    .query,
    .tm_rd_en, .tm_row(tm_rrow), .tm_grp(tm_rgrp), .tm_rdata, .tm_rcls,
    .dm_we, .dm_waddr, .dm_wdata
  );

  dist_mem #(.NT(NT), .UN(UN)) u_dmem (
    .clk,
    .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .rd_en(dm_rd_en), .raddr(dm_raddr), .rdata(dm_rdata)
  );

  selector #(.NT(NT), .UN(UN), .K(K), .SPLIT(SPLIT)) u_sel (
    .clk, .rst_n,
    .start(sel_start), .early_out, .busy(sel_busy), .done(sel_done),
    .rd_en(dm_rd_en), .rd_row(dm_raddr), .rd_data(dm_rdata),
    .nn(sel_nn), .v2_inserts(sel_v2_inserts), .aborted(sel_aborted)
  );

  always_comb
    for (int k = 0; k < int'(K); k++)
      nn_cls[k] = sel_nn[k].cls;

  class_det #(.K(K), .NC(N_CLASS)) u_cd (
    .clk, .rst_n,
    .in_valid(sel_done), .nn_cls,
    .out_valid(cd_valid), .out_class(cd_class), .counts(cd_counts)
  );

  // controller
  assign dc_start  = (state == ST_IDLE) && query_done;
  assign sel_start = (state == ST_DIST) && dc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_IDLE;
      cycles         <= '0;
      res_valid      <= 1'b0;
      res_class      <= '0;
      res_nn         <= '0;
      res_counts     <= '0;
      res_cycles     <= '0;
      res_v2_inserts <= '0;
      res_aborted    <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (state != ST_IDLE) cycles <= cycles + 1'b1;
      unique case (state)
        ST_IDLE: if (query_done) begin
          state  <= ST_DIST;
          cycles <= 32'd1;
        end
        ST_DIST: if (dc_done)  state <= ST_SEL;
        ST_SEL:  if (sel_done) state <= ST_VOTE;
        ST_VOTE: if (cd_valid) begin
          state          <= ST_IDLE;
          res_valid      <= 1'b1;
          res_class      <= cd_class;
          res_nn         <= sel_nn;
          res_counts     <= cd_counts;
          res_cycles     <= cycles;
          res_v2_inserts <= sel_v2_inserts;
          res_aborted    <= sel_aborted;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // the selector may only start once every distance row has been written
  a_rows_written: assert property (@(posedge clk) disable iff (!rst_n)
    dc_done |-> (dc_intervals == (RW+1)'(ROWS)))
    else $error("knn_top: distance calculation ended with missing rows");

  // a fetch delivers exactly one complete training set
  a_fetch_fills: assert property (@(posedge clk) disable iff (!rst_n)
    bf_done |=> train_full)
    else $error("knn_top: training set incomplete after a fetch");

  // distance calculation and selection never overlap
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    !(dc_busy && sel_busy))
    else $error("knn_top: distance calculation and selector busy together");

endmodule
