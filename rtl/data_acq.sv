// data_acq: data-acquisition block of the kNN classifier.
//
// Accepts a word stream (valid/ready) and sorts it into the training-set
// buffer and the query register. A training sample is N_FEAT feature words
// followed by one word whose low CLS_W bits are its class label; samples
// arrive in order 0 .. N_TRAIN-1, typically as bursts fetched from external
// memory. Words marked s_query belong to the sample to be classified: N_FEAT
// feature words, after which query_done pulses for one clock and the
// classifier starts.
//
// Flow control: training words are accepted only while the set is not yet
// complete (train_full low); query words only once it is complete and while
// the classifier is not busy (hold low) and not in the clock of query_done
// (before the controller has raised hold), so the query register never
// changes under a running classification. train_clear empties the set so a new one
// can be loaded. Every accepted word is written in the same clock.
//
// That the classifier starts once the samples have been received follows the
// design; the word format, the ordering and the flow-control rules are this
// implementation's choices.
module data_acq
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
  localparam int unsigned SW = (UF     > 1) ? $clog2(UF)     : 1,
  localparam int unsigned FW = $clog2(NF + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input word stream
  input  logic                 s_valid,
  output logic                 s_ready,
  input  feat_t                s_data,
  input  logic                 s_query,
  // control
  input  logic                 train_clear,
  input  logic                 hold,
  output logic                 train_full,
  output logic                 query_done,
  output feat_t [NF-1:0]       query,
  // training-buffer write port
  output logic                 tm_we,
  output logic [RW-1:0]        tm_row,
  output logic [GW-1:0]        tm_grp,
  output logic [LW-1:0]        tm_lane,
  output logic [SW-1:0]        tm_slot,
  output feat_t                tm_data,
  output logic                 tm_cls_we,
  output logic [CLS_W-1:0]     tm_cls
);

  logic [FW-1:0] feat_cnt;   // word index inside the current training sample
  logic [FW-1:0] q_cnt;      // word index inside the query sample
  logic          take;

  assign s_ready = s_query ? (train_full && !hold && !query_done)
                           : (!train_full && !train_clear);
  assign take    = s_valid && s_ready;

  // The write port carries the current position; the buffer samples it when
  // tm_we / tm_cls_we is high.
  assign tm_we     = take && !s_query && (feat_cnt != FW'(NF));
  assign tm_cls_we = take && !s_query && (feat_cnt == FW'(NF));
  assign tm_data   = s_data;
  assign tm_cls    = s_data[CLS_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_cnt   <= '0;
      q_cnt      <= '0;
      tm_row     <= '0;
      tm_grp     <= '0;
      tm_lane    <= '0;
      tm_slot    <= '0;
      train_full <= 1'b0;
      query_done <= 1'b0;
      query      <= '0;
    end else begin
      query_done <= 1'b0;
      if (train_clear) begin
        feat_cnt   <= '0;
        tm_row     <= '0;
        tm_grp     <= '0;
        tm_lane    <= '0;
        tm_slot    <= '0;
        train_full <= 1'b0;
      end else if (take && !s_query) begin
        if (feat_cnt == FW'(NF)) begin
          // class word: sample complete, move to the next lane / row
          feat_cnt <= '0;
          tm_grp   <= '0;
          tm_slot  <= '0;
          if (tm_lane == LW'(UN - 1)) begin
            tm_lane <= '0;
            if (tm_row == RW'(ROWS - 1)) begin
              tm_row     <= '0;
              train_full <= 1'b1;
            end else begin
              tm_row <= tm_row + 1'b1;
            end
          end else begin
            tm_lane <= tm_lane + 1'b1;
          end
        end else begin
          feat_cnt <= feat_cnt + 1'b1;
          if (tm_slot == SW'(UF - 1)) begin
            tm_slot <= '0;
            tm_grp  <= tm_grp + 1'b1;
          end else begin
            tm_slot <= tm_slot + 1'b1;
          end
        end
      end
      if (take && s_query) begin
        query[q_cnt] <= s_data;
        if (q_cnt == FW'(NF - 1)) begin
          q_cnt      <= '0;
          query_done <= 1'b1;
        end else begin
          q_cnt <= q_cnt + 1'b1;
        end
      end
    end
  end

  // A source must keep a word offered until it is taken.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (s_valid && !s_ready) |=> s_valid)
    else $error("data_acq: s_valid dropped before the word was accepted");

endmodule
