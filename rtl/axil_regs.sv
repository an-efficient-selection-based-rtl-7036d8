// axil_regs: AXI4-Lite register interface of the kNN classifier.
//
// Gives a processor one memory-mapped port for both directions: writing
// samples into the data-acquisition block and reading the classification
// result. Register map (32-bit registers, byte offsets):
//   0x00  W  TRAIN_DATA  push one training word (feature in bits 23:0, or
//                        the label in bit 0 after every 16 features)
//   0x04  W  QUERY_DATA  push one query feature (bits 23:0)
//   0x08  RW CTRL        bit 0 train_clear (pulse), bit 1 early_out (level),
//                        bit 2 fetch_start (pulse)
//   0x0C  RW FETCH_BASE  byte address of the packed training set in memory
//   0x10  R  STATUS      bit 0 result ready, bit 1 busy, bit 2 train_full,
//                        bit 3 fetch_busy, bit 4 word pending
//   0x14  R  RESULT      bits CLS_W-1:0 class, bit 8 early-out stop,
//                        bits 31:16 V2 insertions; reading it clears
//                        "result ready"
//   0x18  R  CYCLES      latency of the last classification in clocks
//   0x1C  R  FETCH_INFO  bits 15:0 bursts of the last fetch, 23:16 errors
//   0x20  R  VOTES       votes for class c in bits 8c+7:8c
//   0x40 + 4p  R  NN[p]  neighbour p (0 = nearest): distance in bits 23:0,
//                        class in bits 31:24
// Writes to TRAIN_DATA/QUERY_DATA go into a one-word holding register that
// is offered to the word stream; while it is still full (the classifier is
// busy), a further data write is held off by keeping awready/wready low, so
// no word is ever lost. Unmapped addresses read as zero and ignore writes.
// Every response is OKAY. Write strobes select the bytes of FETCH_BASE
// and gate CTRL (byte 0); data words are always taken whole.
//
// Timing: a write is accepted in the clock both awvalid and wvalid are
// high (if allowed) and answered on B one clock later; a read answers one
// clock after arready.
//
// One AXI port that both feeds data acquisition and returns the class
// follows the design; the register map and the holding register are this
// implementation's.
module axil_regs
  import knn_pkg::*;
#(
  parameter int unsigned K  = K_NN,
  parameter int unsigned NT = N_TRAIN,
  localparam int unsigned IW = $clog2(NT + 1),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [7:0]          s_axi_awaddr,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  output logic [1:0]          s_axi_bresp,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  input  logic [7:0]          s_axi_araddr,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  // towards the classifier core
  output logic                s_valid,
  input  logic                s_ready,
  output feat_t               s_data,
  output logic                s_query,
  output logic                train_clear,
  output logic                early_out,
  output logic                fetch_start,
  output logic [31:0]         fetch_base,
  input  logic                busy,
  input  logic                train_full,
  input  logic                fetch_busy,
  input  logic [15:0]         fetch_bursts,
  input  logic [7:0]          fetch_errors,
  input  logic                res_valid,
  input  logic [CLS_W-1:0]    res_class,
  input  dm_entry_t [K-1:0]   res_nn,
  input  logic [31:0]         res_cycles,
  input  logic [N_CLASS-1:0][CW-1:0] res_counts,
  input  logic [IW-1:0]       res_v2_inserts,
  input  logic                res_aborted,
  output logic                irq           // high while a result is unread
);

  localparam logic [7:0] A_TRAIN = 8'h00, A_QUERY = 8'h04, A_CTRL = 8'h08,
                         A_BASE  = 8'h0C, A_STAT  = 8'h10, A_RES  = 8'h14,
                         A_CYC   = 8'h18, A_FINFO = 8'h1C, A_VOTE = 8'h20,
                         A_NN    = 8'h40;

  logic               res_ready;
  logic [CLS_W-1:0]   r_class;
  logic               r_aborted;
  logic [IW-1:0]      r_v2;
  logic [31:0]        r_cycles;
  dm_entry_t [K-1:0]  r_nn;
  logic [N_CLASS-1:0][CW-1:0] r_counts;
  logic               wr_data, wr_ok, wr_fire, rd_fire;
  logic [31:0]        rd_val;

  assign wr_data       = (s_axi_awaddr == A_TRAIN) || (s_axi_awaddr == A_QUERY);
  assign wr_ok         = !s_axi_bvalid && !(wr_data && s_valid);
  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && wr_ok;
  assign s_axi_wready  = s_axi_awready;
  assign wr_fire       = s_axi_awready;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_fire       = s_axi_arvalid && s_axi_arready;
  assign s_axi_rresp   = 2'b00;
  assign irq           = res_ready;

  always_comb begin
    rd_val = '0;
    unique case (s_axi_araddr)
      A_CTRL:  rd_val = {30'd0, early_out, 1'b0};
      A_BASE:  rd_val = fetch_base;
      A_STAT:  rd_val = {27'd0, s_valid, fetch_busy, train_full, busy, res_ready};
      A_RES:   rd_val = {16'(r_v2), 7'd0, r_aborted, 8'(r_class)};
      A_CYC:   rd_val = r_cycles;
      A_FINFO: rd_val = {8'd0, fetch_errors, fetch_bursts};
      default: ;
    endcase
    if (s_axi_araddr == A_VOTE)
      for (int c = 0; c < int'(N_CLASS) && c < 4; c++)
        rd_val[8*c +: 8] = 8'(r_counts[c]);
    for (int p = 0; p < int'(K); p++)
      if (s_axi_araddr == A_NN + 8'(4 * p))
        rd_val = {8'(r_nn[p].cls), r_nn[p].distance};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_valid      <= 1'b0;
      s_data       <= '0;
      s_query      <= 1'b0;
      train_clear  <= 1'b0;
      early_out    <= 1'b0;
      fetch_start  <= 1'b0;
      fetch_base   <= '0;
      res_ready    <= 1'b0;
      r_class      <= '0;
      r_aborted    <= 1'b0;
      r_v2         <= '0;
      r_cycles     <= '0;
      r_nn         <= '0;
      r_counts     <= '0;
    end else begin
      train_clear <= 1'b0;
      fetch_start <= 1'b0;
      if (s_valid && s_ready) s_valid <= 1'b0;
      // write channel
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        unique case (s_axi_awaddr)
          A_TRAIN, A_QUERY: begin
            s_valid <= 1'b1;
            s_data  <= feat_t'(s_axi_wdata[W-1:0]);
            s_query <= (s_axi_awaddr == A_QUERY);
          end
          A_CTRL: if (s_axi_wstrb[0]) begin
            train_clear <= s_axi_wdata[0];
            early_out   <= s_axi_wdata[1];
            fetch_start <= s_axi_wdata[2];
          end
          A_BASE:
            for (int b = 0; b < 4; b++)
              if (s_axi_wstrb[b]) fetch_base[8*b +: 8] <= s_axi_wdata[8*b +: 8];
          default: ;
        endcase
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      // read channel
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= rd_val;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
      // result capture; reading RESULT acknowledges it
      if (res_valid) begin
        res_ready <= 1'b1;
        r_class   <= res_class;
        r_aborted <= res_aborted;
        r_v2      <= res_v2_inserts;
        r_cycles  <= res_cycles;
        r_nn      <= res_nn;
        r_counts  <= res_counts;
      end else if (rd_fire && s_axi_araddr == A_RES) begin
        res_ready <= 1'b0;
      end
    end
  end

  // AXI: a response, once offered, stays until taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid)
    else $error("axil_regs: write response withdrawn");
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata)))
    else $error("axil_regs: read data changed before it was taken");

endmodule
