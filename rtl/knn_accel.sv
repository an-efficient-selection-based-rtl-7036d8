// knn_accel: the kNN classifier as a memory-mapped accelerator.
//
// Top level of the design. It joins the classifier core (knn_top) with an
// AXI4-Lite register port (axil_regs), so a processor writes query and
// training words and reads back the class and neighbours through one port,
// and keeps the AXI4 read master of the core for fetching the training set
// from external memory in 16-beat bursts.
//
// Interface: clk, active-low asynchronous reset rst_n; the AXI4-Lite slave
// s_axi_* (8-bit address, register map in axil_regs); the AXI4 read master
// m_axi_* (32-bit address and data, INCR bursts, one burst outstanding);
// irq, high from the end of a classification until the RESULT register is
// read.
//
// Typical use: write FETCH_BASE and CTRL.fetch_start (or CTRL.train_clear
// followed by the training words to TRAIN_DATA); wait for STATUS.train_full;
// then, per query, write the 16 features to QUERY_DATA, wait for irq or
// STATUS bit 0, and read RESULT, VOTES and NN[]. Writes are held off while
// the core is busy, so a new query may be written straight after the last
// one without polling.
//
// Timing: as knn_top, plus one clock from the AXI write of the last query
// word to the core, and one clock from the core's result to irq. With the
// defaults a classification takes 1126 clocks after the last query word.
//
// A single AXI port for data acquisition and the class result, and a burst
// read master for the training set, follow the design; the register map is
// this implementation's.
module knn_accel
  import knn_pkg::*;
#(
  parameter int unsigned NT    = N_TRAIN,
  parameter int unsigned NF    = N_FEAT,
  parameter int unsigned K     = K_NN,
  parameter int unsigned UN    = UNROLL_N,
  parameter int unsigned UF    = UNROLL_F,
  parameter int unsigned SPLIT = SPLIT_PCT,
  localparam int unsigned IW = $clog2(NT + 1),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  // AXI4-Lite register port
  input  logic         s_axi_awvalid,
  output logic         s_axi_awready,
  input  logic [7:0]   s_axi_awaddr,
  input  logic         s_axi_wvalid,
  output logic         s_axi_wready,
  input  logic [31:0]  s_axi_wdata,
  input  logic [3:0]   s_axi_wstrb,
  output logic         s_axi_bvalid,
  input  logic         s_axi_bready,
  output logic [1:0]   s_axi_bresp,
  input  logic         s_axi_arvalid,
  output logic         s_axi_arready,
  input  logic [7:0]   s_axi_araddr,
  output logic         s_axi_rvalid,
  input  logic         s_axi_rready,
  output logic [31:0]  s_axi_rdata,
  output logic [1:0]   s_axi_rresp,
  // AXI4 read master for the training set
  output logic         m_axi_arvalid,
  input  logic         m_axi_arready,
  output logic [31:0]  m_axi_araddr,
  output logic [7:0]   m_axi_arlen,
  output logic [2:0]   m_axi_arsize,
  output logic [1:0]   m_axi_arburst,
  input  logic         m_axi_rvalid,
  output logic         m_axi_rready,
  input  logic [31:0]  m_axi_rdata,
  input  logic [1:0]   m_axi_rresp,
  input  logic         m_axi_rlast,
  // result interrupt
  output logic         irq
);

  logic                       s_valid, s_ready, s_query, train_clear, early_out;
  feat_t                      s_data;
  logic                       fetch_start, fetch_busy;
  logic [31:0]                fetch_base;
  logic [15:0]                fetch_bursts;
  logic [7:0]                 fetch_errors;
  logic                       train_full, busy, res_valid, res_aborted;
  logic [CLS_W-1:0]           res_class;
  dm_entry_t [K-1:0]          res_nn;
  logic [N_CLASS-1:0][CW-1:0] res_counts;
  logic [31:0]                res_cycles;
  logic [IW-1:0]              res_v2_inserts;

  axil_regs #(.K(K), .NT(NT)) u_regs (
    .clk, .rst_n,
    .s_axi_awvalid, .s_axi_awready, .s_axi_awaddr, .s_axi_wvalid, .s_axi_wready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_bvalid, .s_axi_bready, .s_axi_bresp,
    .s_axi_arvalid, .s_axi_arready, .s_axi_araddr, .s_axi_rvalid, .s_axi_rready,
    .s_axi_rdata, .s_axi_rresp,
    .s_valid, .s_ready, .s_data, .s_query, .train_clear, .early_out,
    .fetch_start, .fetch_base, .busy, .train_full, .fetch_busy, .fetch_bursts,
    .fetch_errors, .res_valid, .res_class, .res_nn, .res_cycles, .res_counts,
    .res_v2_inserts, .res_aborted, .irq);

  knn_top #(.NT(NT), .NF(NF), .K(K), .UN(UN), .UF(UF), .SPLIT(SPLIT)) u_core (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data, .s_query, .train_clear, .early_out,
    .fetch_start, .fetch_base, .fetch_busy, .fetch_bursts, .fetch_errors,
    .m_axi_arvalid, .m_axi_arready, .m_axi_araddr, .m_axi_arlen, .m_axi_arsize,
    .m_axi_arburst, .m_axi_rvalid, .m_axi_rready, .m_axi_rdata, .m_axi_rresp,
    .m_axi_rlast,
    .train_full, .busy, .res_valid, .res_class, .res_nn, .res_counts,
    .res_cycles, .res_v2_inserts, .res_aborted);

endmodule
