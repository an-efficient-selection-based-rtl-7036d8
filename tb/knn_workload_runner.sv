// knn_workload_runner: drives one knn_top instance through a workload, for
// the workload testbench.
//
// Generates a two-class training set of NT samples with NF_USED real
// features; features NF_USED .. NF-1 are zero in every sample and query, so
// a design built for more features runs a smaller feature set unchanged.
// Samples beyond NT_USED are padding: their features are at the largest
// code, so their distance saturates and the selector never picks them. The
// set is streamed in, NQ queries are classified back to back (the last one
// with early_out high), and every result is compared with knn_ref_pkg's
// model. 'finished' rises at the end; 'checks'/'failures' hold the tally.
module knn_workload_runner
  import knn_pkg::*;
  import knn_ref_pkg::*;
#(
  parameter string       NAME    = "workload",
  parameter int unsigned NT      = 24,
  parameter int unsigned NT_USED = 24,
  parameter int unsigned NF      = 16,
  parameter int unsigned NF_USED = 16,
  parameter int unsigned K       = 3,
  parameter int unsigned UN      = 6,
  parameter int unsigned UF      = 4,
  parameter int unsigned SPLIT   = 60,
  parameter int unsigned NQ      = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int S1 = SPLIT * NT / 100, RG = (NT / UN) * (NF / UF);
  localparam int IW = $clog2(NT + 1), CW = $clog2(K + 1);

  logic s_valid, s_ready, s_query, train_clear, early_out, train_full, busy, res_valid;
  feat_t s_data;
  logic [CLS_W-1:0] res_class;
  dm_entry_t [K-1:0] res_nn;
  logic [N_CLASS-1:0][CW-1:0] res_counts;
  logic [31:0] res_cycles;
  logic [IW-1:0] res_v2_inserts;
  logic res_aborted;
  logic fetch_busy, m_axi_arvalid, m_axi_rready;
  logic [15:0] fetch_bursts;
  logic [7:0] fetch_errors, m_axi_arlen;
  logic [31:0] m_axi_araddr;
  logic [2:0] m_axi_arsize;
  logic [1:0] m_axi_arburst;

  knn_top #(.NT(NT), .NF(NF), .K(K), .UN(UN), .UF(UF), .SPLIT(SPLIT)) dut (
    .clk, .rst_n, .s_valid, .s_ready, .s_data, .s_query, .train_clear, .early_out,
    .fetch_start(1'b0), .fetch_base('0), .fetch_busy, .fetch_bursts, .fetch_errors,
    .m_axi_arvalid, .m_axi_arready(1'b0), .m_axi_araddr, .m_axi_arlen, .m_axi_arsize,
    .m_axi_arburst, .m_axi_rvalid(1'b0), .m_axi_rready, .m_axi_rdata('0),
    .m_axi_rresp('0), .m_axi_rlast(1'b0),
    .train_full, .busy, .res_valid, .res_class, .res_nn, .res_counts, .res_cycles,
    .res_v2_inserts, .res_aborted);

  sample_t train [];
  logic [CLS_W-1:0] tcls [];

  task automatic send(feat_t d, logic q);
    s_valid = 1; s_data = d; s_query = q;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    #1;
    s_valid = 0;
  endtask

  function automatic feat_t gen_feat(int c, int f);
    if (f >= int'(NF_USED)) return '0;
    return feat_t'((((f % 2) == c) ? (1 << (FRAC - 2)) : 0) + int'(rand_feat(FRAC - 1)));
  endfunction

  initial begin
    finished = 0; checks = 0; failures = 0;
    s_valid = 0; s_data = '0; s_query = 0; train_clear = 0; early_out = 0;
    train = new[NT];
    tcls  = new[NT];
    for (int s = 0; s < int'(NT); s++) begin
      tcls[s]  = CLS_W'($urandom_range(0, 1));
      train[s] = new[NF];
      for (int f = 0; f < int'(NF); f++)
        train[s][f] = (s >= int'(NT_USED)) ? feat_t'(24'h7fffff) : gen_feat(int'(tcls[s]), f);
    end
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int s = 0; s < int'(NT); s++) begin
      for (int f = 0; f < int'(NF); f++) send(train[s][f], 1'b0);
      send(feat_t'(tcls[s]), 1'b0);
    end
    for (int n = 0; n < int'(NQ); n++) begin
      feat_t q [];
      dm_entry_t enn [];
      int v2ins, stop, sat, truth, exp_cycles;
      logic [CLS_W-1:0] ecls;
      bit mode;
      truth = $urandom_range(0, 1);
      mode  = (n == int'(NQ) - 1);
      q = new[NF];
      foreach (q[f]) q[f] = gen_feat(truth, f);
      early_out = mode;
      foreach (q[f]) send(q[f], 1'b1);
      ref_knn(train, tcls, q, K, S1, mode, enn, v2ins, stop, ecls, sat);
      while (!res_valid) @(posedge clk);
      #1;
      exp_cycles = (stop >= 0) ? RG + stop + 7 : RG + NT + 6;
      checks += 4 + K;
      if (res_class !== ecls) begin failures++; $display("%s query %0d: class %0d exp %0d", NAME, n, res_class, ecls); end
      for (int p = 0; p < int'(K); p++)
        if (res_nn[p] !== enn[p]) begin failures++; $display("%s query %0d: nn[%0d] %h exp %h", NAME, n, p, res_nn[p], enn[p]); end
      if (int'(res_v2_inserts) != v2ins) begin failures++; $display("%s query %0d: v2 inserts %0d exp %0d", NAME, n, res_v2_inserts, v2ins); end
      if (res_aborted !== (stop >= 0)) begin failures++; $display("%s query %0d: aborted flag wrong", NAME, n); end
      if (int'(res_cycles) != exp_cycles) begin failures++; $display("%s query %0d: %0d clocks exp %0d", NAME, n, res_cycles, exp_cycles); end
      $display("%s query %0d: class %0d (generated from %0d), %0d clocks, %0d V2 inserts%s",
               NAME, n, res_class, truth, res_cycles, res_v2_inserts, mode ? ", early-out" : "");
    end
    finished = 1;
  end
endmodule
