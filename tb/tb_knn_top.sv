// tb_knn_top: end-to-end testbench for knn_top.
//
// Reduced size: 30 training samples (5 rows of 6), 16 features, K = 3,
// 6:4 split (V1 = 18 elements). The testbench builds a two-class data set
// (class means apart, random spread, one sample with huge features so its
// distance saturates), streams it in with random idle gaps, then sends a run
// of queries back to back. Each result is compared with the reference model
// in knn_ref_pkg: the class, the three neighbours with their distances and
// labels, the number of V2 insertions, the early-out flag and the latency.
// Every third query runs with early_out high. Halfway, train_clear loads a
// second data set over the word port; a quarter later a third set is placed
// in the AXI memory model and fetched in 16-beat bursts (burst count and
// AXI rules checked). The run fails unless each mechanism happened at least
// once: input stall while busy, V2 insertion, V2 element skipped, early-out
// stop, saturated distance, mode switch, training-set reload, burst fetch.
module tb_knn_top;
  import knn_pkg::*;
  import knn_ref_pkg::*;

  localparam int NT = 30, NF = 16, K = 3, UN = 6, UF = 4, SPLIT = 60;
  localparam int NQ = 24;
  localparam int WATCHDOG = 200000;
  localparam int S1 = SPLIT * NT / 100, RG = (NT / UN) * (NF / UF);
  localparam int IW = $clog2(NT + 1), CW = $clog2(K + 1);

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, s_query, train_clear, early_out, train_full, busy, res_valid;
  feat_t s_data;
  logic [CLS_W-1:0] res_class;
  dm_entry_t [K-1:0] res_nn;
  logic [N_CLASS-1:0][CW-1:0] res_counts;
  logic [31:0] res_cycles;
  logic [IW-1:0] res_v2_inserts;
  logic res_aborted;
  logic fetch_start, fetch_busy;
  logic [31:0] fetch_base;
  logic [15:0] fetch_bursts;
  logic [7:0] fetch_errors;
  logic m_axi_arvalid, m_axi_arready, m_axi_rvalid, m_axi_rready, m_axi_rlast;
  logic [31:0] m_axi_araddr, m_axi_rdata;
  logic [7:0] m_axi_arlen;
  logic [2:0] m_axi_arsize;
  logic [1:0] m_axi_arburst, m_axi_rresp;
  localparam int MEM_BASE_W = 1024;   // training set at byte address 0x1000

  knn_top #(.NT(NT), .NF(NF), .K(K), .UN(UN), .UF(UF), .SPLIT(SPLIT)) dut (.*);

  axi_mem_model #(.DEPTH(MEM_BASE_W + NT * (NF + 1))) ddr (
    .clk, .rst_n, .arvalid(m_axi_arvalid), .arready(m_axi_arready), .araddr(m_axi_araddr),
    .arlen(m_axi_arlen), .arsize(m_axi_arsize), .arburst(m_axi_arburst),
    .rvalid(m_axi_rvalid), .rready(m_axi_rready), .rdata(m_axi_rdata),
    .rresp(m_axi_rresp), .rlast(m_axi_rlast));

  always #5 clk = ~clk;

  typedef struct {
    logic [CLS_W-1:0] cls;
    dm_entry_t nn [];
    int v2ins, stop;
    bit early;
  } exp_t;

  exp_t exp_q[$];
  sample_t train [];
  logic [CLS_W-1:0] tcls [];
  int checks = 0, failures = 0, results = 0, correct_label = 0;
  int n_stall = 0, n_v2_ins = 0, n_v2_skip = 0, n_abort = 0, n_sat = 0, n_switch = 0, n_reload = 0, n_fetch = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("tb_knn_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && s_valid && !s_ready) n_stall++;

  // result checker
  always @(posedge clk) if (rst_n && res_valid) begin
    exp_t e;
    int exp_cycles;
    e = exp_q.pop_front();
    results++;
    exp_cycles = (e.stop >= 0) ? RG + e.stop + 7 : RG + NT + 6;
    checks += 4 + K;
    if (res_class !== e.cls) begin failures++; $display("query %0d: class %0d exp %0d", results, res_class, e.cls); end
    for (int p = 0; p < K; p++)
      if (res_nn[p] !== e.nn[p]) begin failures++; $display("query %0d: nn[%0d] %h exp %h", results, p, res_nn[p], e.nn[p]); end
    if (int'(res_v2_inserts) != e.v2ins) begin failures++; $display("query %0d: v2 inserts %0d exp %0d", results, res_v2_inserts, e.v2ins); end
    if (res_aborted !== (e.stop >= 0)) begin failures++; $display("query %0d: aborted %b", results, res_aborted); end
    if (int'(res_cycles) != exp_cycles) begin failures++; $display("query %0d: %0d clocks exp %0d", results, res_cycles, exp_cycles); end
  end

  task automatic send(feat_t d, logic q);
    if ($urandom_range(0, 4) == 0) begin s_valid = 0; @(posedge clk); #1; end
    s_valid = 1; s_data = d; s_query = q;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    #1;
    s_valid = 0;
  endtask

  function automatic feat_t class_feat(int c, int f);
    // class 0 centred at +0.25 on even taxels, class 1 at +0.25 on odd ones
    int base;
    base = ((f % 2) == c) ? (1 << (FRAC - 2)) : 0;
    return feat_t'(base + int'(rand_feat(FRAC - 1)));
  endfunction

  task automatic make_set();
    train = new[NT];
    tcls  = new[NT];
    for (int s = 0; s < NT; s++) begin
      tcls[s]  = CLS_W'($urandom_range(0, 1));
      train[s] = new[NF];
      for (int f = 0; f < NF; f++) train[s][f] = (s == 7) ? feat_t'(24'h7fffff) : class_feat(int'(tcls[s]), f);
    end
  endtask

  // training set over the word port
  task automatic load_set();
    make_set();
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) send(train[s][f], 1'b0);
      send(feat_t'(tcls[s]), 1'b0);
    end
  endtask

  // training set placed in external memory and fetched in bursts
  task automatic fetch_set();
    int exp_bursts;
    make_set();
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) ddr.mem[MEM_BASE_W + s * (NF + 1) + f] = {8'h00, train[s][f]};
      ddr.mem[MEM_BASE_W + s * (NF + 1) + NF] = 32'(tcls[s]);
    end
    fetch_base = 32'(MEM_BASE_W * 4);
    fetch_start = 1; @(posedge clk); #1; fetch_start = 0;
    wait (train_full && !fetch_busy);
    @(posedge clk); #1;
    exp_bursts = (NT * (NF + 1) + 15) / 16;
    checks += 3;
    if (int'(fetch_bursts) != exp_bursts) begin failures++; $display("fetch: %0d bursts exp %0d", fetch_bursts, exp_bursts); end
    if (fetch_errors != 0 || ddr.protocol_errors != 0) begin failures++; $display("fetch: AXI errors"); end
    if (!train_full) begin failures++; $display("fetch: set incomplete"); end
    n_fetch++;
  endtask

  task automatic run_queries(int first, int count);
    for (int n = first; n < first + count; n++) begin
      feat_t q [];
      exp_t e;
      int truth, sat;
      bit mode;
      truth = $urandom_range(0, 1);
      q = new[NF];
      for (int f = 0; f < NF; f++) q[f] = class_feat(truth, f);
      mode = (n % 3 == 2);
      send(q[0], 1'b1);             // accepted only once the previous query is done
      if (mode != early_out) n_switch++;
      early_out = mode;
      for (int f = 1; f < NF; f++) send(q[f], 1'b1);
      ref_knn(train, tcls, q, K, S1, mode, e.nn, e.v2ins, e.stop, e.cls, sat);
      e.early = mode;
      exp_q.push_back(e);
      n_sat += sat;
      n_abort += (e.stop >= 0);
      n_v2_ins += e.v2ins;
      if (!mode) n_v2_skip += (NT - S1) - e.v2ins;
      if (int'(e.cls) == truth) correct_label++;
    end
  endtask

  initial begin
    s_valid = 0; s_data = '0; s_query = 0; train_clear = 0; early_out = 0;
    fetch_start = 0; fetch_base = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    load_set();
    run_queries(0, NQ / 2);
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    train_clear = 1; @(posedge clk); #1; train_clear = 0;
    n_reload++;
    load_set();
    run_queries(NQ / 2, NQ / 4);
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    fetch_set();
    run_queries(NQ / 2 + NQ / 4, NQ / 4);
    wait (exp_q.size() == 0);
    repeat (3) @(posedge clk); #1;
    checks++;
    if (results != NQ) begin failures++; $display("tb_knn_top: %0d results for %0d queries", results, NQ); end
    $display("mechanisms: stalls %0d, V2 inserts %0d, V2 skips %0d, early-out stops %0d, saturated distances %0d, mode switches %0d, reloads %0d, burst fetches %0d",
             n_stall, n_v2_ins, n_v2_skip, n_abort, n_sat, n_switch, n_reload, n_fetch);
    $display("label agreement with the generating class: %0d of %0d", correct_label, NQ);
    checks++;
    if (n_stall == 0 || n_v2_ins == 0 || n_v2_skip == 0 || n_abort == 0 || n_sat == 0 || n_switch == 0 || n_reload == 0 || n_fetch == 0) begin
      failures++; $display("tb_knn_top: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
