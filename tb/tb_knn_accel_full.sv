// tb_knn_accel_full: end-to-end testbench for knn_accel at its default size.
//
// The touch-modality configuration: 672 training samples of 16 features,
// K = 3, two classes, 6:4 split, 6 x 4 unrolling. Same sequence as
// tb_knn_accel: register checks, training set 1 written word by word
// (672 x 17 AXI4-Lite writes), queries written back to back with the
// previous result read while the next is classified, every third with
// early_out, then training set 2 fetched from the AXI memory model in 714
// bursts of 16 beats and more queries. Every result is compared with the
// reference model, including the latency of 1126 clocks for a full scan.
module tb_knn_accel_full;
  import knn_pkg::*;
  import knn_ref_pkg::*;

  localparam int NT = N_TRAIN, NF = N_FEAT, K = K_NN, UN = UNROLL_N, UF = UNROLL_F, SPLIT = SPLIT_PCT;
  localparam int NQ = 8;
  localparam int WATCHDOG = 600000;
  localparam int S1 = SPLIT * NT / 100, RG = (NT / UN) * (NF / UF);
  localparam int MEM_BASE_W = 1024;   // fetched set at byte address 0x1000

  localparam logic [7:0] A_TRAIN = 8'h00, A_QUERY = 8'h04, A_CTRL = 8'h08,
                         A_BASE  = 8'h0C, A_STAT  = 8'h10, A_RES  = 8'h14,
                         A_CYC   = 8'h18, A_FINFO = 8'h1C, A_VOTE = 8'h20,
                         A_NN    = 8'h40;

  logic clk = 0, rst_n = 0;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [7:0] s_axi_awaddr, s_axi_araddr;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic m_axi_arvalid, m_axi_arready, m_axi_rvalid, m_axi_rready, m_axi_rlast;
  logic [31:0] m_axi_araddr, m_axi_rdata;
  logic [7:0] m_axi_arlen;
  logic [2:0] m_axi_arsize;
  logic [1:0] m_axi_arburst, m_axi_rresp;
  logic irq;

  knn_accel dut (.*);

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
    int votes [N_CLASS];
  } exp_t;

  sample_t train [];
  logic [CLS_W-1:0] tcls [];
  int checks = 0, failures = 0, results = 0;
  int n_wstall = 0, n_v2_ins = 0, n_abort = 0, n_sat = 0, n_switch = 0, n_fetch = 0, n_wload = 0, n_irq = 0;
  bit mode_now = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("tb_knn_accel_full: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write held off (both channels valid, no ready)
  always @(posedge clk) if (rst_n && s_axi_awvalid && s_axi_wvalid && !s_axi_awready) n_wstall++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("tb_knn_accel_full: %s", msg); end
  endtask

  // AXI4-Lite master: address first, data 0..2 clocks later
  task automatic axi_write(logic [7:0] addr, logic [31:0] data, logic [3:0] strb = 4'hF);
    s_axi_awvalid = 1; s_axi_awaddr = addr;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    s_axi_wvalid = 1; s_axi_wdata = data; s_axi_wstrb = strb;
    @(posedge clk);
    while (!s_axi_awready) @(posedge clk);
    #1;
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    s_axi_bready = ($urandom_range(0, 2) != 0);
    while (!(s_axi_bvalid && s_axi_bready)) begin @(posedge clk); #1; s_axi_bready = 1; end
    if (s_axi_bresp != 2'b00) begin failures++; $display("write %h: bad response", addr); end
    @(posedge clk); #1;
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [7:0] addr, output logic [31:0] data);
    s_axi_arvalid = 1; s_axi_araddr = addr;
    @(posedge clk);
    while (!s_axi_arready) @(posedge clk);
    #1;
    s_axi_arvalid = 0;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
    s_axi_rready = 1;
    while (!s_axi_rvalid) begin @(posedge clk); #1; end
    data = s_axi_rdata;
    if (s_axi_rresp != 2'b00) begin failures++; $display("read %h: bad response", addr); end
    @(posedge clk); #1;
    s_axi_rready = 0;
  endtask

  function automatic feat_t class_feat(int c, int f);
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
      for (int f = 0; f < NF; f++) train[s][f] = (s == 5) ? feat_t'(24'h7fffff) : class_feat(int'(tcls[s]), f);
    end
  endtask

  task automatic write_set();
    make_set();
    axi_write(A_CTRL, {29'd0, 1'b0, mode_now, 1'b1});   // train_clear
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) axi_write(A_TRAIN, {8'h00, train[s][f]});
      axi_write(A_TRAIN, 32'(tcls[s]));
    end
    n_wload++;
  endtask

  task automatic fetch_set();
    logic [31:0] st, fi;
    make_set();
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) ddr.mem[MEM_BASE_W + s * (NF + 1) + f] = {8'h00, train[s][f]};
      ddr.mem[MEM_BASE_W + s * (NF + 1) + NF] = 32'(tcls[s]);
    end
    axi_write(A_BASE, 32'(MEM_BASE_W * 4));
    axi_write(A_CTRL, {29'd0, 1'b1, mode_now, 1'b0});   // fetch_start
    do axi_read(A_STAT, st); while (st[3] || !st[2]);
    axi_read(A_FINFO, fi);
    check(fi[15:0] == 16'((NT * (NF + 1) + 15) / 16), $sformatf("fetch: %0d bursts", fi[15:0]));
    check(fi[23:16] == 0 && ddr.protocol_errors == 0, "fetch: AXI errors");
    n_fetch++;
  endtask

  // read back and compare the result of one query
  task automatic check_result(exp_t e);
    logic [31:0] v;
    int exp_cycles;
    results++;
    while (!irq) begin @(posedge clk); #1; end
    n_irq++;
    axi_read(A_STAT, v);
    check(v[0] == 1'b1, $sformatf("result %0d: STATUS.ready low", results));
    axi_read(A_CYC, v);
    exp_cycles = (e.stop >= 0) ? RG + e.stop + 7 : RG + NT + 6;
    check(int'(v) == exp_cycles, $sformatf("result %0d: %0d clocks exp %0d", results, v, exp_cycles));
    axi_read(A_VOTE, v);
    for (int c = 0; c < N_CLASS; c++)
      check(int'(v[8*c +: 8]) == e.votes[c], $sformatf("result %0d: votes[%0d] %0d exp %0d", results, c, v[8*c +: 8], e.votes[c]));
    for (int p = 0; p < K; p++) begin
      axi_read(A_NN + 8'(4 * p), v);
      check(v[23:0] == e.nn[p].distance && v[31:24] == 8'(e.nn[p].cls),
            $sformatf("result %0d: nn[%0d] %h exp %h/%0d", results, p, v, e.nn[p].distance, e.nn[p].cls));
    end
    axi_read(A_RES, v);
    check(v[CLS_W-1:0] == e.cls, $sformatf("result %0d: class %0d exp %0d", results, v[CLS_W-1:0], e.cls));
    check(v[8] == (e.stop >= 0), $sformatf("result %0d: early-out flag %b", results, v[8]));
    check(int'(v[31:16]) == e.v2ins, $sformatf("result %0d: V2 inserts %0d exp %0d", results, v[31:16], e.v2ins));
    @(posedge clk); #1;
    check(!irq, $sformatf("result %0d: irq still high after RESULT read", results));
  endtask

  task automatic run_queries(int first, int count);
    exp_t prev;
    bit have_prev = 0;
    for (int n = first; n < first + count; n++) begin
      feat_t q [];
      exp_t e;
      int sat;
      bit mode;
      q = new[NF];
      for (int f = 0; f < NF; f++) q[f] = class_feat($urandom_range(0, 1), f);
      mode = (n % 3 == 2);
      // the second write waits until the previous query has finished
      axi_write(A_QUERY, {8'h00, q[0]});
      axi_write(A_QUERY, {8'h00, q[1]});
      if (mode != mode_now) n_switch++;
      mode_now = mode;
      axi_write(A_CTRL, {30'd0, mode, 1'b0});
      for (int f = 2; f < NF; f++) axi_write(A_QUERY, {8'h00, q[f]});
      ref_knn(train, tcls, q, K, S1, mode, e.nn, e.v2ins, e.stop, e.cls, sat);
      for (int c = 0; c < N_CLASS; c++) e.votes[c] = 0;
      for (int p = 0; p < K; p++) e.votes[e.nn[p].cls]++;
      n_sat += sat;
      n_abort += (e.stop >= 0);
      n_v2_ins += e.v2ins;
      // the previous result is read while this query is classified
      if (have_prev) check_result(prev);
      prev = e;
      have_prev = 1;
    end
    check_result(prev);
  endtask

  initial begin
    logic [31:0] v;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    s_axi_awaddr = '0; s_axi_araddr = '0; s_axi_wdata = '0; s_axi_wstrb = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    // register checks
    axi_read(A_STAT, v);
    check(v == 32'd0, $sformatf("STATUS after reset %h", v));
    axi_write(A_BASE, 32'hDEAD_BEEF);
    axi_write(A_BASE, 32'h0000_1234, 4'b0011);
    axi_read(A_BASE, v);
    check(v == 32'hDEAD_1234, $sformatf("FETCH_BASE byte strobes: %h", v));
    axi_read(8'h3C, v);
    check(v == 32'd0, "unmapped address not zero");
    // set 1 by register writes, set 2 fetched from memory
    write_set();
    axi_read(A_STAT, v);
    check(v[2] == 1'b1, "train_full not set after the training writes");
    run_queries(0, NQ / 2);
    fetch_set();
    run_queries(NQ / 2, NQ / 2);
    check(results == NQ, $sformatf("%0d results for %0d queries", results, NQ));
    $display("mechanisms: write stalls %0d, V2 inserts %0d, early-out stops %0d, saturated distances %0d, mode switches %0d, register loads %0d, burst fetches %0d, interrupts %0d",
             n_wstall, n_v2_ins, n_abort, n_sat, n_switch, n_wload, n_fetch, n_irq);
    check(n_wstall > 0 && n_v2_ins > 0 && n_abort > 0 && n_sat > 0 && n_switch > 0 && n_wload > 0 && n_fetch > 0 && n_irq == NQ,
          "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
