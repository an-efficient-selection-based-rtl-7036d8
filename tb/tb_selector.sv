// tb_selector: self-checking testbench for selector.
//
// Two selectors (exact scan, early_out low, and early-out scan, early_out high) read a
// 60-element Distance/Modality array modelled in the testbench (6 lanes per
// row, one-clock read latency). S1 = 36 elements form V1. For each vector
// the testbench computes the expected K = 3 nearest neighbours with its own
// insertion model (ties keep the lower index) and checks distances, classes,
// the number of V2 insertions, the abort flag and the cycle count (done
// after edge S + 1, or i + 2 when cut at element i). Vectors: random with
// many ties, ascending (no V2 insertion, abort at the first V2 element),
// descending, and vectors whose minima sit in V2.
module tb_selector;
  import knn_pkg::*;

  localparam int NT = 60, UN = 6, K = 3, SPLIT = 60, S1 = SPLIT * NT / 100;
  localparam int ROWS = NT / UN;

  logic clk = 0, rst_n = 0;
  logic start;
  logic busy0, done0, rd_en0, busy1, done1, rd_en1;
  logic [3:0] rd_row0, rd_row1;
  dm_entry_t [UN-1:0] rd_data0, rd_data1;
  dm_entry_t [K-1:0]  nn0, nn1;
  logic [5:0] v2_0, v2_1;
  logic ab0, ab1;
  dm_entry_t vec [NT];
  int checks = 0, failures = 0;
  int n_v2_ins = 0, n_v2_skip = 0, n_abort = 0;

  selector #(.NT(NT), .UN(UN), .K(K), .SPLIT(SPLIT)) dut0 (
    .clk, .rst_n, .start, .early_out(1'b0), .busy(busy0), .done(done0), .rd_en(rd_en0), .rd_row(rd_row0),
    .rd_data(rd_data0), .nn(nn0), .v2_inserts(v2_0), .aborted(ab0));
  selector #(.NT(NT), .UN(UN), .K(K), .SPLIT(SPLIT)) dut1 (
    .clk, .rst_n, .start, .early_out(1'b1), .busy(busy1), .done(done1), .rd_en(rd_en1), .rd_row(rd_row1),
    .rd_data(rd_data1), .nn(nn1), .v2_inserts(v2_1), .aborted(ab1));

  always #5 clk = ~clk;

  // array model: synchronous read
  always @(posedge clk) begin
    if (rd_en0) for (int l = 0; l < UN; l++) rd_data0[l] <= vec[rd_row0 * UN + l];
    if (rd_en1) for (int l = 0; l < UN; l++) rd_data1[l] <= vec[rd_row1 * UN + l];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: returns registers, V2 insertions, stop index (-1 if none)
  task automatic ref_select(input bit abort_mode, output dm_entry_t r [K],
                            output int v2ins, output int stop);
    for (int p = 0; p < K; p++) r[p] = '{distance: DIST_MAX, cls: '0};
    v2ins = 0; stop = -1;
    for (int i = 0; i < NT; i++) begin
      int pos;
      pos = K;
      for (int p = K - 1; p >= 0; p--) if (vec[i].distance < r[p].distance) pos = p;
      if (i >= S1 && pos == K) begin
        if (abort_mode) begin stop = i; break; end
        continue;
      end
      if (pos < K) begin
        for (int p = K - 1; p > pos; p--) r[p] = r[p-1];
        r[pos] = vec[i];
        if (i >= S1) v2ins++;
      end
    end
  endtask

  task automatic run_one(string name);
    dm_entry_t e0 [K], e1 [K];
    int v2e0, v2e1, st0, st1, c, t0, t1;
    ref_select(1'b0, e0, v2e0, st0);
    ref_select(1'b1, e1, v2e1, st1);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    c = 0; t0 = -1; t1 = -1;
    while (t0 < 0 || t1 < 0) begin
      @(posedge clk); #1;
      c++;
      if (done0 && t0 < 0) t0 = c;
      if (done1 && t1 < 0) t1 = c;
    end
    for (int p = 0; p < K; p++) begin
      checks += 2;
      if (nn0[p] !== e0[p]) begin failures++; $display("%s exact: nn[%0d] got %h exp %h", name, p, nn0[p], e0[p]); end
      if (nn1[p] !== e1[p]) begin failures++; $display("%s abort: nn[%0d] got %h exp %h", name, p, nn1[p], e1[p]); end
    end
    checks += 6;
    if (int'(v2_0) != v2e0) begin failures++; $display("%s: v2 inserts %0d exp %0d", name, v2_0, v2e0); end
    if (int'(v2_1) != v2e1) begin failures++; $display("%s: abort v2 inserts %0d exp %0d", name, v2_1, v2e1); end
    if (ab0 !== 1'b0 || ab1 !== (st1 >= 0)) begin failures++; $display("%s: abort flags %b %b", name, ab0, ab1); end
    if (t0 != NT + 1) begin failures++; $display("%s: exact took %0d clocks, exp %0d", name, t0, NT + 1); end
    if (t1 != ((st1 >= 0) ? st1 + 2 : NT + 1)) begin failures++; $display("%s: abort took %0d clocks", name, t1); end
    if (busy0 || busy1) begin failures++; $display("%s: busy after done", name); end
    n_v2_ins  += v2e0;
    n_v2_skip += (NT - S1) - v2e0;
    n_abort   += (st1 >= 0);
    repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    start = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < NT; i++) vec[i] = '{distance: dist_t'($urandom_range(0, 40)), cls: CLS_W'($urandom)};
      run_one("random");
    end
    for (int i = 0; i < NT; i++) vec[i] = '{distance: dist_t'(i * 3), cls: CLS_W'(i)};
    run_one("ascending");
    for (int i = 0; i < NT; i++) vec[i] = '{distance: dist_t'(1000 - i * 3), cls: CLS_W'(i)};
    run_one("descending");
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < NT; i++) vec[i] = '{distance: dist_t'($urandom_range(100, 10000)), cls: CLS_W'($urandom)};
      for (int m = 0; m < K; m++) vec[$urandom_range(S1, NT - 1)] = '{distance: dist_t'($urandom_range(0, 99)), cls: CLS_W'($urandom)};
      vec[NT - 1].distance = DIST_MAX;
      run_one("minima_in_v2");
    end
    checks++;
    if (n_v2_ins == 0 || n_v2_skip == 0 || n_abort == 0) begin
      failures++; $display("selector: mechanism not exercised (ins %0d skip %0d abort %0d)", n_v2_ins, n_v2_skip, n_abort);
    end
    $display("selector: V2 inserts %0d, V2 skips %0d, aborts %0d", n_v2_ins, n_v2_skip, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
