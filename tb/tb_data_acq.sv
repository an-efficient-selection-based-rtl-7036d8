// tb_data_acq: self-checking testbench for data_acq.
//
// Small configuration: 12 samples, 8 features, 3 lanes, 4 features per
// word. The testbench streams a training set with random idle gaps and
// records every write the block makes to the training buffer, then checks
// that each feature and class label landed at its (row, group, lane, slot)
// position. It also checks the flow-control rules: query words are refused
// q0 the set is complete, training words are refused once it is, query
// words are refused while hold is high (s_ready is checked with no word
// offered, so the source never withdraws a word), query_done pulses exactly once per
// query with the query register filled, and train_clear allows a second set
// to be loaded.
module tb_data_acq;
  import knn_pkg::*;

  localparam int NT = 12, NF = 8, UN = 3, UF = 4;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, s_query, train_clear, hold, train_full, query_done;
  feat_t s_data;
  feat_t [NF-1:0] query;
  logic tm_we, tm_cls_we;
  logic [1:0] tm_row, tm_lane, tm_slot;
  logic tm_grp;
  feat_t tm_data;
  logic [CLS_W-1:0] tm_cls;
  feat_t got_f [NT][NF];
  logic [CLS_W-1:0] got_c [NT];
  feat_t ref_f [NT][NF];
  logic [CLS_W-1:0] ref_c [NT];
  feat_t ref_q [NF];
  int checks = 0, failures = 0, qdone_cnt = 0, stalls = 0;

  data_acq #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tm_we)     got_f[tm_row * UN + tm_lane][tm_grp * UF + tm_slot] <= tm_data;
    if (tm_cls_we) got_c[tm_row * UN + tm_lane] <= tm_cls;
    if (query_done) qdone_cnt <= qdone_cnt + 1;
    if (s_valid && !s_ready) stalls <= stalls + 1;
  end

  task automatic send(feat_t d, logic q);
    if ($urandom_range(0, 3) == 0) begin s_valid = 0; @(posedge clk); #1; end
    s_valid = 1; s_data = d; s_query = q;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    #1;
    s_valid = 0;
  endtask

  task automatic load_set();
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) begin
        ref_f[s][f] = feat_t'($urandom);
        send(ref_f[s][f], 1'b0);
      end
      ref_c[s] = CLS_W'($urandom);
      send(feat_t'(ref_c[s]), 1'b0);
    end
    @(posedge clk); #1;
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (got_f[s][f] !== ref_f[s][f]) begin failures++; $display("data_acq: sample %0d feature %0d misplaced", s, f); end
      end
      checks++;
      if (got_c[s] !== ref_c[s]) begin failures++; $display("data_acq: class of sample %0d wrong", s); end
    end
    checks++;
    if (!train_full) begin failures++; $display("data_acq: train_full not set"); end
  endtask

  task automatic send_query();
    int q0;
    q0 = qdone_cnt;
    for (int f = 0; f < NF; f++) begin
      ref_q[f] = feat_t'($urandom);
      send(ref_q[f], 1'b1);
    end
    @(posedge clk); #1;
    checks += 2;
    if (qdone_cnt != q0 + 1) begin failures++; $display("data_acq: query_done count %0d", qdone_cnt - q0); end
    for (int f = 0; f < NF; f++) if (query[f] !== ref_q[f]) begin failures++; $display("data_acq: query[%0d] wrong", f); break; end
  endtask

  initial begin
    s_valid = 0; s_data = '0; s_query = 0; train_clear = 0; hold = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    // a query word q0 the set is complete is refused
    s_query = 1; s_data = feat_t'(24'h123456);
    #1; checks++;
    if (s_ready) begin failures++; $display("data_acq: query accepted ahead of the training set"); end
    repeat (3) @(posedge clk); #1;
    s_valid = 0;
    load_set();
    // a training word after the set is complete is refused
    s_query = 0; #1; checks++;
    if (s_ready) begin failures++; $display("data_acq: training word accepted when full"); end
    @(posedge clk); #1;
    s_valid = 0;
    send_query();
    // hold blocks query words: the word stays offered (a stall) until hold drops
    begin
      int q0;
      q0 = qdone_cnt;
      ref_q[0] = feat_t'($urandom);
      hold = 1; s_valid = 1; s_query = 1; s_data = ref_q[0]; #1; checks++;
      if (s_ready) begin failures++; $display("data_acq: query accepted under hold"); end
      repeat (4) @(posedge clk); #1;
      hold = 0;
      @(posedge clk); #1;
      s_valid = 0;
      for (int f = 1; f < NF; f++) begin
        ref_q[f] = feat_t'($urandom);
        send(ref_q[f], 1'b1);
      end
      @(posedge clk); #1;
      checks += 2;
      if (qdone_cnt != q0 + 1) begin failures++; $display("data_acq: query_done missing after stall"); end
      for (int f = 0; f < NF; f++) if (query[f] !== ref_q[f]) begin failures++; $display("data_acq: query[%0d] wrong after stall", f); break; end
    end
    // reload a new set
    train_clear = 1; @(posedge clk); #1; train_clear = 0;
    checks++;
    if (train_full) begin failures++; $display("data_acq: train_clear ignored"); end
    load_set();
    send_query();
    checks++;
    if (stalls == 0) begin failures++; $display("data_acq: no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
