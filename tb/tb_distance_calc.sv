// tb_distance_calc: self-checking testbench for distance_calc.
//
// 24 training samples, 16 features, 6 lanes, 4 features per beat, so 4
// intervals of 4 clocks. The training buffer and the Distance/Modality array
// are modelled in the testbench (one-clock read latency). For several random
// queries it checks every distance and class written against the integer
// reference, the interval count and the latency (done after edge
// ROWS*GROUPS + 2 from start).
module tb_distance_calc;
  import knn_pkg::*;
  import knn_ref_pkg::*;

  localparam int NT = 24, NF = 16, UN = 6, UF = 4;
  localparam int ROWS = NT / UN, GROUPS = NF / UF;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [2:0] intervals;
  feat_t [NF-1:0] query;
  logic tm_rd_en;
  logic [1:0] tm_row, tm_grp;
  feat_t [UN-1:0][UF-1:0] tm_rdata;
  logic  [UN-1:0][CLS_W-1:0] tm_rcls;
  logic dm_we;
  logic [1:0] dm_waddr;
  dm_entry_t [UN-1:0] dm_wdata;
  feat_t tf [NT][NF];
  logic [CLS_W-1:0] tc [NT];
  dm_entry_t dm [NT];
  int checks = 0, failures = 0;

  distance_calc #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (tm_rd_en)
      for (int l = 0; l < UN; l++) begin
        for (int j = 0; j < UF; j++) tm_rdata[l][j] <= tf[tm_row * UN + l][tm_grp * UF + j];
        tm_rcls[l] <= tc[tm_row * UN + l];
      end
    if (dm_we) for (int l = 0; l < UN; l++) dm[dm_waddr * UN + l] <= dm_wdata[l];
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; query = '0;
    for (int s = 0; s < NT; s++) begin
      for (int f = 0; f < NF; f++) tf[s][f] = rand_feat((s == 5) ? 24 : 19);
      tc[s] = CLS_W'($urandom);
    end
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 5; t++) begin
      int c;
      for (int f = 0; f < NF; f++) query[f] = rand_feat(19);
      for (int s = 0; s < NT; s++) dm[s] = '0;
      start = 1; @(posedge clk); #1; start = 0;
      c = 0;
      while (!done && c < 200) begin @(posedge clk); #1; c++; end
      @(posedge clk); #1;   // last row lands in the array model
      checks += 2;
      if (c != ROWS * GROUPS + 2) begin failures++; $display("distance_calc: done after %0d clocks, exp %0d", c, ROWS * GROUPS + 2); end
      if (int'(intervals) != ROWS) begin failures++; $display("distance_calc: %0d intervals", intervals); end
      for (int s = 0; s < NT; s++) begin
        automatic longint acc = 0;
        for (int f = 0; f < NF; f++) acc += ref_term(query[f], tf[s][f]);
        checks++;
        if (dm[s].distance !== ref_sat(acc) || dm[s].cls !== tc[s]) begin
          failures++;
          $display("distance_calc: sample %0d got %h/%0d exp %h/%0d", s, dm[s].distance, dm[s].cls, ref_sat(acc), tc[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
