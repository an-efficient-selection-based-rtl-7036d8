// tb_train_mem: self-checking testbench for train_mem.
//
// Writes every feature and class label of a small training set (12 samples,
// 8 features, 3 lanes, 4 features per word) one at a time, in random order
// of samples, then reads every (row, group) word and checks all lanes and
// slots plus the class labels against a copy kept in the testbench. Checks
// the one-clock read latency.
module tb_train_mem;
  import knn_pkg::*;

  localparam int NT = 12, NF = 8, UN = 3, UF = 4;
  localparam int ROWS = NT / UN, GROUPS = NF / UF;

  logic clk = 0;
  logic we, cls_we, rd_en;
  logic [1:0] w_row, cls_row, rd_row;
  logic       w_grp, rd_grp;
  logic [1:0] w_lane, cls_lane;
  logic [1:0] w_slot;
  feat_t w_data;
  logic [CLS_W-1:0] cls_data;
  feat_t [UN-1:0][UF-1:0] rdata;
  logic  [UN-1:0][CLS_W-1:0] rcls;
  feat_t ref_f [NT][NF];
  logic [CLS_W-1:0] ref_c [NT];
  int checks = 0, failures = 0;

  train_mem #(.NT(NT), .NF(NF), .UN(UN), .UF(UF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cls_we = 0; rd_en = 0;
    w_row = '0; w_grp = '0; w_lane = '0; w_slot = '0; w_data = '0;
    cls_row = '0; cls_lane = '0; cls_data = '0; rd_row = '0; rd_grp = '0;
    @(posedge clk); #1;
    for (int k = 0; k < NT; k++) begin
      int s;
      s = (k * 5) % NT;                    // permuted sample order
      for (int f = 0; f < NF; f++) begin
        ref_f[s][f] = feat_t'($urandom);
        we = 1; w_row = 2'(s / UN); w_lane = 2'(s % UN);
        w_grp = 1'(f / UF); w_slot = 2'(f % UF); w_data = ref_f[s][f];
        @(posedge clk); #1;
      end
      we = 0;
      ref_c[s] = CLS_W'($urandom);
      cls_we = 1; cls_row = 2'(s / UN); cls_lane = 2'(s % UN); cls_data = ref_c[s];
      @(posedge clk); #1;
      cls_we = 0;
    end
    for (int r = 0; r < ROWS; r++)
      for (int g = 0; g < GROUPS; g++) begin
        rd_en = 1; rd_row = 2'(r); rd_grp = 1'(g);
        @(posedge clk); #1;
        rd_en = 0; rd_row = '0; rd_grp = '0;   // data must not depend on the address any more
        for (int l = 0; l < UN; l++) begin
          for (int j = 0; j < UF; j++) begin
            checks++;
            if (rdata[l][j] !== ref_f[r*UN+l][g*UF+j]) begin
              failures++;
              $display("train_mem: row %0d grp %0d lane %0d slot %0d got %h exp %h",
                       r, g, l, j, rdata[l][j], ref_f[r*UN+l][g*UF+j]);
            end
          end
          checks++;
          if (rcls[l] !== ref_c[r*UN+l]) begin
            failures++; $display("train_mem: class row %0d lane %0d wrong", r, l);
          end
        end
        @(posedge clk); #1;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
