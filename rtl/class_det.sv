// class_det: class determination by majority vote.
//
// Counts, for every class, how many of the K nearest neighbours carry that
// label (all K comparisons in parallel, the fully unrolled vote loop) and
// outputs the class with the largest count. With K = 3 and two classes a tie
// cannot happen; for other sizes a tie goes to the lowest class index, which
// is this implementation's choice.
//
// Timing: in_valid with nn_cls -> out_valid, out_class and counts one clock
// later.
module class_det
  import knn_pkg::*;
#(
  parameter int unsigned K  = K_NN,
  parameter int unsigned NC = N_CLASS,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [K-1:0][CLS_W-1:0]  nn_cls,
  output logic                     out_valid,
  output logic [CLS_W-1:0]         out_class,
  output logic [NC-1:0][CW-1:0]    counts
);

  logic [NC-1:0][CW-1:0] cnt;
  logic [CLS_W-1:0]      best;

  always_comb begin
    for (int c = 0; c < int'(NC); c++) begin
      cnt[c] = '0;
      for (int k = 0; k < int'(K); k++)
        if (nn_cls[k] == CLS_W'(c)) cnt[c] = cnt[c] + 1'b1;
    end
    best = '0;
    for (int c = 1; c < int'(NC); c++)
      if (cnt[c] > cnt[best]) best = CLS_W'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= '0;
      counts    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_class <= best;
        counts    <= cnt;
      end
    end
  end

endmodule
