// tb_knn_workloads: runs knn_top on the sizes of the published comparison
// set-ups, each with synthetic two-class data.
//
//  * S1-sized: K = 10, 699 samples of 9 features. Built with NT = 702
//    (three padding samples, since NT must be a multiple of 6) and NF = 12
//    (three zero features, since NF must be a multiple of 4).
//  * S3-sized: K = 5, 300,000 samples of 2 features, with 2 features per
//    distance-unit step (UF = 2).
// The Iris set-up (three classes) is not run: labels are one bit wide.
// Each runner checks classes, neighbours, V2 statistics and latency against
// the reference model.
module tb_knn_workloads;
  logic clk = 0, rst_n = 0;
  logic fin1, fin3;
  int c1, f1, c3, f3;

  knn_workload_runner #(.NAME("S1"), .NT(702), .NT_USED(699), .NF(12), .NF_USED(9),
                        .K(10), .UN(6), .UF(4), .SPLIT(60), .NQ(4))
    s1 (.clk, .rst_n, .finished(fin1), .checks(c1), .failures(f1));
  knn_workload_runner #(.NAME("S3"), .NT(300000), .NT_USED(300000), .NF(2), .NF_USED(2),
                        .K(5), .UN(6), .UF(2), .SPLIT(60), .NQ(3))
    s3 (.clk, .rst_n, .finished(fin3), .checks(c3), .failures(f3));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    $display("tb_knn_workloads: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3, f1 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin1 && fin3);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c3, f1 + f3);
    $finish;
  end
endmodule
