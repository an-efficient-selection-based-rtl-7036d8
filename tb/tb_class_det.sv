// tb_class_det: self-checking testbench for class_det.
//
// Drives all 8 label combinations of K = 3 binary neighbours and checks the
// majority class and the per-class counts, one clock after in_valid. A
// second instance with K = 4 checks that a 2:2 tie resolves to class 0.
module tb_class_det;
  import knn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_valid4;
  logic [2:0][CLS_W-1:0] nn_cls;
  logic [3:0][CLS_W-1:0] nn_cls4;
  logic [CLS_W-1:0] out_class, out_class4;
  logic [1:0][1:0] counts;
  logic [1:0][2:0] counts4;
  int checks = 0, failures = 0;

  class_det #(.K(3), .NC(2)) dut (.*);
  class_det #(.K(4), .NC(2)) dut4 (.clk, .rst_n, .in_valid, .nn_cls(nn_cls4),
                                   .out_valid(out_valid4), .out_class(out_class4), .counts(counts4));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; nn_cls = '0; nn_cls4 = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int m = 0; m < 16; m++) begin
      int ones, ones4;
      nn_cls = 3'(m); nn_cls4 = 4'(m);
      ones  = $countones(3'(m));
      ones4 = $countones(4'(m));
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks += 2;
      if (!out_valid || out_class !== CLS_W'(ones >= 2) ||
          counts[1] !== 2'(ones) || counts[0] !== 2'(3 - ones)) begin
        failures++; $display("class_det K=3: pattern %b got %0d", 3'(m), out_class);
      end
      if (!out_valid4 || out_class4 !== CLS_W'(ones4 > 2) ||
          counts4[1] !== 3'(ones4) || counts4[0] !== 3'(4 - ones4)) begin
        failures++; $display("class_det K=4: pattern %b got %0d", 4'(m), out_class4);
      end
      @(posedge clk); #1;
      if (out_valid) begin failures++; $display("class_det: out_valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
