// tb_udc: self-checking testbench for udc.
//
// Feeds random query/training feature pairs, 16 features in 4 beats per
// distance, back to back, and compares every distance with the integer
// reference (truncated squares, saturated sum). Small values exercise the
// exact path, large ones the saturation. Also checks that the result comes
// one clock after the last beat.
module tb_udc;
  import knn_pkg::*;
  import knn_ref_pkg::*;

  localparam int UF = 4, BEATS = 4, NDIST = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last, out_valid;
  feat_t [UF-1:0] q, t;
  dist_t out_dist;
  int checks = 0, failures = 0, sat_seen = 0;
  dist_t exp_q[$];

  udc #(.UF(UF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) if (rst_n && out_valid) begin
    dist_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_dist !== e) begin
      failures++;
      $display("udc mismatch: got %h exp %h", out_dist, e);
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; q = '0; t = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < NDIST; n++) begin
      automatic longint acc = 0;
      automatic int unsigned mag = (n % 4 == 3) ? 24 : 16 + (n % 4);  // every 4th one saturates
      for (int b = 0; b < BEATS; b++) begin
        for (int j = 0; j < UF; j++) begin
          q[j] = rand_feat(mag);
          t[j] = rand_feat(mag);
          acc += ref_term(q[j], t[j]);
        end
        in_valid = 1; in_first = (b == 0); in_last = (b == BEATS - 1);
        if (b == BEATS - 1) begin
          exp_q.push_back(ref_sat(acc));
          if (acc > longint'(DIST_MAX)) sat_seen++;
        end
        @(posedge clk);
        #1;
        // latency: result visible exactly one clock after the last beat
        if (b == BEATS - 1) begin
          checks++;
          if (!out_valid) begin failures++; $display("udc: out_valid missing"); end
        end else if (out_valid) begin
          failures++; $display("udc: spurious out_valid");
        end
        // occasional idle clock between distances
        if (b == BEATS - 1 && n % 7 == 0) begin
          in_valid = 0; in_first = 0; in_last = 0;
          @(posedge clk); #1;
        end
      end
    end
    in_valid = 0; in_last = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (sat_seen == 0 || exp_q.size() != 0) begin failures++; $display("udc: saturation not exercised or results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
