// tb_dist_mem: self-checking testbench for dist_mem.
//
// Writes every row of a 24-element Distance/Modality array (4 rows of 6)
// with random {distance, class} entries, rewrites one row, then reads all
// rows back in reverse order and checks each entry and the one-clock read
// latency.
module tb_dist_mem;
  import knn_pkg::*;

  localparam int NT = 24, UN = 6, ROWS = NT / UN;

  logic clk = 0;
  logic we, rd_en;
  logic [1:0] waddr, raddr;
  dm_entry_t [UN-1:0] wdata, rdata;
  dm_entry_t [UN-1:0] ref_m [ROWS];
  int checks = 0, failures = 0;

  dist_mem #(.NT(NT), .UN(UN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dm_entry_t [UN-1:0] rand_row();
    dm_entry_t [UN-1:0] r;
    for (int l = 0; l < UN; l++) r[l] = '{distance: dist_t'($urandom), cls: CLS_W'($urandom)};
    return r;
  endfunction

  initial begin
    we = 0; rd_en = 0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int r = 0; r < ROWS; r++) begin
      ref_m[r] = rand_row();
      we = 1; waddr = 2'(r); wdata = ref_m[r];
      @(posedge clk); #1;
    end
    ref_m[2] = rand_row();
    waddr = 2'd2; wdata = ref_m[2];
    @(posedge clk); #1;
    we = 0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      rd_en = 1; raddr = 2'(r);
      @(posedge clk); #1;
      rd_en = 0; raddr = '0;
      for (int l = 0; l < UN; l++) begin
        checks++;
        if (rdata[l] !== ref_m[r][l]) begin
          failures++; $display("dist_mem: row %0d lane %0d got %h exp %h", r, l, rdata[l], ref_m[r][l]);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
