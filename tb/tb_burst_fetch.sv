// tb_burst_fetch: self-checking testbench for burst_fetch.
//
// A small training set (12 samples x 9 words = 108 words) sits in the AXI
// memory model at a 64-byte aligned base. The block fetches it with
// 16-beat bursts while the consumer side drops ready at random. The
// testbench checks every word in order, the number of bursts (7: six of 16
// beats and one of 12), that no burst broke the AXI rules, and that done
// pulses once. A second fetch from another base checks the restart.
module tb_burst_fetch;
  import knn_pkg::*;

  localparam int NT = 12, NF = 8, BURST = 16, WORDS = NT * (NF + 1);
  localparam int NBURST = (WORDS + BURST - 1) / BURST;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [31:0] base_addr;
  logic [15:0] bursts;
  logic [7:0] err_count;
  logic arvalid, arready, rvalid, rready, rlast;
  logic [31:0] araddr, rdata;
  logic [7:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  logic m_valid, m_ready;
  feat_t m_data;
  int checks = 0, failures = 0, got = 0, done_cnt = 0, stalls = 0;
  int base_word;

  burst_fetch #(.NT(NT), .NF(NF), .BURST(BURST)) dut (.*);
  axi_mem_model #(.DEPTH(1024)) mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 3) != 0);
    if (done) done_cnt++;
    if (rvalid && !rready) stalls++;
    if (m_valid && m_ready) begin
      checks++;
      if (m_data !== feat_t'(mem.mem[base_word + got][W-1:0])) begin
        failures++; $display("burst_fetch: word %0d got %h exp %h", got, m_data, mem.mem[base_word + got][W-1:0]);
      end
      got++;
    end
  end

  task automatic fetch(int base_w);
    got = 0; done_cnt = 0; base_word = base_w;
    base_addr = 32'(base_w * 4);
    start = 1; @(posedge clk); #1; start = 0;
    wait (done_cnt == 1);
    repeat (10) @(posedge clk); #1;
    checks += 4;
    if (got != WORDS) begin failures++; $display("burst_fetch: %0d words, exp %0d", got, WORDS); end
    if (int'(bursts) != NBURST) begin failures++; $display("burst_fetch: %0d bursts, exp %0d", bursts, NBURST); end
    if (done_cnt != 1 || busy) begin failures++; $display("burst_fetch: done/busy wrong"); end
    if (err_count != 0) begin failures++; $display("burst_fetch: read errors counted"); end
  endtask

  initial begin
    start = 0; base_addr = '0;
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    fetch(16);          // byte address 64
    fetch(512);
    checks += 3;
    if (mem.protocol_errors != 0) begin failures++; $display("burst_fetch: AXI rule broken"); end
    if (mem.ar_count != 2 * NBURST) begin failures++; $display("burst_fetch: %0d bursts seen by memory", mem.ar_count); end
    if (stalls == 0) begin failures++; $display("burst_fetch: consumer never stalled the memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
