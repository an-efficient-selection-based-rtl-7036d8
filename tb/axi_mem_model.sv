// axi_mem_model: behavioural model of external DRAM behind an AXI4 read
// port, for testbenches only (not synthesizable).
//
// Holds DEPTH 32-bit words, byte address = 4 x word index from address 0.
// Accepts one read burst at a time (INCR, 4-byte beats) after a random
// address-ready delay, returns the beats with random gaps and a random first
// latency, and raises rlast on the final beat. The testbench fills 'mem'
// directly. It flags bursts that cross a 4 KB boundary or are longer than
// 256 beats in 'protocol_errors', and counts accepted bursts in 'ar_count'.
module axi_mem_model #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned MAX_GAP = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arvalid,
  output logic        arready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast
);
  logic [31:0] mem [DEPTH];
  int ar_count = 0, protocol_errors = 0;

  initial begin
    arready = 0; rvalid = 0; rdata = '0; rresp = 2'b00; rlast = 0;
    @(posedge rst_n);
    forever begin
      int unsigned addr, len;
      // address phase, with a random ready delay
      @(posedge clk);
      while (!arvalid) @(posedge clk);
      repeat ($urandom_range(0, MAX_GAP)) @(posedge clk);
      #1 arready = 1;
      @(posedge clk);
      addr = araddr; len = int'(arlen) + 1;
      ar_count++;
      if (arsize != 3'd2 || arburst != 2'b01) protocol_errors++;
      if ((addr & 32'hFFF) + len * 4 > 32'h1000) protocol_errors++;
      #1 arready = 0;
      // data phase
      repeat ($urandom_range(1, MAX_GAP + 1)) @(posedge clk);
      for (int b = 0; b < int'(len); b++) begin
        #1;
        rvalid = 1; rdata = mem[(addr >> 2) + b]; rlast = (b == int'(len) - 1);
        @(posedge clk);
        while (!rready) @(posedge clk);
        #1 rvalid = 0; rlast = 0;
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, MAX_GAP)) @(posedge clk);
      end
    end
  end
endmodule
