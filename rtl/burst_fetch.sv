// burst_fetch: reads the training set from external memory in AXI4 bursts.
//
// The training set sits in external DRAM as a packed array of 32-bit words,
// NT x (NF + 1) of them (16 features and one label word per sample, feature
// in the low 24 bits, label in bit 0). After start, this block walks the
// array from base_addr with INCR read bursts of up to BURST beats and turns
// the returned words into a valid/ready word stream for the data-acquisition
// block. Fetching in bursts rather than word by word cuts the number of
// memory transactions to ceil(words / BURST).
//
// AXI side: one outstanding burst at a time; arlen = beats - 1, arsize =
// 4 bytes, arburst = INCR. rready follows the stream's ready, so a slow
// consumer stalls the memory instead of losing data. Bursts never cross a
// 4 KB boundary as long as base_addr is aligned to BURST x 4 bytes. Read
// errors (rresp) are counted in err_count; the data is passed on anyway.
//
// Timing: one word per clock while the memory and the consumer keep up;
// between bursts the address phase adds at least one clock. done pulses in
// the clock after the last beat is handed over.
//
// Fetching the samples in bursts follows the design; the burst length of 16
// (the largest for the Zynq's AXI3 high-performance ports), the single
// outstanding burst and the word layout are this implementation's choices.
module burst_fetch
  import knn_pkg::*;
#(
  parameter int unsigned NT    = N_TRAIN,
  parameter int unsigned NF    = N_FEAT,
  parameter int unsigned BURST = 16,
  parameter int unsigned AW    = 32,
  localparam int unsigned WORDS = NT * (NF + 1),
  localparam int unsigned CW    = $clog2(WORDS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base_addr,
  output logic          busy,
  output logic          done,
  output logic [15:0]   bursts,      // bursts issued in the last fetch
  output logic [7:0]    err_count,   // beats with rresp != OKAY
  // AXI4 read address channel
  output logic          arvalid,
  input  logic          arready,
  output logic [AW-1:0] araddr,
  output logic [7:0]    arlen,
  output logic [2:0]    arsize,
  output logic [1:0]    arburst,
  // AXI4 read data channel
  input  logic          rvalid,
  output logic          rready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rlast,
  // word stream towards data_acq
  output logic          m_valid,
  input  logic          m_ready,
  output feat_t         m_data
);

  logic [CW-1:0] issued;     // words requested so far
  logic [CW-1:0] received;   // words handed on so far
  logic          in_burst;   // a burst is outstanding
  logic [CW-1:0] remaining;
  logic [8:0]    beats;

  assign arsize    = 3'd2;     // 4 bytes per beat
  assign arburst   = 2'b01;    // INCR
  assign remaining = CW'(WORDS) - issued;
  assign beats     = (remaining > CW'(BURST)) ? 9'(BURST) : 9'(remaining);

  assign m_valid = busy && in_burst && rvalid;
  assign m_data  = feat_t'(rdata[W-1:0]);
  assign rready  = busy && in_burst && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      bursts    <= '0;
      err_count <= '0;
      arvalid   <= 1'b0;
      araddr    <= '0;
      arlen     <= '0;
      issued    <= '0;
      received  <= '0;
      in_burst  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        bursts    <= '0;
        err_count <= '0;
        issued    <= '0;
        received  <= '0;
        araddr    <= base_addr;
      end else if (busy) begin
        // address phase: one burst outstanding at a time
        if (!arvalid && !in_burst && issued != CW'(WORDS)) begin
          arvalid <= 1'b1;
          arlen   <= 8'(beats - 1'b1);
        end
        if (arvalid && arready) begin
          arvalid  <= 1'b0;
          in_burst <= 1'b1;
          issued   <= issued + CW'(arlen) + 1'b1;
          bursts   <= bursts + 1'b1;
        end
        // data phase
        if (rvalid && rready) begin
          received <= received + 1'b1;
          if (rresp != 2'b00 && err_count != '1) err_count <= err_count + 1'b1;
          if (rlast) begin
            in_burst <= 1'b0;
            araddr   <= araddr + AW'((32'(arlen) + 1) * 4);
          end
          if (received == CW'(WORDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // AXI: an address, once offered, stays until accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (arvalid && !arready) |=> (arvalid && $stable(araddr) && $stable(arlen)))
    else $error("burst_fetch: read address changed before it was accepted");

endmodule
