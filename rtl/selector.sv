// selector: nearest-neighbours selector (selection-based, no full sort).
//
// Finds the K smallest distances of the Distance/Modality array without
// sorting it. K registers start at the largest distance code. The vector of
// S = N_TRAIN elements is split a:b; the first S1 = SPLIT_PCT*S/100 elements
// form V1 and the rest V2.
//  * Step 2 (V1): each element is compared with all K registers at once. If
//    it is smaller than register p (and not smaller than register p-1), it
//    takes register p and registers p..K-2 shift down by one; the old
//    content of register K-1 drops out. The registers stay ordered
//    min1 <= min2 <= ... <= minK.
//  * Step 3 (V2): an element is first compared with minK; if it is not
//    smaller, the registers are left alone and the next element is fetched,
//    otherwise it is inserted as in step 2.
// With early_out high the selector instead stops at the first V2 element
// that is not smaller than minK (the "break" of the pseudo code), trading
// exactness for time. With early_out low it scans all of V2 and always
// returns the exact K nearest. early_out is sampled with start.
// Ties: an element equal to a register does not displace it, so among equal
// distances the lower index wins.
//
// Interface: start (one clock) launches a scan; the selector reads one
// element per clock from the array (synchronous read, one clock latency);
// done pulses when nn is final. nn[0] is the nearest neighbour, each entry
// carries the distance and the class label. v2_inserts counts the V2
// elements that entered the registers, aborted tells whether the scan was
// cut short.
// Timing: counting the clock edge that samples start as edge 0, element i
// is compared at edge i + 2, so done is high after edge S + 1 (full scan),
// or after edge i + 2 when the scan is cut at element i.
//
// The register-and-shift scheme, the split and the early-out compare with
// minK follow the design; the read pipeline and the tie rule are this
// implementation's.
module selector
  import knn_pkg::*;
#(
  parameter int unsigned NT        = N_TRAIN,
  parameter int unsigned UN        = UNROLL_N,
  parameter int unsigned K         = K_NN,
  parameter int unsigned SPLIT     = SPLIT_PCT,
  localparam int unsigned ROWS = NT / UN,
  localparam int unsigned S1   = (SPLIT * NT) / 100,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned LW   = (UN   > 1) ? $clog2(UN)   : 1,
  localparam int unsigned IW   = $clog2(NT + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               early_out,
  output logic               busy,
  output logic               done,
  // Distance/Modality array read port
  output logic               rd_en,
  output logic [RW-1:0]      rd_row,
  input  dm_entry_t [UN-1:0] rd_data,
  // result
  output dm_entry_t [K-1:0]  nn,
  output logic [IW-1:0]      v2_inserts,
  output logic               aborted
);

  logic          issuing;
  logic          abort_en;    // early_out captured at start
  logic [LW-1:0] lane;        // lane of the element being read
  logic [IW-1:0] idx;         // index of the element being read
  logic          d_valid;     // element available this clock
  logic [LW-1:0] d_lane;
  logic [IW-1:0] d_idx;
  dm_entry_t     elem;
  logic [K-1:0]  lt;          // elem.distance < nn[p].distance
  dm_entry_t [K-1:0] nn_next;

  assign rd_en = issuing;
  assign elem  = rd_data[d_lane];

  // all K comparisons in parallel, then the shift-insert
  always_comb begin
    for (int p = 0; p < int'(K); p++)
      lt[p] = elem.distance < nn[p].distance;
    for (int p = 0; p < int'(K); p++) begin
      if (!lt[p])                 nn_next[p] = nn[p];
      else if (p == 0 || !lt[p-1]) nn_next[p] = elem;
      else                        nn_next[p] = nn[p-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing    <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      rd_row     <= '0;
      lane       <= '0;
      idx        <= '0;
      d_valid    <= 1'b0;
      d_lane     <= '0;
      d_idx      <= '0;
      nn         <= '0;
      v2_inserts <= '0;
      aborted    <= 1'b0;
      abort_en   <= 1'b0;
    end else begin
      done    <= 1'b0;
      d_valid <= issuing;
      d_lane  <= lane;
      d_idx   <= idx;
      if (start && !busy) begin
        busy       <= 1'b1;
        issuing    <= 1'b1;
        rd_row     <= '0;
        lane       <= '0;
        idx        <= '0;
        d_valid    <= 1'b0;
        v2_inserts <= '0;
        aborted    <= 1'b0;
        abort_en   <= early_out;
        for (int p = 0; p < int'(K); p++)
          nn[p] <= '{distance: DIST_MAX, cls: '0};
      end else begin
        if (issuing) begin
          idx <= idx + 1'b1;
          if (idx == IW'(NT - 1)) issuing <= 1'b0;
          if (lane == LW'(UN - 1)) begin
            lane   <= '0;
            rd_row <= rd_row + 1'b1;
          end else begin
            lane <= lane + 1'b1;
          end
        end
        if (d_valid && busy) begin
          if (d_idx >= IW'(S1) && !lt[K-1]) begin
            // step 3, element not below minK
            if (abort_en) begin
              aborted <= 1'b1;
              issuing <= 1'b0;
              busy    <= 1'b0;
              done    <= 1'b1;
            end
          end else begin
            nn <= nn_next;
            if (d_idx >= IW'(S1)) v2_inserts <= v2_inserts + 1'b1;
          end
          if (d_idx == IW'(NT - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
