// udc: Unrolled Distance Calculation unit.
//
// Computes the squared Euclidean distance d = sum_i (q_i - t_i)^2 between a
// query sample and one training sample, UNROLL_F features per clock. The
// features of a sample arrive in N_FEAT/UNROLL_F consecutive beats; in_first
// marks the beat that starts a new sum and in_last the beat that ends it.
// Each beat forms UNROLL_F differences and squares in parallel and adds them
// to a running sum (the unroll factor of 4 on the 16-feature loop).
//
// Arithmetic: features are signed <6,18> fixed point. Each square is exact
// (<12,36>) and is truncated to 18 fraction bits before it is summed; the
// sum is kept wide and saturated to the unsigned 24-bit <6,18> distance only
// at the end. The squared form and the unroll factor follow the design; the
// truncation and saturation points are this implementation's choice.
//
// Timing: out_valid/out_dist appear one clock after the beat with in_last.
module udc
  import knn_pkg::*;
#(
  parameter int unsigned UF = UNROLL_F
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_first,
  input  logic           in_last,
  input  feat_t [UF-1:0] q,
  input  feat_t [UF-1:0] t,
  output logic           out_valid,
  output dist_t          out_dist
);

  localparam int unsigned SQ_W  = 2 * (W + 1);    // exact square of a W+1 bit difference
  localparam int unsigned ACC_W = SQ_W - FRAC + 8; // headroom for up to 256 beats of UF terms

  logic [ACC_W-1:0] acc_q, beat_sum, acc_next;

  always_comb begin
    beat_sum = '0;
    for (int i = 0; i < int'(UF); i++) begin
      logic signed [SQ_W-1:0] diff;
      logic        [SQ_W-1:0] sq;
      diff = SQ_W'(q[i]) - SQ_W'(t[i]);   // sign-extended operands
      sq   = $unsigned(diff * diff);
      beat_sum = beat_sum + ACC_W'(sq >> FRAC);
    end
    acc_next = (in_first ? '0 : acc_q) + beat_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_dist  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc_q <= acc_next;
        if (in_last)
          out_dist <= (acc_next > ACC_W'(DIST_MAX)) ? DIST_MAX : dist_t'(acc_next);
      end
    end
  end

endmodule
