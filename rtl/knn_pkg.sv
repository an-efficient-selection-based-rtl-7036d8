// knn_pkg: types and default sizes shared by the selection-based kNN
// classifier.
//
// The defaults are the touch-modality configuration: 4x4 tactile samples
// (16 features), a training set of 672 samples (80 % of 840), K = 3
// neighbours, two classes, a 6:4 split of the distance vector for the
// selector, and distance-calculation unroll factors of 4 (features) and
// 6 (samples). Features and distances are 24-bit fixed point with 6 integer
// and 18 fraction bits (<6,18>). Features are signed two's complement;
// distances are unsigned and saturate at the largest code, which is also the
// value the selector's registers start from.
package knn_pkg;

  localparam int unsigned W         = 24;  // word width of features and distances
  localparam int unsigned FRAC      = 18;  // fraction bits of the <6,18> format
  localparam int unsigned N_FEAT    = 16;  // features per sample (4x4 taxels)
  localparam int unsigned N_TRAIN   = 672; // training samples (80 % of 840)
  localparam int unsigned K_NN      = 3;   // number of neighbours
  localparam int unsigned N_CLASS   = 2;   // sliding finger / washer rolling
  localparam int unsigned CLS_W     = 1;   // bits of a class label
  localparam int unsigned UNROLL_F  = 4;   // features per UDC step
  localparam int unsigned UNROLL_N  = 6;   // UDCs working in parallel
  localparam int unsigned SPLIT_PCT = 60;  // share 'a' of the a:b = 6:4 division

  typedef logic signed [W-1:0] feat_t;     // <6,18> signed feature
  typedef logic        [W-1:0] dist_t;     // <6,18> unsigned distance

  localparam dist_t DIST_MAX = '1;         // initial value of the K registers

  // One element of the combined Distance/Modality array.
  typedef struct packed {
    dist_t            distance;
    logic [CLS_W-1:0] cls;
  } dm_entry_t;

endpackage
