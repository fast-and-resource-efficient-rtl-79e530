// tcnn_pkg: types, sizes and small arithmetic helpers shared by the ternary
// CNN muon-trigger engine.
//
// A ternary value (weight or activation) is a 2-bit two's-complement number
// restricted to -1, 0 and +1, so a "multiplication" is a sign selection and
// every layer reduces to additions. Integer sums are ACC_W bits wide.
// The convolution kernel (4 x 3) and the max-pooling window (4 x 1) are the
// network's published shapes; the filter and neuron counts below are this
// implementation's choice, as the published architecture figure lists them
// but is not reproduced here.
package tcnn_pkg;

  typedef logic signed [1:0] trit_t;         // -1, 0, +1 (2'b10 is never produced)

  localparam int ACC_W = 16;
  typedef logic signed [ACC_W-1:0] acc_t;     // integer pre-activation sum

  // Layer shapes: first index is the eta (strip) axis, second the detector layer.
  localparam int KH    = 4;    // convolution kernel height (eta)
  localparam int KW    = 3;    // convolution kernel width (detector layers)
  localparam int PH    = 4;    // max-pooling height (eta), width 1
  localparam int N_OUT = 5;    // pT lead, eta lead, pT sub-lead, eta sub-lead, n muons

  // Default network size
  localparam int DEF_N_LAYERS = 9;    // 3 inner + 4 middle + 2 outer RPC layers
  localparam int DEF_N_ETA    = 384;  // eta bins (strips) per layer
  localparam int DEF_N_PORT   = 8;    // eta portions processed in parallel
  localparam int DEF_F1       = 8;    // filters of the first convolution
  localparam int DEF_F2       = 16;   // filters of the second convolution
  localparam int DEF_N_HID    = 32;   // neurons of the hidden dense layer
  localparam int N_MAX_PORT   = 3;    // largest muon count one portion reports

  // Configuration port
  localparam int CFG_AW = 16;
  localparam int CFG_DW = 16;

  // Number of flattened features after conv-pool-conv-pool on an h x w map.
  function automatic int flat_size(int h, int w, int f2);
    int h1, w1, h2, w2;
    h1 = (h - KH + 1) / PH;
    w1 = w - KW + 1;
    h2 = (h1 - KH + 1) / PH;
    w2 = w1 - KW + 1;
    return h2 * w2 * f2;
  endfunction

  // Product of two ternary values.
  function automatic trit_t tmul(trit_t a, trit_t b);
    if (a == 2'sd0 || b == 2'sd0) return 2'sd0;
    return (a == b) ? 2'sd1 : -2'sd1;
  endfunction

  // Batch normalisation folded into two thresholds, then ternary activation.
  function automatic trit_t tact(acc_t s, acc_t lo, acc_t hi);
    if (s > hi) return 2'sd1;
    if (s < lo) return -2'sd1;
    return 2'sd0;
  endfunction

  // Decodes a 2-bit configuration code: 01 = +1, 11 = -1, 00 and 10 = 0.
  function automatic trit_t trit_from_code(logic [1:0] c);
    return (c == 2'b10) ? 2'sd0 : trit_t'(c);
  endfunction

  // Event result after merging the portions.
  typedef struct packed {
    logic        trig;        // leading muon present with pT >= threshold
    logic [7:0]  n_muons;     // summed muon count over all portions
    logic        lead_valid;
    logic [7:0]  lead_pt;     // Q0.8 network output
    logic [15:0] lead_eta;    // global eta bin
    logic        sub_valid;
    logic [7:0]  sub_pt;
    logic [15:0] sub_eta;
  } result_t;

endpackage
