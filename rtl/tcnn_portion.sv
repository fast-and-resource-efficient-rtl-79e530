// tcnn_portion: the ternary CNN applied to one eta portion of the hit image.
//
// Layers, in order:
//   conv (4x3, F1 filters) + batch norm + ternary activation
//   max-pool (4x1)
//   conv (4x3, F2 filters) + batch norm + ternary activation
//   max-pool (4x1)
//   flatten (eta, layer, channel order)
//   dense (N_HID neurons, ternary) + batch norm + ternary activation
//   dense (5 neurons, ternary) + batch norm + sigmoid
// The image is H eta bins x W detector layers of hit bits (0 or +1). The
// stages run one after another, each started by the done pulse of the one
// before, so the portion needs no separate state machine. The image and all
// weights must be held stable from start until done.
// Outputs y[0..4] are the network's normalised (Q0.8) estimates of leading
// pT, leading eta, sub-leading pT, sub-leading eta and muon count for this
// portion.
// Timing: start in cycle t gives done in cycle t + HO1 + HO2 + 5, where
// HO1 = H-3 and HO2 = (H-3)/4 - 3 are the two convolutions' output heights
// (one cycle per output row, plus one cycle per stage); 58 cycles for H = 48.
// Layer types and kernel shapes follow the published network; F1, F2 and
// N_HID are this implementation's choice.
module tcnn_portion
  import tcnn_pkg::*;
#(
  parameter int H     = 48,
  parameter int W     = DEF_N_LAYERS,
  parameter int F1    = DEF_F1,
  parameter int F2    = DEF_F2,
  parameter int N_HID = DEF_N_HID,
  localparam int HO1   = H - KH + 1,
  localparam int WO1   = W - KW + 1,
  localparam int HP1   = HO1 / PH,
  localparam int HO2   = HP1 - KH + 1,
  localparam int WO2   = WO1 - KW + 1,
  localparam int HP2   = HO2 / PH,
  localparam int NFLAT = HP2 * WO2 * F2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               img   [H][W],
  input  trit_t              w1    [F1][KH][KW][1],
  input  acc_t               t1_lo [F1],
  input  acc_t               t1_hi [F1],
  input  trit_t              w2    [F2][KH][KW][F1],
  input  acc_t               t2_lo [F2],
  input  acc_t               t2_hi [F2],
  input  trit_t              wd    [N_HID][NFLAT],
  input  acc_t               td_lo [N_HID],
  input  acc_t               td_hi [N_HID],
  input  trit_t              wo    [N_OUT][N_HID],
  input  logic signed [15:0] gamma [N_OUT],
  input  logic signed [15:0] beta  [N_OUT],
  output logic [7:0]         y     [N_OUT],
  output logic               done
);
  if (HP2 < 1) begin : g_too_small
    $error("tcnn_portion: portion too short in eta for two conv/pool stages");
  end

  trit_t x0 [H][W][1];
  always_comb
    for (int h = 0; h < H; h++)
      for (int c = 0; c < W; c++) x0[h][c][0] = img[h][c] ? 2'sd1 : 2'sd0;

  // Convolution 1 and pooling
  trit_t c1 [HO1][WO1][F1];
  trit_t p1 [HP1][WO1][F1];
  logic  c1_done;
  tconv_layer #(.H(H), .W(W), .CIN(1), .F(F1)) u_conv1 (
    .clk, .rst_n, .start, .in_map(x0), .w(w1), .thr_lo(t1_lo), .thr_hi(t1_hi),
    .out_map(c1), .busy(), .done(c1_done));
  maxpool_eta #(.H(HO1), .W(WO1), .C(F1)) u_pool1 (.in_map(c1), .out_map(p1));

  // Convolution 2 and pooling
  trit_t c2 [HO2][WO2][F2];
  trit_t p2 [HP2][WO2][F2];
  logic  c2_done;
  tconv_layer #(.H(HP1), .W(WO1), .CIN(F1), .F(F2)) u_conv2 (
    .clk, .rst_n, .start(c1_done), .in_map(p1), .w(w2), .thr_lo(t2_lo), .thr_hi(t2_hi),
    .out_map(c2), .busy(), .done(c2_done));
  maxpool_eta #(.H(HO2), .W(WO2), .C(F2)) u_pool2 (.in_map(c2), .out_map(p2));

  // Flatten
  trit_t fl [NFLAT];
  always_comb
    for (int h = 0; h < HP2; h++)
      for (int c = 0; c < WO2; c++)
        for (int f = 0; f < F2; f++) fl[(h*WO2 + c)*F2 + f] = p2[h][c][f];

  // Hidden dense layer
  acc_t  sd [N_HID];
  trit_t ad [N_HID];
  logic  d1_done;
  tdense_layer #(.NIN(NFLAT), .NOUT(N_HID)) u_dense1 (
    .clk, .rst_n, .start(c2_done), .x(fl), .w(wd), .sum(sd), .done(d1_done));
  bn_ternary_act #(.N(N_HID)) u_act1 (.s(sd), .lo(td_lo), .hi(td_hi), .a(ad));

  // Output layer
  acc_t so [N_OUT];
  logic d2_done;
  tdense_layer #(.NIN(N_HID), .NOUT(N_OUT)) u_dense2 (
    .clk, .rst_n, .start(d1_done), .x(ad), .w(wo), .sum(so), .done(d2_done));
  sigmoid_out #(.N(N_OUT)) u_sig (
    .clk, .rst_n, .in_valid(d2_done), .s(so), .gamma, .beta, .y, .out_valid(done));
endmodule
