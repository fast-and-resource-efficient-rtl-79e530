// l0mu_tcnn_top: ternary-CNN muon finder for one barrel sector of a level-0
// muon trigger.
//
// The input is one event's RPC hit image: N_LAYERS detector layers (3 inner,
// 4 middle, 2 outer) by N_ETA eta bins, one bit per bin. The image is cut
// along eta into N_PORT equal, non-overlapping portions; every portion runs
// through its own copy of the same ternary CNN (tcnn_portion), all copies
// sharing one set of weights from weight_store, and portion_merge combines
// their outputs into the event's leading and sub-leading muon (pT and eta
// bin), the muon count and a trigger bit (leading pT >= pt_thr).
// Interface: weights are written through cfg_we/cfg_addr/cfg_data while the
// engine is idle. An image, with its pT threshold, is accepted when in_valid
// and in_ready are both high; in_ready is low while an event is being processed. res is valid in
// the cycle out_valid is high and holds until the next result.
// Timing (defaults): in_valid accepted in cycle t gives out_valid in cycle
// t+60; one event at a time.
// The image size, kernel shapes, ternary arithmetic, output vector and the
// parallel processing of image portions follow the published design; the
// portion count, layer widths, fixed-point formats and merging rule are this
// implementation's choice.
module l0mu_tcnn_top
  import tcnn_pkg::*;
#(
  parameter int N_LAYERS = DEF_N_LAYERS,
  parameter int N_ETA    = DEF_N_ETA,
  parameter int N_PORT   = DEF_N_PORT,
  parameter int F1       = DEF_F1,
  parameter int F2       = DEF_F2,
  parameter int N_HID    = DEF_N_HID,
  localparam int HP      = N_ETA / N_PORT,
  localparam int NFLAT   = flat_size(HP, N_LAYERS, F2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              hits [N_LAYERS][N_ETA],
  input  logic [7:0]        pt_thr,
  output logic              out_valid,
  output result_t           res
);
  if (N_ETA % N_PORT != 0) begin : g_bad_split
    $error("l0mu_tcnn_top: N_ETA must be a multiple of N_PORT");
  end

  // Shared parameters
  trit_t              w1    [F1][KH][KW][1];
  acc_t               t1_lo [F1], t1_hi [F1];
  trit_t              w2    [F2][KH][KW][F1];
  acc_t               t2_lo [F2], t2_hi [F2];
  trit_t              wd    [N_HID][NFLAT];
  acc_t               td_lo [N_HID], td_hi [N_HID];
  trit_t              wo    [N_OUT][N_HID];
  logic signed [15:0] gamma [N_OUT], beta [N_OUT];

  weight_store #(.F1(F1), .F2(F2), .N_HID(N_HID), .NFLAT(NFLAT)) u_wts (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
    .w1, .t1_lo, .t1_hi, .w2, .t2_lo, .t2_hi, .wd, .td_lo, .td_hi, .wo, .gamma, .beta);

  // Event control: latch the image, start all portions one cycle later.
  logic busy, start_q;
  logic img_q [N_LAYERS][N_ETA];
  logic accept;
  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;

  logic [N_PORT-1:0] p_done;
  logic [7:0]        y [N_PORT][N_OUT];
  logic              m_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy    <= 1'b0;
      start_q <= 1'b0;
    end else begin
      start_q <= accept;
      if (accept)         busy <= 1'b1;
      else if (out_valid) busy <= 1'b0;
    end

  logic [7:0] thr_q;
  always_ff @(posedge clk)
    if (accept) begin
      img_q <= hits;
      thr_q <= pt_thr;
    end

  // Portions: eta is the convolution's first axis, the detector layer its second.
  for (genvar p = 0; p < N_PORT; p++) begin : g_port
    logic img_p [HP][N_LAYERS];
    always_comb
      for (int h = 0; h < HP; h++)
        for (int l = 0; l < N_LAYERS; l++) img_p[h][l] = img_q[l][p*HP + h];

    tcnn_portion #(.H(HP), .W(N_LAYERS), .F1(F1), .F2(F2), .N_HID(N_HID)) u_port (
      .clk, .rst_n, .start(start_q), .img(img_p),
      .w1, .t1_lo, .t1_hi, .w2, .t2_lo, .t2_hi, .wd, .td_lo, .td_hi, .wo, .gamma, .beta,
      .y(y[p]), .done(p_done[p]));
  end

  // All portions run in lock step, so they finish together.
  assign m_valid = &p_done;

  portion_merge #(.P(N_PORT), .H(HP)) u_merge (
    .clk, .rst_n, .in_valid(m_valid), .y, .pt_thr(thr_q), .res, .out_valid);

  // Weights may only change between events.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy)
    else $error("l0mu_tcnn_top: weight write while an event is in flight");
endmodule
