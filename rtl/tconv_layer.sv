// tconv_layer: ternary 2D convolution with batch normalisation and ternary
// activation, one output eta row per clock.
//
// The input map is H (eta) x W (detector layers) x CIN ternary values, the
// kernel is 4 (eta) x 3 (layers) x CIN per filter, padding is "valid", so the
// output map is (H-3) x (W-2) x F. A start pulse clears the row counter;
// every following cycle computes all W-2 columns and all F filters of one
// output row and writes the activated row into out_map. The per-filter
// thresholds thr_lo/thr_hi are the folded batch normalisation (see
// bn_ternary_act). in_map, weights and thresholds must be held stable while
// busy is high.
// Timing: start in cycle t gives done (one-cycle pulse) in cycle t+HO+1, when
// the whole of out_map is valid; out_map then holds until the next start.
// Kernel shape, ternary weights and activation follow the published network;
// the row-per-clock schedule is this implementation's choice.
module tconv_layer
  import tcnn_pkg::*;
#(
  parameter int H   = 48,
  parameter int W   = DEF_N_LAYERS,
  parameter int CIN = 1,
  parameter int F   = DEF_F1,
  localparam int HO = H - KH + 1,
  localparam int WO = W - KW + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  trit_t in_map  [H][W][CIN],
  input  trit_t w       [F][KH][KW][CIN],
  input  acc_t  thr_lo  [F],
  input  acc_t  thr_hi  [F],
  output trit_t out_map [HO][WO][F],
  output logic  busy,
  output logic  done
);
  localparam int RW = (HO > 1) ? $clog2(HO) : 1;

  logic [RW-1:0] row;
  trit_t         row_act [WO][F];

  // One output row: all columns and filters in parallel.
  for (genvar c = 0; c < WO; c++) begin : g_col
    for (genvar f = 0; f < F; f++) begin : g_filt
      acc_t acc;
      always_comb begin
        acc = '0;
        for (int kh = 0; kh < KH; kh++)
          for (int kw = 0; kw < KW; kw++)
            for (int ci = 0; ci < CIN; ci++)
              acc += acc_t'(tmul(in_map[int'(row) + kh][c + kw][ci], w[f][kh][kw][ci]));
      end
      assign row_act[c][f] = tact(acc, thr_lo[f], thr_hi[f]);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      row  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        row  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (int'(row) == HO - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end
    end

  always_ff @(posedge clk)
    if (busy && !start) out_map[row] <= row_act;
endmodule
