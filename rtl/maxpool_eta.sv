// maxpool_eta: (4,1) max-pooling of a ternary feature map along eta.
//
// Input map is H (eta) x W (detector layers) x C channels; output row r is
// the element-wise maximum of input rows 4r..4r+3. Stride equals the window,
// rows that do not fill a whole window are dropped (floor), and columns and
// channels are not pooled. Purely combinational.
module maxpool_eta
  import tcnn_pkg::*;
#(
  parameter int H = 45,
  parameter int W = 7,
  parameter int C = DEF_F1,
  localparam int HO = H / PH
) (
  input  trit_t in_map  [H][W][C],
  output trit_t out_map [HO][W][C]
);
  always_comb
    for (int r = 0; r < HO; r++)
      for (int w = 0; w < W; w++)
        for (int c = 0; c < C; c++) begin
          out_map[r][w][c] = in_map[PH*r][w][c];
          for (int k = 1; k < PH; k++)
            if (in_map[PH*r+k][w][c] > out_map[r][w][c])
              out_map[r][w][c] = in_map[PH*r+k][w][c];
        end
endmodule
