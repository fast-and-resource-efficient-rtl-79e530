// tb_maxpool_eta: checks (4,1) max-pooling on random ternary maps, with an
// eta height that leaves two rows outside the last window.
module tb_maxpool_eta;
  import tcnn_pkg::*;
  localparam int H = 10, W = 3, C = 2, HO = H / 4;
  trit_t in_map [H][W][C];
  trit_t out_map [HO][W][C];
  int checks = 0, failures = 0;

  maxpool_eta #(.H(H), .W(W), .C(C)) dut (.in_map, .out_map);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      automatic int pz = int'($urandom % 100);
      for (int h = 0; h < H; h++)
        for (int w = 0; w < W; w++)
          for (int c = 0; c < C; c++) begin
            automatic int v = ($urandom % 100 < pz) ? 0 : (($urandom % 2) ? 1 : -1);
            in_map[h][w][c] = trit_t'(v);
          end
      #1;
      for (int r = 0; r < HO; r++)
        for (int w = 0; w < W; w++)
          for (int c = 0; c < C; c++) begin
            automatic int m = int'(in_map[4*r][w][c]);
            for (int k = 1; k < 4; k++) m = (int'(in_map[4*r+k][w][c]) > m) ? int'(in_map[4*r+k][w][c]) : m;
            checks++;
            if (int'(out_map[r][w][c]) != m) begin
              failures++;
              $display("mismatch r=%0d w=%0d c=%0d got %0d exp %0d", r, w, c, out_map[r][w][c], m);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
