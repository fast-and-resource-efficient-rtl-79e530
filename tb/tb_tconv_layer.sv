// tb_tconv_layer: checks the ternary convolution with activation on random
// maps, weights and thresholds against the reference model, and that done
// arrives HO+1 cycles after start.
module tb_tconv_layer;
  import tcnn_pkg::*;
  localparam int H = 9, W = 5, CIN = 2, F = 3;
  localparam int HO = H - 3, WO = W - 2;
  logic clk = 0, rst_n = 0, start = 0;
  trit_t in_map [H][W][CIN];
  trit_t w [F][KH][KW][CIN];
  acc_t  thr_lo [F], thr_hi [F];
  trit_t out_map [HO][WO][F];
  logic  busy, done;
  int checks = 0, failures = 0;
  int xf[], wf[], lo[], hi[], yf[];
  int cnt[3];

  tconv_layer #(.H(H), .W(W), .CIN(CIN), .F(F)) dut (
    .clk, .rst_n, .start, .in_map, .w, .thr_lo, .thr_hi, .out_map, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xf = new[H*W*CIN]; wf = new[F*4*3*CIN]; lo = new[F]; hi = new[F];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      int lat;
      @(negedge clk);
      foreach (xf[i]) xf[i] = tcnn_ref_pkg::rtrit(40);
      foreach (wf[i]) wf[i] = tcnn_ref_pkg::rtrit(30);
      for (int f = 0; f < F; f++) begin
        lo[f] = -int'($urandom % 4) - 1;
        hi[f] = int'($urandom % 4) + 1;
        thr_lo[f] = acc_t'(lo[f]); thr_hi[f] = acc_t'(hi[f]);
      end
      for (int h = 0; h < H; h++)
        for (int c = 0; c < W; c++)
          for (int ch = 0; ch < CIN; ch++) in_map[h][c][ch] = trit_t'(xf[(h*W + c)*CIN + ch]);
      for (int f = 0; f < F; f++)
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 3; b++)
            for (int ch = 0; ch < CIN; ch++) w[f][a][b][ch] = trit_t'(wf[((f*4 + a)*3 + b)*CIN + ch]);
      tcnn_ref_pkg::conv(xf, H, W, CIN, wf, F, lo, hi, yf);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != HO + 1) begin failures++; $display("latency %0d, expected %0d", lat, HO + 1); end
      for (int r = 0; r < HO; r++)
        for (int c = 0; c < WO; c++)
          for (int f = 0; f < F; f++) begin
            automatic int e = yf[(r*WO + c)*F + f];
            cnt[e+1]++;
            checks++;
            if (int'(out_map[r][c][f]) != e) begin
              failures++;
              $display("it %0d out[%0d][%0d][%0d] got %0d exp %0d", it, r, c, f, out_map[r][c][f], e);
            end
          end
    end
    checks++;
    if (cnt[0] == 0 || cnt[1] == 0 || cnt[2] == 0) begin failures++; $display("activation values not all seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
