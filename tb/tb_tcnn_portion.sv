// tb_tcnn_portion: runs the ternary CNN of one portion on random hit images
// and random weights and compares the five outputs with the integer
// reference model; also checks the start-to-done latency HO1 + HO2 + 5.
// Uses a 32-bin portion and small layer widths to keep the run short.
module tb_tcnn_portion;
  import tcnn_pkg::*;
  localparam int H = 32, W = 9, F1 = 3, F2 = 4, NH = 6;
  localparam int HO1 = H - 3, HP1 = HO1 / 4, HO2 = HP1 - 3, NFL = (HO2 / 4) * (W - 4) * F2;
  logic clk = 0, rst_n = 0, start = 0;
  logic img [H][W];
  trit_t w1 [F1][KH][KW][1];
  acc_t  t1_lo [F1], t1_hi [F1];
  trit_t w2 [F2][KH][KW][F1];
  acc_t  t2_lo [F2], t2_hi [F2];
  trit_t wd [NH][NFL];
  acc_t  td_lo [NH], td_hi [NH];
  trit_t wo [N_OUT][NH];
  logic signed [15:0] gamma [N_OUT], beta [N_OUT];
  logic [7:0] y [N_OUT];
  logic done;
  int checks = 0, failures = 0;
  int imf[], w1f[], l1[], h1[], w2f[], l2[], h2[], wdf[], ld[], hd[], wof[], g[], b[], ye[];
  int n_lo = 0, n_hi = 0;

  tcnn_portion #(.H(H), .W(W), .F1(F1), .F2(F2), .N_HID(NH)) dut (
    .clk, .rst_n, .start, .img, .w1, .t1_lo, .t1_hi, .w2, .t2_lo, .t2_hi,
    .wd, .td_lo, .td_hi, .wo, .gamma, .beta, .y, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomise();
    imf = new[H*W]; w1f = new[F1*12]; l1 = new[F1]; h1 = new[F1];
    w2f = new[F2*12*F1]; l2 = new[F2]; h2 = new[F2];
    wdf = new[NH*NFL]; ld = new[NH]; hd = new[NH]; wof = new[N_OUT*NH];
    g = new[N_OUT]; b = new[N_OUT];
    foreach (imf[i]) imf[i] = ($urandom % 100 < 25) ? 1 : 0;
    foreach (w1f[i]) w1f[i] = tcnn_ref_pkg::rtrit(30);
    foreach (w2f[i]) w2f[i] = tcnn_ref_pkg::rtrit(30);
    foreach (wdf[i]) wdf[i] = tcnn_ref_pkg::rtrit(30);
    foreach (wof[i]) wof[i] = tcnn_ref_pkg::rtrit(20);
    foreach (l1[i]) begin l1[i] = -int'($urandom % 3) - 1; h1[i] = int'($urandom % 3); end
    foreach (l2[i]) begin l2[i] = -int'($urandom % 4) - 1; h2[i] = int'($urandom % 4); end
    foreach (ld[i]) begin ld[i] = -int'($urandom % 3) - 1; hd[i] = int'($urandom % 3); end
    foreach (g[i])  begin g[i] = int'($urandom % 513) - 256; b[i] = int'($urandom % 1025) - 512; end
    for (int h = 0; h < H; h++) for (int l = 0; l < W; l++) img[h][l] = imf[h*W + l][0];
    for (int f = 0; f < F1; f++) begin
      t1_lo[f] = acc_t'(l1[f]); t1_hi[f] = acc_t'(h1[f]);
      for (int k = 0; k < 12; k++) w1[f][k/3][k%3][0] = trit_t'(w1f[f*12 + k]);
    end
    for (int f = 0; f < F2; f++) begin
      t2_lo[f] = acc_t'(l2[f]); t2_hi[f] = acc_t'(h2[f]);
      for (int k = 0; k < 12; k++) for (int c = 0; c < F1; c++) w2[f][k/3][k%3][c] = trit_t'(w2f[(f*12 + k)*F1 + c]);
    end
    for (int j = 0; j < NH; j++) begin
      td_lo[j] = acc_t'(ld[j]); td_hi[j] = acc_t'(hd[j]);
      for (int i = 0; i < NFL; i++) wd[j][i] = trit_t'(wdf[j*NFL + i]);
    end
    for (int j = 0; j < N_OUT; j++) begin
      gamma[j] = 16'(g[j]); beta[j] = 16'(b[j]);
      for (int i = 0; i < NH; i++) wo[j][i] = trit_t'(wof[j*NH + i]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int lat;
      @(negedge clk);
      randomise();
      tcnn_ref_pkg::portion(imf, H, W, F1, F2, NH, w1f, l1, h1, w2f, l2, h2, wdf, ld, hd, wof, g, b, ye);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (lat != HO1 + HO2 + 5) begin failures++; $display("latency %0d expected %0d", lat, HO1 + HO2 + 5); end
      for (int k = 0; k < N_OUT; k++) begin
        checks++;
        if (int'(y[k]) != ye[k]) begin failures++; $display("it %0d y[%0d] got %0d exp %0d", it, k, y[k], ye[k]); end
        if (ye[k] < 128) n_lo++; else n_hi++;
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("outputs not varied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
