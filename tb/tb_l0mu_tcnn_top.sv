// tb_l0mu_tcnn_top: end-to-end test of the muon-trigger engine at its
// default size (9 x 384 image, 8 portions).
//
// Loads random ternary weights and thresholds through the configuration
// port, sends hit images made of random noise plus straight and inclined
// tracks, and compares every result with the integer reference model
// (per-portion network, then merge). Events are offered back to back, so
// the input is held off while an event is in flight. Checks the
// accept-to-result latency, and counts how often each mechanism occurred:
// input stalls, weight reloads, trigger on and off, no muon, a sub-leading
// muon, leading and sub-leading in one portion and in two portions.
module tb_l0mu_tcnn_top;
  import tcnn_pkg::*;
  localparam int NL = DEF_N_LAYERS, NE = DEF_N_ETA, NP = DEF_N_PORT;
  localparam int F1 = DEF_F1, F2 = DEF_F2, NH = DEF_N_HID, HP = NE / NP;
  localparam int HO1 = HP - 3, HO2 = HO1 / 4 - 3;
  localparam int NFL = (HO2 / 4) * (NL - 4) * F2;
  localparam int LAT = HO1 + HO2 + 7;
  localparam int NEV = 24, RELOAD = 6;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  logic in_valid = 0, in_ready;
  logic hits [NL][NE];
  logic [7:0] pt_thr = '0;
  logic out_valid;
  result_t res;

  int checks = 0, failures = 0;
  int w1f[], l1[], h1[], w2f[], l2[], h2[], wdf[], ld[], hd[], wof[], g[], b[];
  tcnn_ref_pkg::res_t exp_q[$];
  int port_q[$][2];     // portions of lead and sub-lead, for the mechanism counts
  int acc_t_q[$];
  int cyc = 0;
  int n_stall = 0, n_reload = 0, n_trig = 0, n_notrig = 0, n_none = 0, n_sub = 0;
  int n_same = 0, n_diff = 0, n_done = 0;

  l0mu_tcnn_top dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .in_valid, .in_ready,
                     .hits, .pt_thr, .out_valid, .res);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s got %0d exp %0d", what, got, exp_v); end
  endtask

  task automatic load_weights();
    int vals[$];
    w1f = new[F1*12]; l1 = new[F1]; h1 = new[F1];
    w2f = new[F2*12*F1]; l2 = new[F2]; h2 = new[F2];
    wdf = new[NH*NFL]; ld = new[NH]; hd = new[NH]; wof = new[N_OUT*NH];
    g = new[N_OUT]; b = new[N_OUT];
    foreach (w1f[i]) w1f[i] = tcnn_ref_pkg::rtrit(30);
    foreach (w2f[i]) w2f[i] = tcnn_ref_pkg::rtrit(40);
    foreach (wdf[i]) wdf[i] = tcnn_ref_pkg::rtrit(50);
    foreach (wof[i]) wof[i] = tcnn_ref_pkg::rtrit(30);
    foreach (l1[i]) begin l1[i] = -int'($urandom % 2) - 1; h1[i] = int'($urandom % 2); end
    foreach (l2[i]) begin l2[i] = -int'($urandom % 4) - 1; h2[i] = int'($urandom % 4); end
    foreach (ld[i]) begin ld[i] = -int'($urandom % 4) - 1; hd[i] = int'($urandom % 4); end
    foreach (g[i])  begin g[i] = int'($urandom % 257) - 128; b[i] = int'($urandom % 1025) - 512; end
    // third weight set: the muon-count output is held near zero
    if (n_reload == 2) begin g[4] = 0; b[4] = -2000; end
    foreach (w1f[i]) vals.push_back(tcnn_ref_pkg::code(w1f[i]));
    foreach (l1[i])  vals.push_back(l1[i]);
    foreach (h1[i])  vals.push_back(h1[i]);
    foreach (w2f[i]) vals.push_back(tcnn_ref_pkg::code(w2f[i]));
    foreach (l2[i])  vals.push_back(l2[i]);
    foreach (h2[i])  vals.push_back(h2[i]);
    foreach (wdf[i]) vals.push_back(tcnn_ref_pkg::code(wdf[i]));
    foreach (ld[i])  vals.push_back(ld[i]);
    foreach (hd[i])  vals.push_back(hd[i]);
    foreach (wof[i]) vals.push_back(tcnn_ref_pkg::code(wof[i]));
    foreach (g[i])   vals.push_back(g[i]);
    foreach (b[i])   vals.push_back(b[i]);
    foreach (vals[a]) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = CFG_AW'(a); cfg_data = CFG_DW'(vals[a]);
    end
    @(negedge clk);
    cfg_we = 0;
    n_reload++;
  endtask

  // Random noise plus a few tracks: a hit in every layer at a bin that moves
  // linearly with the layer index.
  task automatic make_image(output int im[][]);
    im = new[NL];
    foreach (im[l]) begin
      im[l] = new[NE];
      foreach (im[l][e]) im[l][e] = ($urandom % 100 < 3) ? 1 : 0;
    end
    for (int m = 0; m < int'($urandom % 4); m++) begin
      int e0 = int'($urandom % NE);
      int sl = int'($urandom % 7) - 3;
      for (int l = 0; l < NL; l++) begin
        int e = e0 + (sl * l) / 2;
        if (e >= 0 && e < NE) im[l][e] = 1;
      end
    end
  endtask

  function automatic tcnn_ref_pkg::res_t reference(int im[][], int thr, output int lp, output int sp);
    int y[][];
    y = new[NP];
    for (int p = 0; p < NP; p++) begin
      int img[];
      img = new[HP*NL];
      for (int h = 0; h < HP; h++) for (int l = 0; l < NL; l++) img[h*NL + l] = im[l][p*HP + h];
      tcnn_ref_pkg::portion(img, HP, NL, F1, F2, NH, w1f, l1, h1, w2f, l2, h2, wdf, ld, hd, wof, g, b, y[p]);
    end
    reference = tcnn_ref_pkg::merge(y, HP, thr);
    lp = reference.leta / HP;
    sp = reference.seta / HP;
  endfunction

  // Driver
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < NEV; ev++) begin
      int im[][];
      int lp, sp;
      tcnn_ref_pkg::res_t e;
      if (ev % RELOAD == 0) begin
        // weights change only between events
        while (exp_q.size() != 0 || !in_ready) @(negedge clk);
        load_weights();
      end
      @(negedge clk);
      make_image(im);
      pt_thr = 8'($urandom % 256);
      for (int l = 0; l < NL; l++) for (int x = 0; x < NE; x++) hits[l][x] = im[l][x][0];
      e = reference(im, int'(pt_thr), lp, sp);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) begin n_stall++; @(posedge clk); end
      exp_q.push_back(e);
      port_q.push_back('{lp, sp});
      acc_t_q.push_back(cyc);
      @(negedge clk);
      in_valid = 0;
    end
    while (n_done < NEV) @(negedge clk);
    repeat (5) @(negedge clk);
    chk("no extra results", n_done, NEV);
    checks++;
    if (n_stall == 0)  begin failures++; $display("input stall never happened"); end
    checks++;
    if (n_reload < 2)  begin failures++; $display("weight reload never happened"); end
    checks++;
    if (n_trig == 0)   begin failures++; $display("trigger never fired"); end
    checks++;
    if (n_notrig == 0) begin failures++; $display("trigger never rejected"); end
    checks++;
    if (n_none == 0)   begin failures++; $display("event without muon never happened"); end
    checks++;
    if (n_sub == 0)    begin failures++; $display("sub-leading muon never happened"); end
    checks++;
    if (n_same == 0)   begin failures++; $display("lead and sub-lead never in one portion"); end
    checks++;
    if (n_diff == 0)   begin failures++; $display("lead and sub-lead never in two portions"); end
    $display("stalls=%0d reloads=%0d trig=%0d notrig=%0d none=%0d sub=%0d same=%0d diff=%0d",
             n_stall, n_reload, n_trig, n_notrig, n_none, n_sub, n_same, n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    tcnn_ref_pkg::res_t e;
    int pp[2];
    int t0;
    if (exp_q.size() == 0) begin
      failures++; checks++;
      $display("unexpected result");
    end else begin
      e = exp_q.pop_front();
      pp = port_q.pop_front();
      t0 = acc_t_q.pop_front();
      chk("latency", cyc - t0, LAT);
      chk("trig", int'(res.trig), e.trig);
      chk("n_muons", int'(res.n_muons), e.n);
      chk("lead_valid", int'(res.lead_valid), e.lv);
      chk("sub_valid", int'(res.sub_valid), e.sv);
      if (e.lv) begin chk("lead_pt", int'(res.lead_pt), e.lpt); chk("lead_eta", int'(res.lead_eta), e.leta); end
      if (e.sv) begin chk("sub_pt", int'(res.sub_pt), e.spt); chk("sub_eta", int'(res.sub_eta), e.seta); end
      if (e.trig) n_trig++; else n_notrig++;
      if (!e.lv) n_none++;
      if (e.sv) begin
        n_sub++;
        if (pp[0] == pp[1]) n_same++; else n_diff++;
      end
      n_done++;
    end
  end
endmodule
