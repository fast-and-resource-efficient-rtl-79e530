// tb_portion_merge: checks the merging of portion outputs into leading and
// sub-leading muon, muon count and trigger bit against a candidate-sorting
// reference, with many equal-pT cases, and the one-cycle latency.
module tb_portion_merge;
  import tcnn_pkg::*;
  localparam int P = 4, H = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] y [P][N_OUT];
  logic [7:0] pt_thr;
  result_t res;
  logic out_valid;
  int checks = 0, failures = 0;
  int yi[][];
  tcnn_ref_pkg::res_t e;
  int n_trig = 0, n_notrig = 0, n_sub = 0, n_empty = 0;

  portion_merge #(.P(P), .H(H)) dut (.clk, .rst_n, .in_valid, .y, .pt_thr, .res, .out_valid);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s got %0d exp %0d", what, got, exp_v); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    yi = new[P];
    foreach (yi[p]) yi[p] = new[N_OUT];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++)
        for (int k = 0; k < N_OUT; k++) begin
          // pT drawn from a few values so that ties occur
          yi[p][k] = (k == 0 || k == 2) ? 40 * int'($urandom % 7) : int'($urandom % 256);
          // every tenth event: no portion reports a muon
          if (k == 4 && it % 10 == 0) yi[p][k] = int'($urandom % 40);
          y[p][k] = 8'(yi[p][k]);
        end
      pt_thr = 8'($urandom % 256);
      e = tcnn_ref_pkg::merge(yi, H, int'(pt_thr));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk("out_valid", int'(out_valid), 1);
      chk("trig", int'(res.trig), e.trig);
      chk("n_muons", int'(res.n_muons), e.n);
      chk("lead_valid", int'(res.lead_valid), e.lv);
      chk("sub_valid", int'(res.sub_valid), e.sv);
      if (e.lv) begin chk("lead_pt", int'(res.lead_pt), e.lpt); chk("lead_eta", int'(res.lead_eta), e.leta); end
      if (e.sv) begin chk("sub_pt", int'(res.sub_pt), e.spt); chk("sub_eta", int'(res.sub_eta), e.seta); end
      if (e.trig) n_trig++; else n_notrig++;
      if (e.sv) n_sub++;
      if (!e.lv) n_empty++;
      @(negedge clk);
      chk("out_valid low", int'(out_valid), 0);
    end
    checks++;
    if (n_trig == 0 || n_notrig == 0 || n_sub == 0 || n_empty == 0) begin
      failures++; $display("cases not covered %0d %0d %0d %0d", n_trig, n_notrig, n_sub, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
