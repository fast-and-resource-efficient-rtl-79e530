// portion_merge: combines the outputs of the eta portions into one event
// result.
//
// Each portion p reports y[p] = {pT lead, eta lead, pT sub-lead, eta
// sub-lead, n} in Q0.8. Its muon count is n_p = round(3 * y4 / 256), 0..3.
// The portion's leading candidate counts when n_p >= 1, its sub-leading
// candidate when n_p >= 2. A candidate's global eta bin is
// p * H + floor(y_eta * H / 256), H being the portion's width in eta bins.
// Among all counted candidates the two with the highest pT become the event's
// leading and sub-leading muon (ties go to the lower portion, lead before
// sub-lead). n_muons is the sum of n_p, and trig is set when a leading muon
// exists with pT >= pt_thr.
// Timing: in_valid in cycle t gives out_valid and res in cycle t+1.
// The five-component output and the pT threshold follow the published
// trigger; how the portions' outputs are combined is this implementation's
// choice.
module portion_merge
  import tcnn_pkg::*;
#(
  parameter int P = DEF_N_PORT,
  parameter int H = DEF_N_ETA / DEF_N_PORT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] y [P][N_OUT],
  input  logic [7:0] pt_thr,
  output result_t    res,
  output logic       out_valid
);
  result_t r_nxt;

  always_comb begin
    logic        bv, sv;
    logic [7:0]  bpt, spt;
    logic [15:0] beta_, seta;
    logic [7:0]  ntot;
    bv = 1'b0; sv = 1'b0; bpt = '0; spt = '0; beta_ = '0; seta = '0; ntot = '0;
    for (int p = 0; p < P; p++) begin
      logic [9:0] n_p;
      n_p  = (10'(y[p][4]) * 10'(N_MAX_PORT) + 10'd128) >> 8;
      ntot = ntot + n_p[7:0];
      for (int k = 0; k < 2; k++) begin
        logic        cv;
        logic [7:0]  cpt;
        logic [15:0] ceta;
        cv   = (n_p > 10'(k));
        cpt  = y[p][2*k];
        ceta = 16'(p * H) + 16'((32'(y[p][2*k+1]) * 32'(H)) >> 8);
        if (cv && (!bv || cpt > bpt)) begin
          sv = bv; spt = bpt; seta = beta_;
          bv = 1'b1; bpt = cpt; beta_ = ceta;
        end else if (cv && (!sv || cpt > spt)) begin
          sv = 1'b1; spt = cpt; seta = ceta;
        end
      end
    end
    r_nxt.trig       = bv && (bpt >= pt_thr);
    r_nxt.n_muons    = ntot;
    r_nxt.lead_valid = bv;
    r_nxt.lead_pt    = bpt;
    r_nxt.lead_eta   = beta_;
    r_nxt.sub_valid  = sv;
    r_nxt.sub_pt     = spt;
    r_nxt.sub_eta    = seta;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      res       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) res <= r_nxt;
    end
endmodule
