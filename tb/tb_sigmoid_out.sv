// tb_sigmoid_out: compares the fixed-point batch-norm + sigmoid output with
// the exact sigmoid (tolerance 0.025) over all ranges of z, checks symmetry
// and the one-cycle latency.
module tb_sigmoid_out;
  import tcnn_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, in_valid = 0;
  acc_t s [N];
  logic signed [15:0] gamma [N], beta [N];
  logic [7:0] y [N];
  logic out_valid;
  int checks = 0, failures = 0;
  real zr [N];
  int nsat_hi = 0, nsat_lo = 0, nmid = 0;

  sigmoid_out #(.N(N)) dut (.clk, .rst_n, .in_valid, .s, .gamma, .beta, .y, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        s[i]     = acc_t'(int'($urandom % 81) - 40);
        gamma[i] = 16'(int'($urandom % 129) - 64);
        beta[i]  = 16'(int'($urandom % 2049) - 1024);
        zr[i]    = (real'(int'(s[i])) * real'(int'(gamma[i])) + real'(int'(beta[i]))) / 256.0;
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid not one cycle after in_valid"); end
      for (int i = 0; i < N; i++) begin
        automatic real ex = 1.0 / (1.0 + $exp(-zr[i]));
        automatic real got = real'(y[i]) / 256.0;
        automatic real d = (got > ex) ? got - ex : ex - got;
        checks++;
        if (d > 0.025) begin
          failures++;
          $display("z=%f got %f exp %f", zr[i], got, ex);
        end
        if (zr[i] >= 5.0) nsat_hi++; else if (zr[i] <= -5.0) nsat_lo++; else nmid++;
      end
    end
    checks++;
    if (nsat_hi == 0 || nsat_lo == 0 || nmid == 0) begin failures++; $display("range not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
