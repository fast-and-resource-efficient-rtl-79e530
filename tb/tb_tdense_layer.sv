// tb_tdense_layer: checks the ternary dense layer sums against a direct
// integer computation, its one-cycle latency and that sums hold between
// starts.
module tb_tdense_layer;
  import tcnn_pkg::*;
  localparam int NIN = 20, NOUT = 6;
  logic clk = 0, rst_n = 0, start = 0;
  trit_t x [NIN];
  trit_t w [NOUT][NIN];
  acc_t  sum [NOUT];
  logic  done;
  int checks = 0, failures = 0;
  int exp_s [NOUT];

  tdense_layer #(.NIN(NIN), .NOUT(NOUT)) dut (.clk, .rst_n, .start, .x, .w, .sum, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      for (int i = 0; i < NIN; i++) x[i] = trit_t'(tcnn_ref_pkg::rtrit(30));
      for (int j = 0; j < NOUT; j++)
        for (int i = 0; i < NIN; i++) w[j][i] = trit_t'(tcnn_ref_pkg::rtrit(30));
      for (int j = 0; j < NOUT; j++) begin
        exp_s[j] = 0;
        for (int i = 0; i < NIN; i++) exp_s[j] += int'(x[i]) * int'(w[j][i]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!done) begin failures++; $display("done not one cycle after start"); end
      // change the inputs: the registered sums must not move
      for (int i = 0; i < NIN; i++) x[i] = trit_t'(tcnn_ref_pkg::rtrit(30));
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done longer than one cycle"); end
      for (int j = 0; j < NOUT; j++) begin
        checks++;
        if (int'(sum[j]) != exp_s[j]) begin
          failures++;
          $display("neuron %0d got %0d exp %0d", j, sum[j], exp_s[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
