// tb_bn_ternary_act: checks the folded batch-norm ternary activation on
// random sums and thresholds, including sums exactly on each threshold.
module tb_bn_ternary_act;
  import tcnn_pkg::*;
  localparam int N = 8;
  acc_t s [N], lo [N], hi [N];
  trit_t a [N];
  int checks = 0, failures = 0;
  int npos = 0, nneg = 0, nzero = 0;

  bn_ternary_act #(.N(N)) dut (.s, .lo, .hi, .a);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < N; i++) begin
        automatic int l = int'($urandom % 41) - 20;
        automatic int h = l + int'($urandom % 20);
        automatic int v;
        case ($urandom % 4)
          0: v = l;
          1: v = h;
          default: v = int'($urandom % 81) - 40;
        endcase
        lo[i] = acc_t'(l); hi[i] = acc_t'(h); s[i] = acc_t'(v);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        automatic int exp_v = (int'(s[i]) > int'(hi[i])) ? 1 : (int'(s[i]) < int'(lo[i])) ? -1 : 0;
        checks++;
        if (int'(a[i]) != exp_v) begin
          failures++;
          $display("mismatch s=%0d lo=%0d hi=%0d got %0d exp %0d", s[i], lo[i], hi[i], a[i], exp_v);
        end
        if (exp_v > 0) npos++; else if (exp_v < 0) nneg++; else nzero++;
      end
    end
    checks++;
    if (npos == 0 || nneg == 0 || nzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
