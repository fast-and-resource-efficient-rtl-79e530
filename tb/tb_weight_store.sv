// tb_weight_store: fills the parameter memory through the configuration port
// with random contents, then checks every read-out array element against a
// shadow copy; also checks that writes beyond the map change nothing and
// that reset clears the thresholds and output terms but keeps the weights. Uses small layer sizes.
module tb_weight_store;
  import tcnn_pkg::*;
  localparam int F1 = 3, F2 = 4, NH = 5, NFL = 7;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  trit_t w1 [F1][KH][KW][1];
  acc_t  t1_lo [F1], t1_hi [F1];
  trit_t w2 [F2][KH][KW][F1];
  acc_t  t2_lo [F2], t2_hi [F2];
  trit_t wd [NH][NFL];
  acc_t  td_lo [NH], td_hi [NH];
  trit_t wo [N_OUT][NH];
  logic signed [15:0] gamma [N_OUT], beta [N_OUT];
  int checks = 0, failures = 0;
  int total;
  int mem[];   // value expected at each address, as a signed int

  weight_store #(.F1(F1), .F2(F2), .N_HID(NH), .NFLAT(NFL)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
    .w1, .t1_lo, .t1_hi, .w2, .t2_lo, .t2_hi, .wd, .td_lo, .td_hi, .wo, .gamma, .beta);

  always #5 clk = ~clk;

  task automatic chk(int got, int addr);
    checks++;
    if (got != mem[addr]) begin
      failures++;
      $display("address %0d read %0d expected %0d", addr, got, mem[addr]);
    end
  endtask

  task automatic check_all();
    int a = 0;
    for (int f = 0; f < F1; f++) for (int i = 0; i < 12; i++) chk(int'(w1[f][i/3][i%3][0]), a++);
    for (int f = 0; f < F1; f++) chk(int'(t1_lo[f]), a++);
    for (int f = 0; f < F1; f++) chk(int'(t1_hi[f]), a++);
    for (int f = 0; f < F2; f++) for (int i = 0; i < 12; i++) for (int c = 0; c < F1; c++)
      chk(int'(w2[f][i/3][i%3][c]), a++);
    for (int f = 0; f < F2; f++) chk(int'(t2_lo[f]), a++);
    for (int f = 0; f < F2; f++) chk(int'(t2_hi[f]), a++);
    for (int j = 0; j < NH; j++) for (int i = 0; i < NFL; i++) chk(int'(wd[j][i]), a++);
    for (int j = 0; j < NH; j++) chk(int'(td_lo[j]), a++);
    for (int j = 0; j < NH; j++) chk(int'(td_hi[j]), a++);
    for (int j = 0; j < N_OUT; j++) for (int i = 0; i < NH; i++) chk(int'(wo[j][i]), a++);
    for (int j = 0; j < N_OUT; j++) chk(int'(gamma[j]), a++);
    for (int j = 0; j < N_OUT; j++) chk(int'(beta[j]), a++);
    checks++;
    if (a != total) begin failures++; $display("map size %0d, expected %0d", a, total); end
  endtask

  // Addresses holding ternary weights.
  function automatic bit is_trit(int a);
    int b1 = F1*12, b2 = b1 + 2*F1, b3 = b2 + F2*12*F1, b4 = b3 + 2*F2, b5 = b4 + NH*NFL;
    int b6 = b5 + 2*NH, b7 = b6 + N_OUT*NH;
    return (a < b1) || (a >= b2 && a < b3) || (a >= b4 && a < b5) || (a >= b6 && a < b7);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    total = F1*12 + 2*F1 + F2*12*F1 + 2*F2 + NH*NFL + 2*NH + N_OUT*NH + 2*N_OUT;
    mem = new[total];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < total; a++) begin
        automatic logic [15:0] d = 16'($urandom);
        @(negedge clk);
        cfg_we = 1; cfg_addr = 16'(a); cfg_data = d;
        if (is_trit(a)) mem[a] = (d[1:0] == 2'b01) ? 1 : (d[1:0] == 2'b11) ? -1 : 0;
        else            mem[a] = int'($signed(d));
      end
      @(negedge clk);
      cfg_we = 0;
      check_all();
    end
    // beyond the map
    for (int a = total; a < total + 20; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 16'(a); cfg_data = 16'($urandom);
    end
    @(negedge clk);
    cfg_we = 0;
    check_all();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    foreach (mem[a]) if (!is_trit(a)) mem[a] = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
