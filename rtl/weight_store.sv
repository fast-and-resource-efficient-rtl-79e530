// weight_store: parameter memory of the ternary CNN.
//
// Holds every trained parameter of the network and presents all of them in
// parallel to the layers, which is how a fully unrolled FPGA network reads
// its weights. It is loaded word by word through a simple write port
// (cfg_we, cfg_addr, cfg_data), one parameter per address, in this order:
//   conv1 weights   F1*4*3*1      index ((f*4+kh)*3+kw)*CIN+ci, code in data[1:0]
//   conv1 thr_lo    F1            signed 16-bit
//   conv1 thr_hi    F1
//   conv2 weights   F2*4*3*F1     same index order, CIN = F1
//   conv2 thr_lo/hi F2 each
//   dense weights   N_HID*NFLAT   index j*NFLAT+i
//   dense thr_lo/hi N_HID each
//   output weights  5*N_HID       index j*N_HID+i
//   output gamma    5             signed Q8.8
//   output beta     5             signed Q8.8
// Ternary codes: 01 = +1, 11 = -1, 00 (and 10) = 0. Writes take effect at
// the next clock edge; writes outside the map are ignored. Reset clears the
// thresholds and output terms; the ternary weights are plain memories that
// are not reset and must be loaded before the first event.
// Two bits per weight follow the published ternary network; the address map
// and the write port are this implementation's choice.
module weight_store
  import tcnn_pkg::*;
#(
  parameter int F1    = DEF_F1,
  parameter int F2    = DEF_F2,
  parameter int N_HID = DEF_N_HID,
  parameter int NFLAT = 160,
  localparam int CIN1 = 1,
  localparam int NW1  = F1 * KH * KW * CIN1,
  localparam int NW2  = F2 * KH * KW * F1,
  localparam int NWD  = N_HID * NFLAT,
  localparam int NWO  = N_OUT * N_HID,
  localparam int A_W1  = 0,
  localparam int A_T1L = A_W1  + NW1,
  localparam int A_T1H = A_T1L + F1,
  localparam int A_W2  = A_T1H + F1,
  localparam int A_T2L = A_W2  + NW2,
  localparam int A_T2H = A_T2L + F2,
  localparam int A_WD  = A_T2H + F2,
  localparam int A_TDL = A_WD  + NWD,
  localparam int A_TDH = A_TDL + N_HID,
  localparam int A_WO  = A_TDH + N_HID,
  localparam int A_GAM = A_WO  + NWO,
  localparam int A_BET = A_GAM + N_OUT,
  localparam int A_END = A_BET + N_OUT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data,
  output trit_t              w1    [F1][KH][KW][CIN1],
  output acc_t               t1_lo [F1],
  output acc_t               t1_hi [F1],
  output trit_t              w2    [F2][KH][KW][F1],
  output acc_t               t2_lo [F2],
  output acc_t               t2_hi [F2],
  output trit_t              wd    [N_HID][NFLAT],
  output acc_t               td_lo [N_HID],
  output acc_t               td_hi [N_HID],
  output trit_t              wo    [N_OUT][N_HID],
  output logic signed [15:0] gamma [N_OUT],
  output logic signed [15:0] beta  [N_OUT]
);
  // The map must fit the address space.
  if (A_END > (1 << CFG_AW)) begin : g_map_too_big
    $error("weight_store: parameter map exceeds the configuration address space");
  end

  trit_t              m_w1 [NW1];
  trit_t              m_w2 [NW2];
  trit_t              m_wd [NWD];
  trit_t              m_wo [NWO];
  logic signed [15:0] m_t1l [F1],    m_t1h [F1];
  logic signed [15:0] m_t2l [F2],    m_t2h [F2];
  logic signed [15:0] m_tdl [N_HID], m_tdh [N_HID];
  logic signed [15:0] m_gam [N_OUT], m_bet [N_OUT];

  int    a;
  trit_t t;
  assign a = int'(cfg_addr);
  assign t = trit_from_code(cfg_data[1:0]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < F1; i++)    begin m_t1l[i] <= '0; m_t1h[i] <= '0; end
      for (int i = 0; i < F2; i++)    begin m_t2l[i] <= '0; m_t2h[i] <= '0; end
      for (int i = 0; i < N_HID; i++) begin m_tdl[i] <= '0; m_tdh[i] <= '0; end
      for (int i = 0; i < N_OUT; i++) begin m_gam[i] <= '0; m_bet[i] <= '0; end
    end else if (cfg_we) begin
      if      (a >= A_T1L && a < A_T1H) m_t1l[a - A_T1L] <= cfg_data;
      else if (a >= A_T1H && a < A_W2)  m_t1h[a - A_T1H] <= cfg_data;
      else if (a >= A_T2L && a < A_T2H) m_t2l[a - A_T2L] <= cfg_data;
      else if (a >= A_T2H && a < A_WD)  m_t2h[a - A_T2H] <= cfg_data;
      else if (a >= A_TDL && a < A_TDH) m_tdl[a - A_TDL] <= cfg_data;
      else if (a >= A_TDH && a < A_WO)  m_tdh[a - A_TDH] <= cfg_data;
      else if (a >= A_GAM && a < A_BET) m_gam[a - A_GAM] <= cfg_data;
      else if (a >= A_BET && a < A_END) m_bet[a - A_BET] <= cfg_data;
    end

  // Ternary weights: plain memories without reset, written one entry per
  // cycle; they must be loaded before the first event.
  always_ff @(posedge clk) begin
    if (cfg_we && a >= A_W1 && a < A_T1L) m_w1[a - A_W1] <= t;
    if (cfg_we && a >= A_W2 && a < A_T2L) m_w2[a - A_W2] <= t;
    if (cfg_we && a >= A_WD && a < A_TDL) m_wd[a - A_WD] <= t;
    if (cfg_we && a >= A_WO && a < A_GAM) m_wo[a - A_WO] <= t;
  end

  // Parallel read-out in the shapes the layers use (wiring only).
  for (genvar f = 0; f < F1; f++) begin : g_c1
    assign t1_lo[f] = acc_t'(m_t1l[f]);
    assign t1_hi[f] = acc_t'(m_t1h[f]);
    for (genvar k = 0; k < KH*KW*CIN1; k++) begin : g_k
      assign w1[f][k/(KW*CIN1)][(k/CIN1)%KW][k%CIN1] = m_w1[f*KH*KW*CIN1 + k];
    end
  end
  for (genvar f = 0; f < F2; f++) begin : g_c2
    assign t2_lo[f] = acc_t'(m_t2l[f]);
    assign t2_hi[f] = acc_t'(m_t2h[f]);
    for (genvar k = 0; k < KH*KW*F1; k++) begin : g_k
      assign w2[f][k/(KW*F1)][(k/F1)%KW][k%F1] = m_w2[f*KH*KW*F1 + k];
    end
  end
  for (genvar j = 0; j < N_HID; j++) begin : g_d
    assign td_lo[j] = acc_t'(m_tdl[j]);
    assign td_hi[j] = acc_t'(m_tdh[j]);
    for (genvar i = 0; i < NFLAT; i++) begin : g_i
      assign wd[j][i] = m_wd[j*NFLAT + i];
    end
  end
  for (genvar j = 0; j < N_OUT; j++) begin : g_o
    assign gamma[j] = m_gam[j];
    assign beta[j]  = m_bet[j];
    for (genvar i = 0; i < N_HID; i++) begin : g_i
      assign wo[j][i] = m_wo[j*N_HID + i];
    end
  end
endmodule
