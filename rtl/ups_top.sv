// ups_top: the two UPS applications side by side, each with its own ports:
//   - a UPS GEMM (C = A B, M x KD times KD x P, elements UP(G_R, G_N)),
//   - a UPS radix-2 FFT butterfly (operands UP(F_R, F_N) plus sign).
// They share nothing but the clock and reset. Default sizes: the GEMM uses
// the radix-4, 4-position numbers of the worked examples in bipolar form
// with 4 x 4 matrices (the smallest matrix size evaluated); the butterfly
// uses R=8, N=2 plus a sign, the main configuration evaluated for the FFT
// processor. See ups_gemm and ups_butterfly for timing.
module ups_top #(
  parameter int unsigned G_R       = 4,
  parameter int unsigned G_N       = 4,
  parameter int unsigned G_M       = 4,
  parameter int unsigned G_K       = 4,
  parameter int unsigned G_P       = 4,
  parameter bit          G_BIPOLAR = 1'b1,
  parameter int unsigned F_R       = 8,
  parameter int unsigned F_N       = 2,
  localparam int unsigned G_NC = 2 * G_N + ups_pkg::clog_r(G_K, G_R),
  localparam int unsigned F_ND = 2 * F_N + 1,
  localparam int unsigned F_VW = ups_pkg::digit_width(F_R)
) (
  input  logic                                clk,
  input  logic                                rst,
  // GEMM
  input  logic                                g_en,
  input  logic                                g_rw,
  input  logic [G_M-1:0][G_K-1:0][G_N-1:0]    g_a,
  input  logic [G_K-1:0][G_P-1:0][G_N-1:0]    g_b,
  output logic [G_M-1:0][G_P-1:0][G_NC-1:0]   g_c,
  output logic                                g_done,
  // FFT butterfly
  input  logic                                f_start,
  input  logic [F_N-1:0][F_VW-1:0]            f_w_re,
  input  logic [F_N-1:0][F_VW-1:0]            f_w_im,
  input  logic [F_N-1:0][F_VW-1:0]            f_x1_re,
  input  logic [F_N-1:0][F_VW-1:0]            f_x1_im,
  input  logic [3:0]                          f_sign,
  input  logic [F_ND-1:0]                     f_x0_re,
  input  logic [F_ND-1:0]                     f_x0_im,
  output logic                                f_x0_rd,
  output logic [F_ND-1:0]                     f_y0_re,
  output logic [F_ND-1:0]                     f_y0_im,
  output logic [F_ND-1:0]                     f_y1_re,
  output logic [F_ND-1:0]                     f_y1_im,
  output logic                                f_out_valid,
  output logic                                f_busy,
  output logic                                f_done
);

  ups_gemm #(
    .R(G_R), .N(G_N), .M(G_M), .KD(G_K), .P(G_P), .BIPOLAR(G_BIPOLAR)
  ) u_gemm (
    .clk (clk),
    .rst (rst),
    .en  (g_en),
    .rw  (g_rw),
    .a   (g_a),
    .b   (g_b),
    .c   (g_c),
    .done(g_done)
  );

  ups_butterfly #(.R(F_R), .N(F_N)) u_bfly (
    .clk      (clk),
    .rst      (rst),
    .start    (f_start),
    .w_re     (f_w_re),
    .w_im     (f_w_im),
    .x1_re    (f_x1_re),
    .x1_im    (f_x1_im),
    .sign     (f_sign),
    .x0_re    (f_x0_re),
    .x0_im    (f_x0_im),
    .x0_rd    (f_x0_rd),
    .y0_re    (f_y0_re),
    .y0_im    (f_y0_im),
    .y1_re    (f_y1_re),
    .y1_im    (f_y1_im),
    .out_valid(f_out_valid),
    .busy     (f_busy),
    .done     (f_done)
  );

endmodule
