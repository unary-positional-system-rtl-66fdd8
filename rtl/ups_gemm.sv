// ups_gemm: UPS general matrix multiplication C = A B, with A of M x KD,
// B of KD x P and C of M x P, as an M x P array of processing elements.
//
// PE(i,j) receives row i of A (the KD streams A[i][0..KD-1], shared by every
// PE of that row) and column j of B (B[0..KD-1][j], shared by every PE of that
// column) and forms the dot product C[i][j] with KD multipliers and a KD-input
// UPS adder. All PEs run in lockstep from the same en/rw/rst, so done of
// PE(0,0) stands for the whole array.
//
// Interface and timing: every element is a UP(R,N) number carried as N
// R-slot streams; every C element has NC = 2N + G positions (R^G >= KD).
// en=1, rw=1 starts (slot 0 of the operand streams) and is held until done;
// then en=1, rw=0 reads all of C in parallel for R cycles.
// The array and its row/column broadcast follow the original structure; the
// lockstep control is this implementation's choice.
module ups_gemm #(
  parameter int unsigned R       = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned M       = 4,
  parameter int unsigned KD      = 4,
  parameter int unsigned P       = 4,
  parameter bit          BIPOLAR = 1'b1,
  localparam int unsigned NC = 2 * N + ups_pkg::clog_r(KD, R)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic                          rw,
  input  logic [M-1:0][KD-1:0][N-1:0]   a,
  input  logic [KD-1:0][P-1:0][N-1:0]   b,
  output logic [M-1:0][P-1:0][NC-1:0]   c,
  output logic                          done
);

  logic [M-1:0][P-1:0] pe_done;

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < P; j++) begin : g_col
      logic [KD-1:0][N-1:0] b_col;
      for (genvar k = 0; k < KD; k++) begin : g_k
        assign b_col[k] = b[k][j];
      end
      ups_pe #(.R(R), .N(N), .K(KD), .BIPOLAR(BIPOLAR)) u_pe (
        .clk (clk),
        .rst (rst),
        .en  (en),
        .rw  (rw),
        .a   (a[i]),
        .b   (b_col),
        .c   (c[i][j]),
        .done(pe_done[i][j])
      );
    end
  end

  assign done = pe_done[0][0];

  always_ff @(posedge clk)
    if (!rst) assert (pe_done == '0 || pe_done == '1)
      else $error("ups_gemm: processing elements out of step");

endmodule
