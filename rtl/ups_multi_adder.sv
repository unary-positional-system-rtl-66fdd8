// ups_multi_adder: K-input UPS adder ("UPS+" of the GEMM processing element),
// summing K numbers UP(R,ND) modulo R^ND.
//
// One K-input CMem per position counts the 1s of all K operand streams of
// that position in the same cycle; wraps go to the next position as a carry
// count (0..K) one cycle later. The carry out of the top position is dropped,
// which is the modulo behaviour needed for complement (bipolar) operands; the
// caller sizes ND so that unipolar sums never reach it.
//
// Timing, as for ups_adder: write (rw=1) for R cycles of operand streams plus
// ND cycles with zero inputs for the carries to settle, then read (rw=0) for
// R cycles to play the sum back on dout.
// A many-input adder is named in the design but its insides are not given;
// the one-CMem-per-position structure is this implementation's choice.
module ups_multi_adder #(
  parameter int unsigned R  = 4,
  parameter int unsigned ND = 9,
  parameter int unsigned K  = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic                  rw,
  input  logic [K-1:0][ND-1:0]  din,
  output logic [ND-1:0]         dout
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [CW-1:0] carry [ND+1];
  assign carry[0] = '0;

  for (genvar n = 0; n < ND; n++) begin : g_pos
    logic [K-1:0] col;
    logic [ups_pkg::digit_width(R)-1:0] unused_value;
    for (genvar k = 0; k < K; k++) begin : g_in
      assign col[k] = din[k][n];
    end
    ups_cmem #(.R(R), .NIN(K)) u_cm (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .rw   (rw),
      .din  (col),
      .cin  (carry[n]),
      .c    (carry[n+1]),
      .dout (dout[n]),
      .value(unused_value)
    );
  end

endmodule
