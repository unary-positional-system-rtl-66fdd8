// ups_adder: N-position UPS adder, UP(R,N) + UP(R,N), built from N dual-input
// CMems stacked into a carry chain.
//
// Position n adds the streams dinA[n] and dinB[n]; when its digit reaches R
// it wraps and passes a carry to position n+1 one cycle later. The carry out
// of the top position is reported on c (overflow for unipolar operands; for
// bipolar operands in complement form it is the discarded modulo carry).
// Because signed numbers are kept as complements, the same adder serves
// unipolar and bipolar addition.
//
// Timing, driven from outside through en and rw:
//   1. write: rw=1 for R cycles while the operand streams arrive, then rw=1
//      for N more cycles with both stream inputs 0 so the carries ripple
//      through all positions (the extra N time steps of a UPS addition);
//   2. read: rw=0 for R cycles; dout[n] plays back sum digit n as a stream.
// cin is an extra carry count into position 0, counted in every write cycle
// it is non-zero; it supplies the "+1" of complemented operands (0..2).
// The cin port is this implementation's addition to the adder symbol.
module ups_adder #(
  parameter int unsigned R = 4,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         rw,
  input  logic [N-1:0] dinA,
  input  logic [N-1:0] dinB,
  input  logic [1:0]   cin,
  output logic [N-1:0] dout,
  output logic         c
);

  logic [1:0] carry [N+1];
  assign carry[0] = cin;

  for (genvar n = 0; n < N; n++) begin : g_pos
    logic [ups_pkg::digit_width(R)-1:0] unused_value;
    ups_cmem #(.R(R), .NIN(2)) u_cm (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .rw   (rw),
      .din  ({dinB[n], dinA[n]}),
      .cin  (carry[n]),
      .c    (carry[n+1]),
      .dout (dout[n]),
      .value(unused_value)
    );
  end

  assign c = |carry[N];

endmodule
