// ups_input_buffer: operand buffer of the FFT butterfly; stores CH operands
// given as binary-coded UPS digits and generates their UPS bit streams.
//
// load=1 captures all digits (each 0 .. R-1, in binary). While en=1 the
// buffer plays every stored digit d as an R-slot stream, 1 in slots 0..d-1
// and 0 afterwards, so slot R-1 is always 0; a slot counter wraps every R
// cycles, so a stored operand is replayed for as long as en stays high.
// This is the binary-to-UPS bridge at the input of the butterfly. Only its
// function is given in the original design; the thermometer ordering of the
// 1s within a stream and the replay are this implementation's choices.
module ups_input_buffer #(
  parameter int unsigned R  = 8,
  parameter int unsigned N  = 2,
  parameter int unsigned CH = 4,
  localparam int unsigned VW = ups_pkg::digit_width(R)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         load,
  input  logic [CH-1:0][N-1:0][VW-1:0] din,
  input  logic                         en,
  output logic [CH-1:0][N-1:0]         dout
);

  localparam int unsigned SW = $clog2(R + 1);

  logic [CH-1:0][N-1:0][VW-1:0] store;
  logic [SW-1:0]                slot;

  always_ff @(posedge clk) begin
    if (rst) begin
      store <= '0;
      slot  <= '0;
    end else begin
      if (load) begin
        store <= din;
        slot  <= '0;
      end else if (en) begin
        slot <= (slot == SW'(R - 1)) ? '0 : slot + 1'b1;
      end
    end
  end

  always_comb
    for (int ch = 0; ch < CH; ch++)
      for (int n = 0; n < N; n++)
        dout[ch][n] = en && (SW'(store[ch][n]) > slot);

  always_ff @(posedge clk)
    if (!rst && load)
      for (int ch = 0; ch < CH; ch++)
        for (int n = 0; n < N; n++)
          assert (SW'(din[ch][n]) < SW'(R)) else $error("ups_input_buffer: digit %0d >= R", din[ch][n]);

endmodule
