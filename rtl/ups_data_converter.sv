// ups_data_converter: makes the complement of UPS numbers in flight,
// according to a sign, so that the following UPS adder subtracts.
//
// The complement of a UP(R,ND) number is R^ND minus it: every digit d becomes
// R-1-d, and one is added at position 0. On a digit stream R-1-d is obtained
// by inverting its first R-1 slots (the last slot stays 0). For each of CH
// channels with neg=1 the converter inverts the data slots of all ND streams
// and raises add_one in slot 0; the adder downstream counts add_one as a
// carry into its position 0. Channels with neg=0 pass unchanged.
// first and last mark slots 0 and R-1 of the streams; the converter itself
// is combinational. Handing the "+1" to the adder's carry input instead of
// adding it here is this implementation's choice.
module ups_data_converter #(
  parameter int unsigned ND = 5,
  parameter int unsigned CH = 2
) (
  input  logic [CH-1:0][ND-1:0] din,
  input  logic [CH-1:0]         neg,
  input  logic                  first,
  input  logic                  last,
  output logic [CH-1:0][ND-1:0] dout,
  output logic [CH-1:0]         add_one
);

  always_comb begin
    for (int ch = 0; ch < CH; ch++) begin
      for (int n = 0; n < ND; n++)
        dout[ch][n] = neg[ch] ? (!din[ch][n] && !last) : din[ch][n];
      add_one[ch] = neg[ch] && first;
    end
  end

endmodule
