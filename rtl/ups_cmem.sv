// ups_cmem: Counting Memory (CMem), the storage and counting element of all
// UPS arithmetic.
//
// Function: while written (en=1, rw=1) it adds, every clock cycle, the number
// of 1s on its NIN input bit streams plus the carry count arriving on cin to
// the digit it stores. The digit is kept modulo R; each time it reaches R it
// wraps and the number of wraps is sent out on c, registered, one cycle later.
// While read (en=1, rw=0) it plays its digit back as a bit stream on dout: 1
// in the first `digit` cycles, then 0. The read is destructive (it counts the
// digit down), so R read cycles empty the CMem and the last slot is 0.
// With en=0 the CMem holds its digit. rst is synchronous and clears digit and
// carry. `value` shows the stored digit in binary, the CMem's bridge between
// UPS and binary.
//
// NIN=1 is the single-input CMem and NIN=2 the dual-input CMem of the UPS
// design. The carry-in port, the carry count width and the destructive read
// are choices of this implementation: the interface of the original symbol
// has din (or dinA/dinB), en, R/W, clk, rst, c and dout only.
// c counts up to NIN wraps per cycle, which covers any cin up to NIN.
module ups_cmem #(
  parameter int unsigned R   = 4,
  parameter int unsigned NIN = 1,
  localparam int unsigned CW = $clog2(NIN + 1),
  localparam int unsigned VW = ups_pkg::digit_width(R)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic           rw,     // 1: write (count), 0: read (play back)
  input  logic [NIN-1:0] din,
  input  logic [CW-1:0]  cin,    // carries from the position below
  output logic [CW-1:0]  c,      // carries to the position above
  output logic           dout,
  output logic [VW-1:0]  value
);

  localparam int unsigned SW = $clog2(R + 2 * NIN + 1) + 1;

  logic [VW-1:0] count;
  logic [SW-1:0] inc, sum, quo;
  logic [VW-1:0] rem;

  always_comb begin
    inc = SW'(cin);
    for (int i = 0; i < NIN; i++) inc = inc + SW'(din[i]);
    sum = SW'(count) + inc;
    quo = sum / SW'(R);
    rem = VW'(sum % SW'(R));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      c     <= '0;
    end else if (en && rw) begin
      count <= rem;
      c     <= CW'(quo);
    end else begin
      c <= '0;
      if (en && count != '0) count <= count - 1'b1;
    end
  end

  assign dout  = en && !rw && (count != '0);
  assign value = count;

  // The carry count must fit the carry port.
  always_comb
    if (!rst && en && rw) assert (quo <= SW'(NIN))
      else $error("ups_cmem: %0d wraps in one cycle exceed NIN=%0d", quo, NIN);

endmodule
