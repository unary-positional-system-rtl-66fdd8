// ups_pkg: constants and helper functions shared by the Unary Positional
// System (UPS) arithmetic blocks.
//
// A UPS number UP(R,N) has N spatial positions of weight R^n. Each position is
// carried by one wire as a bit stream of R clock cycles ("slots"); the digit
// value is the number of 1s in the stream. Slot R-1, the last one, is always 0.
// The helpers below size the counters and the guard positions used when
// several UPS numbers are summed.
package ups_pkg;

  // Smallest g with r**g >= k: positions needed to hold a count of k values.
  function automatic int unsigned clog_r(input int unsigned k, input int unsigned r);
    int unsigned g;
    longint unsigned p;
    g = 0;
    p = 1;
    while (p < longint'(k)) begin
      p = p * longint'(r);
      g++;
    end
    return g;
  endfunction

  // Width of a binary register that holds 0 .. r-1.
  function automatic int unsigned digit_width(input int unsigned r);
    return (r > 2) ? $clog2(r) : 1;
  endfunction

endpackage
