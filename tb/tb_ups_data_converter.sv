// tb_ups_data_converter: self-checking test of the complementing data
// converter at ND=3, CH=2 with radix-4 streams. Each channel's number is
// streamed through the converter; the digits counted at the output plus the
// add_one pulse must give the number itself (neg=0) or 4^3 minus it modulo
// 4^3 (neg=1). The worked example 0212 -> 3122 (radix 4, four positions)
// is checked on the three low positions together with the sign position.
module tb_ups_data_converter;
  localparam int unsigned R = 4, ND = 3, CH = 2, MOD = 64;

  int checks = 0, failures = 0;

  logic [CH-1:0][ND-1:0] din, dout;
  logic [CH-1:0]         neg, add_one;
  logic                  first, last;

  ups_data_converter #(.ND(ND), .CH(CH)) dut (.din, .neg, .first, .last, .dout, .add_one);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Stream v through the converter; return digits counted plus add_one.
  task automatic convert(input int unsigned v0, input int unsigned v1,
                         input logic [CH-1:0] ng, output int unsigned r0,
                         output int unsigned r1, output int unsigned ones);
    int unsigned cnt[CH][ND];
    int unsigned v[CH];
    v[0] = v0; v[1] = v1;
    foreach (cnt[c, n]) cnt[c][n] = 0;
    ones = 0;
    neg = ng;
    for (int s = 0; s < R; s++) begin
      first = (s == 0);
      last  = (s == R - 1);
      for (int c = 0; c < CH; c++)
        for (int n = 0; n < ND; n++) din[c][n] = s < ((v[c] >> (2 * n)) & 3);
      #1;
      foreach (cnt[c, n]) cnt[c][n] += dout[c][n];
      ones += add_one[0];
      if (s == R - 1) check("last slot 0", dout, 0);
      #1;
    end
    r0 = 0; r1 = 0;
    for (int n = ND - 1; n >= 0; n--) begin r0 = r0 * R + cnt[0][n]; r1 = r1 * R + cnt[1][n]; end
  endtask

  initial begin
    int unsigned a, b, r0, r1, ones;
    // 0212 -> 3122: low positions 212 become 122 with the +1, sign 0 -> 3
    convert(6'b100110, 6'b000000, 2'b11, r0, r1, ones);
    check("example low positions", (r0 + ones) % MOD, 6'b011010);
    check("sign position 0 -> 3", r1 + 1, MOD);
    for (int t = 0; t < 500; t++) begin
      a = $urandom_range(0, MOD - 1);
      b = $urandom_range(0, MOD - 1);
      neg = 2'($urandom);
      convert(a, b, neg, r0, r1, ones);
      check("ch0", (r0 + ones) % MOD, neg[0] ? (MOD - a) % MOD : a);
      check("ch1", (r1 + (neg[1] ? 1 : 0)) % MOD, neg[1] ? (MOD - b) % MOD : b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
