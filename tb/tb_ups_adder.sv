// tb_ups_adder: self-checking test of the N-position UPS adder at R=4, N=4.
// Each addition writes the operand streams for R cycles, lets the carries
// settle for N cycles (the adder's R+N write time) and reads the sum for R
// cycles; the digits counted from dout are compared with (A + B + cin)
// modulo R^N, and the overflow pulse on c with the integer carry out.
// Includes the worked example 3102 + 0222 = 3330 (radix 4).
module tb_ups_adder;
  localparam int unsigned R = 4;
  localparam int unsigned N = 4;
  localparam int unsigned MOD = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         rst, en, rw, c;
  logic [N-1:0] a_s, b_s, s_s;
  logic [1:0]   cin;

  ups_adder #(.R(R), .N(N)) dut (
    .clk, .rst, .en, .rw, .dinA(a_s), .dinB(b_s), .cin, .dout(s_s), .c);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  function automatic int unsigned dig(input int unsigned v, input int unsigned n);
    return (v >> (2 * n)) & 3;
  endfunction

  int carries = 0;

  task automatic add(input int unsigned a, input int unsigned b, input int unsigned ci);
    int unsigned cnt[N];
    int unsigned sum, ovf;
    @(negedge clk);
    en = 1'b1; rw = 1'b1;
    ovf = 0;
    for (int s = 0; s < R + N; s++) begin
      for (int n = 0; n < N; n++) begin
        a_s[n] = (s < R) && (s < dig(a, n));
        b_s[n] = (s < R) && (s < dig(b, n));
      end
      cin = (s == 0) ? 2'(ci) : 2'b00;
      @(negedge clk);
      ovf += c;
    end
    a_s = '0; b_s = '0; cin = '0;
    rw = 1'b0;
    foreach (cnt[n]) cnt[n] = 0;
    for (int s = 0; s < R; s++) begin
      #1;
      for (int n = 0; n < N; n++) cnt[n] += s_s[n];
      if (s == R - 1) check("last slot 0", s_s, 0);
      @(negedge clk);
      ovf += c;
    end
    en = 1'b0;
    sum = 0;
    for (int n = N - 1; n >= 0; n--) sum = sum * R + cnt[n];
    check("sum", sum, (a + b + ci) % MOD);
    check("overflow", ovf, (a + b + ci) / MOD);
    if (((a % 4) + (b % 4) + ci) >= 4) carries++;
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; rw = 1'b1; a_s = '0; b_s = '0; cin = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    add(8'hd2, 8'h2a, 0);          // 3102 + 0222 = 3330
    check("example", 8'hd2 + 8'h2a, 8'hfc);
    add(8'hff, 8'h01, 0);          // full ripple through all positions
    add(8'hff, 8'hff, 2);
    for (int t = 0; t < 300; t++)
      add($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 2));
    check("carries exercised", carries > 50, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
