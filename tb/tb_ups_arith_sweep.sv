// tb_ups_arith_sweep: workload test of the UPS adder and multiplier over
// (R, N) points from a 3-bit to a 16-bit binary equivalent (R^N = 2^b),
// covering each radix 2, 4, 8, 16 at a small, a medium and the largest
// width. Every point has its own adder, unipolar multiplier and bipolar
// multiplier, and all points run in parallel.
//
// Per operation and point:
//   * adder, unipolar: a + b, with the carry out of the top position
//     checked as the overflow;
//   * adder, complement: a - b formed as a + C(b), where C(b) inverts every
//     digit of b (d -> R-1-d) and the "+1" enters through cin;
//   * multipliers: a * b unipolar, and a * b for signed operands (sign
//     digit 0 or R-1) modulo R^2N;
//   * latencies: adder write R + N; both multipliers finish in the same
//     R + (R-1)^2 + 2N + N(R+2N) cycles.
// The cycles of one addition and one multiplication are printed per point.
module tb_ups_arith_sweep;
  localparam int NCFG = 12;

  function automatic int cfg_r(input int i);
    case (i)
      0, 1, 2: return 2;
      3, 4, 5: return 4;
      6, 7, 8: return 8;
      default: return 16;
    endcase
  endfunction
  function automatic int cfg_n(input int i);
    case (i)
      0: return 3;   1: return 8;   2: return 16;
      3: return 2;   4: return 4;   5: return 8;
      6: return 1;   7: return 3;   8: return 5;
      9: return 1;  10: return 2;  default: return 4;
    endcase
  endfunction

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nfin = 0;
  logic rst;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  for (genvar gi = 0; gi < NCFG; gi++) begin : g_pt
    localparam int unsigned R = cfg_r(gi);
    localparam int unsigned N = cfg_n(gi);
    localparam longint unsigned MOD  = longint'(R) ** N;
    localparam longint unsigned MOD2 = MOD * MOD;
    localparam longint unsigned TOP  = MOD / R;     // weight of the sign digit

    logic a_en, a_rw, a_c;
    logic [1:0] a_cin;
    logic [N-1:0] a_a, a_b, a_s;
    logic m_en, m_rw, mu_done, mb_done;
    logic [N-1:0] mu_a, mu_b, mb_a, mb_b;
    logic [2*N-1:0] mu_p, mb_p;

    ups_adder #(.R(R), .N(N)) u_add (
      .clk, .rst, .en(a_en), .rw(a_rw), .dinA(a_a), .dinB(a_b), .cin(a_cin),
      .dout(a_s), .c(a_c));
    ups_multiplier #(.R(R), .N(N), .BIPOLAR(1'b0)) u_mul_u (
      .clk, .rst, .en(m_en), .rw(m_rw), .dinA(mu_a), .dinB(mu_b), .dout(mu_p), .done(mu_done));
    ups_multiplier #(.R(R), .N(N), .BIPOLAR(1'b1)) u_mul_b (
      .clk, .rst, .en(m_en), .rw(m_rw), .dinA(mb_a), .dinB(mb_b), .dout(mb_p), .done(mb_done));

    function automatic int unsigned dig(input longint unsigned v, input int n);
      return int'((v / (longint'(R) ** n)) % R);
    endfunction
    function automatic longint sval(input longint unsigned w, input longint unsigned m);
      return (w >= m / 2) ? longint'(w) - longint'(m) : longint'(w);
    endfunction
    function automatic longint unsigned rnd(input longint unsigned m);
      return ({$urandom, $urandom} % m);
    endfunction
    function automatic longint unsigned rnd_bip();
      longint unsigned h = rnd(TOP);
      return $urandom_range(0, 1) ? h + (R - 1) * TOP : h;
    endfunction

    // one addition: a + (b or C(b)) + ci; returns the sum and the overflow count
    task automatic add(input longint unsigned a, input longint unsigned b, input bit inv,
                       output longint unsigned sum, output int ovf);
      int unsigned cnt[N];
      @(negedge clk);
      a_en = 1'b1; a_rw = 1'b1; ovf = 0;
      for (int s = 0; s < R + N; s++) begin
        for (int n = 0; n < N; n++) begin
          a_a[n] = (s < dig(a, n));
          a_b[n] = (s < R - 1) && (inv ? (s >= dig(b, n)) : (s < dig(b, n)));
        end
        a_cin = (s == 0 && inv) ? 2'd1 : 2'd0;
        @(negedge clk);
        ovf += a_c;
      end
      a_a = '0; a_b = '0; a_cin = '0;
      a_rw = 1'b0;
      foreach (cnt[n]) cnt[n] = 0;
      for (int s = 0; s < R; s++) begin
        #1;
        for (int n = 0; n < N; n++) cnt[n] += a_s[n];
        @(negedge clk);
        ovf += a_c;
      end
      a_en = 1'b0;
      sum = 0;
      for (int n = N - 1; n >= 0; n--) sum = sum * R + cnt[n];
    endtask

    // one multiplication on both multipliers at once
    task automatic mul(input longint unsigned ua, input longint unsigned ub,
                       input longint unsigned ba, input longint unsigned bb,
                       output longint unsigned pu, output longint unsigned pb,
                       output int lat_u, output int lat_b);
      int unsigned cu[2*N], cb[2*N];
      @(negedge clk);
      m_en = 1'b1; m_rw = 1'b1; lat_u = 0; lat_b = 0;
      for (int s = 0; s < 5000; s++) begin
        for (int n = 0; n < N; n++) begin
          mu_a[n] = (s < dig(ua, n)); mu_b[n] = (s < dig(ub, n));
          mb_a[n] = (s < dig(ba, n)); mb_b[n] = (s < dig(bb, n));
        end
        @(negedge clk);
        if (!mu_done) lat_u++;
        if (!mb_done) lat_b++;
        if (mu_done && mb_done) break;
      end
      lat_u++; lat_b++;
      mu_a = '0; mu_b = '0; mb_a = '0; mb_b = '0;
      m_rw = 1'b0;
      foreach (cu[i]) begin cu[i] = 0; cb[i] = 0; end
      for (int s = 0; s < R; s++) begin
        #1;
        for (int i = 0; i < 2 * N; i++) begin cu[i] += mu_p[i]; cb[i] += mb_p[i]; end
        @(negedge clk);
      end
      m_en = 1'b0;
      pu = 0; pb = 0;
      for (int i = 2 * N - 1; i >= 0; i--) begin pu = pu * R + cu[i]; pb = pb * R + cb[i]; end
    endtask

    initial begin
      longint unsigned a, b, ba, bb, sum, pu, pb;
      int ovf, lat_u, lat_b, tmul;
      a_en = 1'b0; a_rw = 1'b1; a_a = '0; a_b = '0; a_cin = '0;
      m_en = 1'b0; m_rw = 1'b1; mu_a = '0; mu_b = '0; mb_a = '0; mb_b = '0;
      tmul = R + (R - 1) * (R - 1) + 2 * N + N * (R + 2 * N);
      repeat (4) @(negedge clk);   // past reset
      for (int t = 0; t < 6; t++) begin
        a = rnd(MOD); b = rnd(MOD);
        ba = rnd_bip(); bb = rnd_bip();
        if (t == 0) begin a = MOD - 1; b = MOD - 1; ba = (R - 1) * TOP; bb = (R - 1) * TOP; end
        add(a, b, 1'b0, sum, ovf);
        check($sformatf("R=%0d N=%0d a+b", R, N), sum, (a + b) % MOD);
        check($sformatf("R=%0d N=%0d overflow", R, N), ovf, (a + b) / MOD);
        add(a, b, 1'b1, sum, ovf);
        check($sformatf("R=%0d N=%0d a-b", R, N), sum, (a + MOD - b) % MOD);
        mul(a, b, ba, bb, pu, pb, lat_u, lat_b);
        check($sformatf("R=%0d N=%0d unipolar a*b", R, N), pu, a * b);
        check($sformatf("R=%0d N=%0d bipolar a*b", R, N), pb,
              longint'((sval(ba, MOD) * sval(bb, MOD) + longint'(MOD2)) % longint'(MOD2)));
        check($sformatf("R=%0d N=%0d multiplier latency", R, N), lat_u, tmul);
        check($sformatf("R=%0d N=%0d bipolar latency", R, N), lat_b, lat_u);
      end
      $display("R=%0d N=%0d (%0d-bit equivalent): addition %0d cycles, multiplication %0d cycles",
               R, N, $clog2(MOD), 2 * R + N, tmul + R);
      nfin++;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait (nfin == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
