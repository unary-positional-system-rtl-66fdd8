// tb_ups_fft: workload test, complete 4-point and 8-point FFTs run on the
// UPS butterfly in the two operand formats of interest, R=8, N=2 (the
// default) and R=4, N=2, and in the purely unary extreme N=1 (R=16, the
// same 4-bit operand range as R=4, N=2). Each format has its own butterfly
// instance and runs in parallel with the others.
//
// The testbench plays the role of the FFT processor's memory and sequencing:
// an iterative radix-2 decimation-in-time FFT on bit-reversed data, one
// butterfly operation at a time. The butterfly works on integers, so the
// 8-point FFT uses twiddles scaled by S (a power of two that fits N
// positions): W = round(S * exp(-2 pi j k / 8)), x0 is fed as S * x0, and
// the testbench divides each output by S with rounding before storing it.
// The 4-point FFT needs only the twiddles 1 and -j and runs unscaled (S=1).
//
// Checks:
//   * every butterfly output equals S*x0 +/- W*x1, computed here in integers;
//   * the 4-point result equals the direct DFT exactly;
//   * the 8-point result equals a fixed-point reference FFT with the same
//     twiddles and rounding; its largest distance from the exact DFT is
//     printed and must stay within 2.
// Input amplitudes keep every x1 operand within N radix-R positions:
// |x| <= 15 (4-point) and 15 (8-point) at R=8, 7 and 3 at R=4 and R=16.
// The cycles spent per FFT in the butterfly operations are printed.
module tb_ups_fft;
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

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // integer division with rounding to nearest, halves away from zero
  function automatic int rdiv(input int v, input int s);
    return (v >= 0) ? (v + s / 2) / s : -((-v + s / 2) / s);
  endfunction

  function automatic int bitrev3(input int i, input int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

  for (genvar gi = 0; gi < 3; gi++) begin : g_cfg
    localparam int unsigned R   = (gi == 0) ? 8 : (gi == 1) ? 4 : 16;
    localparam int unsigned N   = (gi == 2) ? 1 : 2;
    localparam int unsigned ND  = 2 * N + 1;
    localparam int unsigned VW  = $clog2(R);
    localparam int unsigned MOD = R ** ND;
    localparam int          S8  = (gi == 0) ? 32 : 8;   // 8-point twiddle scale
    localparam int          A4  = (gi == 0) ? 15 : 7;   // 4-point input amplitude
    localparam int          A8  = (gi == 0) ? 15 : 3;   // 8-point input amplitude
    localparam int          NT  = (gi == 2) ? 2 : 3;    // FFTs per size

    logic start, x0_rd, out_valid, busy, done;
    logic [N-1:0][VW-1:0] w_re, w_im, x1_re, x1_im;
    logic [3:0] sign;
    logic [ND-1:0] x0_re, x0_im, y0_re, y0_im, y1_re, y1_im;

    ups_butterfly #(.R(R), .N(N)) dut (
      .clk, .rst, .start, .w_re, .w_im, .x1_re, .x1_im, .sign, .x0_re, .x0_im,
      .x0_rd, .y0_re, .y0_im, .y1_re, .y1_im, .out_valid, .busy, .done);

    function automatic int unsigned wrap(input int v);
      return int'(((v % int'(MOD)) + int'(MOD)) % int'(MOD));
    endfunction
    function automatic int sval(input int unsigned w);
      return (w >= MOD / 2) ? int'(w) - int'(MOD) : int'(w);
    endfunction
    function automatic logic [N-1:0][VW-1:0] digits(input int v);
      logic [N-1:0][VW-1:0] d;
      int unsigned m = (v < 0) ? -v : v;
      for (int n = 0; n < N; n++) begin
        d[n] = VW'(m % R);
        m = m / R;
      end
      return d;
    endfunction

    int unsigned x0r_w, x0i_w;
    int          x0_slot;
    always @(posedge clk) if (x0_rd) x0_slot <= x0_slot + 1;
    always_comb begin
      int unsigned vr, vi;
      vr = x0r_w; vi = x0i_w;
      for (int n = 0; n < ND; n++) begin
        x0_re[n] = x0_rd && (x0_slot < int'(vr % R));
        x0_im[n] = x0_rd && (x0_slot < int'(vi % R));
        vr = vr / R; vi = vi / R;
      end
    end

    int cycles;

    // One butterfly operation on scaled inputs; checks the raw outputs
    // against s*x0 +/- W*x1 and returns them divided by s with rounding.
    task automatic bfly(input int ar, input int ai, input int br, input int bi,
                        input int wr, input int wi, input int s,
                        output int o0r, output int o0i, output int o1r, output int o1i);
      int unsigned c0r[ND], c0i[ND], c1r[ND], c1i[ND], g0r, g0i, g1r, g1i;
      int pr, pi;
      w_re  = digits(wr); w_im  = digits(wi);
      x1_re = digits(br); x1_im = digits(bi);
      sign  = {bi < 0, wi < 0, br < 0, wr < 0};
      x0r_w = wrap(s * ar); x0i_w = wrap(s * ai); x0_slot = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles++;
      while (!out_valid) begin @(negedge clk); cycles++; end
      foreach (c0r[n]) begin c0r[n] = 0; c0i[n] = 0; c1r[n] = 0; c1i[n] = 0; end
      for (int t = 0; t < R; t++) begin
        for (int n = 0; n < ND; n++) begin
          c0r[n] += y0_re[n]; c0i[n] += y0_im[n]; c1r[n] += y1_re[n]; c1i[n] += y1_im[n];
        end
        @(negedge clk);
        cycles++;
      end
      g0r = 0; g0i = 0; g1r = 0; g1i = 0;
      for (int n = ND - 1; n >= 0; n--) begin
        g0r = g0r * R + c0r[n]; g0i = g0i * R + c0i[n];
        g1r = g1r * R + c1r[n]; g1i = g1i * R + c1i[n];
      end
      pr = wr * br - wi * bi;
      pi = wr * bi + wi * br;
      check("butterfly Re X0", sval(g0r), s * ar + pr);
      check("butterfly Im X0", sval(g0i), s * ai + pi);
      check("butterfly Re X1", sval(g1r), s * ar - pr);
      check("butterfly Im X1", sval(g1i), s * ai - pi);
      o0r = rdiv(sval(g0r), s); o0i = rdiv(sval(g0i), s);
      o1r = rdiv(sval(g1r), s); o1i = rdiv(sval(g1i), s);
    endtask

    // Iterative radix-2 DIT FFT of npt points (4 or 8) on the butterfly.
    // With ref_only=1 it computes the same fixed-point FFT in integers.
    task automatic fft(input int npt, input int s, input bit ref_only,
                       input int xr[8], input int xi[8], output int yr[8], output int yi[8]);
      int bits, half, step, k0, k1, wr, wi, c;
      int twr[4], twi[4];
      bits = (npt == 8) ? 3 : 2;
      c = rdiv(int'(real'(s) * 0.70710678 * 1000.0), 1000);
      twr = '{s, c, 0, -c};
      twi = '{0, -c, -s, -c};
      for (int i = 0; i < 8; i++) begin yr[i] = 0; yi[i] = 0; end
      for (int i = 0; i < npt; i++) begin
        yr[bitrev3(i, bits)] = xr[i];
        yi[bitrev3(i, bits)] = xi[i];
      end
      for (int len = 2; len <= npt; len *= 2) begin
        half = len / 2;
        step = 8 / len;
        for (int st = 0; st < npt; st += len)
          for (int j = 0; j < half; j++) begin
            k0 = st + j; k1 = st + j + half;
            wr = twr[j * step]; wi = twi[j * step];
            if (ref_only) begin
              int pr, pi, ar, ai;
              pr = wr * yr[k1] - wi * yi[k1];
              pi = wr * yi[k1] + wi * yr[k1];
              ar = yr[k0]; ai = yi[k0];
              yr[k0] = rdiv(s * ar + pr, s); yi[k0] = rdiv(s * ai + pi, s);
              yr[k1] = rdiv(s * ar - pr, s); yi[k1] = rdiv(s * ai - pi, s);
            end else begin
              bfly(yr[k0], yi[k0], yr[k1], yi[k1], wr, wi, s,
                   yr[k0], yi[k0], yr[k1], yi[k1]);
            end
          end
      end
    endtask

    initial begin
      int xr[8], xi[8], yr[8], yi[8], fr[8], fi[8], er, ei, amp, s;
      real dr, di, maxerr, ang;
      start = 1'b0; sign = '0; w_re = '0; w_im = '0; x1_re = '0; x1_im = '0;
      x0r_w = 0; x0i_w = 0; x0_slot = 0;
      repeat (4) @(negedge clk);   // past reset
      for (int npt = 4; npt <= 8; npt *= 2)
        for (int t = 0; t < NT; t++) begin
          amp = (npt == 4) ? A4 : A8;
          s = (npt == 4) ? 1 : S8;
          for (int n = 0; n < 8; n++) begin
            xr[n] = (n < npt) ? $urandom_range(0, 2 * amp) - amp : 0;
            xi[n] = (n < npt) ? $urandom_range(0, 2 * amp) - amp : 0;
          end
          if (t == 0)   // the largest inputs
            for (int n = 0; n < npt; n++) begin xr[n] = amp; xi[n] = -amp; end
          cycles = 0;
          fft(npt, s, 1'b0, xr, xi, yr, yi);
          maxerr = 0.0;
          if (npt == 4) begin
            // direct DFT with W4 = -j: W4^(nk) cycles 1, -j, -1, j
            for (int k = 0; k < 4; k++) begin
              er = 0; ei = 0;
              for (int n = 0; n < 4; n++)
                case ((n * k) % 4)
                  0: begin er += xr[n]; ei += xi[n]; end
                  1: begin er += xi[n]; ei -= xr[n]; end
                  2: begin er -= xr[n]; ei -= xi[n]; end
                  default: begin er -= xi[n]; ei += xr[n]; end
                endcase
              check("4-point Re X[k]", yr[k], er);
              check("4-point Im X[k]", yi[k], ei);
            end
          end else begin
            fft(npt, s, 1'b1, xr, xi, fr, fi);
            for (int k = 0; k < 8; k++) begin
              check("8-point Re X[k]", yr[k], fr[k]);
              check("8-point Im X[k]", yi[k], fi[k]);
              dr = 0.0; di = 0.0;
              for (int n = 0; n < 8; n++) begin
                ang = -2.0 * 3.14159265358979 * real'(n * k) / 8.0;
                dr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
                di += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
              end
              dr = dr - real'(yr[k]); di = di - real'(yi[k]);
              if (dr < 0.0) dr = -dr;
              if (di < 0.0) di = -di;
              if (dr > maxerr) maxerr = dr;
              if (di > maxerr) maxerr = di;
            end
            checks++;
            if (maxerr > 2.0) begin
              failures++;
              $display("FAIL R=%0d 8-point FFT %0d: distance %f from the exact DFT", R, t, maxerr);
            end
          end
          $display("R=%0d N=%0d %0d-point FFT %0d: %0d cycles in %0d butterfly operations, largest distance from exact DFT %f",
                   R, N, npt, t, cycles, (npt == 4) ? 4 : 12, maxerr);
        end
      nfin++;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait (nfin == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
