// tb_ups_top: end-to-end test of the whole design at its default sizes
// (no parameter overrides): the 4x4x4 bipolar UP(4,4) GEMM and the R=8, N=2
// FFT butterfly, run one after the other through the top's ports.
// Every GEMM result element and every butterfly output is compared with
// integer arithmetic. The test also counts how often each mechanism of the
// design occurred and fails if one never did: sign padding (negative
// multiplicand), complemented last partial product (negative multiplier),
// carries between CMems in the GEMM adders, complementing in the butterfly's
// first data converter, and carries in the butterfly adders. Write times
// are checked against the block formulas.
module tb_ups_top;
  localparam int unsigned R = 4, N = 4, M = 4, K = 4, P = 4, NC = 9;
  localparam int unsigned FR = 8, FN = 2, FND = 5;
  localparam longint GMOD = 262144;   // 4^9
  localparam int FMOD = 32768;        // 8^5

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst;
  logic g_en, g_rw, g_done;
  logic [M-1:0][K-1:0][N-1:0]  g_a;
  logic [K-1:0][P-1:0][N-1:0]  g_b;
  logic [M-1:0][P-1:0][NC-1:0] g_c;
  logic f_start, f_x0_rd, f_out_valid, f_busy, f_done;
  logic [FN-1:0][2:0] f_w_re, f_w_im, f_x1_re, f_x1_im;
  logic [3:0] f_sign;
  logic [FND-1:0] f_x0_re, f_x0_im, f_y0_re, f_y0_im, f_y1_re, f_y1_im;

  ups_top dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ------------------------------------------------- mechanism counters
  int n_sign_pad = 0, n_cmpl_row = 0, n_gemm_carry = 0, n_conv = 0, n_bfly_carry = 0;
  always @(posedge clk) begin
    if (dut.u_gemm.g_row[0].g_col[0].u_pe.g_mul[0].u_mul.g_acc[N-1].add_one) n_cmpl_row++;
    if (dut.u_gemm.g_row[0].g_col[0].u_pe.u_sum.carry[1] != '0) n_gemm_carry++;
    if (dut.u_bfly.one1 != '0) n_conv++;
    if (dut.u_bfly.u_y0_re.carry[1] != '0 || dut.u_bfly.u_add_re.carry[1] != '0) n_bfly_carry++;
  end

  // ------------------------------------------------------------------ GEMM
  function automatic longint sv(input int unsigned w);
    return (w >= 128) ? longint'(w) - 256 : longint'(w);
  endfunction

  function automatic int unsigned rnd_bip();
    int unsigned h = $urandom_range(0, 63);
    return $urandom_range(0, 1) ? h + 192 : h;
  endfunction

  task automatic gemm_op();
    int unsigned av[M][K], bv[K][P], cnt[M][P][NC], lat, tmul;
    longint e, g;
    tmul = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);
    foreach (av[i, k]) begin av[i][k] = rnd_bip(); if (av[i][k] >= 192) n_sign_pad++; end
    foreach (bv[k, j]) bv[k][j] = rnd_bip();
    @(negedge clk);
    g_en = 1'b1; g_rw = 1'b1; lat = 0;
    for (int s = 0; s < 5000; s++) begin
      for (int n = 0; n < N; n++) begin
        foreach (av[i, k]) g_a[i][k][n] = (s < R) && (s < ((av[i][k] >> (2 * n)) & 3));
        foreach (bv[k, j]) g_b[k][j][n] = (s < R) && (s < ((bv[k][j] >> (2 * n)) & 3));
      end
      @(negedge clk);
      lat++;
      if (g_done) break;
    end
    g_a = '0; g_b = '0;
    check("GEMM latency", lat, tmul + 1 + R + NC);
    g_rw = 1'b0;
    foreach (cnt[i, j, n]) cnt[i][j][n] = 0;
    for (int s = 0; s < R; s++) begin
      #1;
      foreach (cnt[i, j, n]) cnt[i][j][n] += g_c[i][j][n];
      @(negedge clk);
    end
    g_en = 1'b0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < P; j++) begin
        e = 0;
        for (int k = 0; k < K; k++) e += sv(av[i][k]) * sv(bv[k][j]);
        g = 0;
        for (int n = NC - 1; n >= 0; n--) g = g * R + cnt[i][j][n];
        check("GEMM C element", g, ((e % GMOD) + GMOD) % GMOD);
      end
  endtask

  // -------------------------------------------------------------- butterfly
  int unsigned x0r_w, x0i_w;
  int          x0_slot;
  always @(posedge clk) if (f_x0_rd) x0_slot <= x0_slot + 1;
  always_comb
    for (int n = 0; n < FND; n++) begin
      f_x0_re[n] = f_x0_rd && (x0_slot < ((x0r_w >> (3 * n)) & 7));
      f_x0_im[n] = f_x0_rd && (x0_slot < ((x0i_w >> (3 * n)) & 7));
    end

  function automatic int unsigned wrap(input int v);
    return int'(((v % FMOD) + FMOD) % FMOD);
  endfunction

  task automatic bfly_op();
    int wr, wi, xr, xi, x0r, x0i, pr, pi, lat, tmul;
    int unsigned c0r[FND], c0i[FND], c1r[FND], c1i[FND], g0r, g0i, g1r, g1i;
    tmul = FR + (FR-1)*(FR-1) + 2*FN + FN*(FR + 2*FN);
    f_w_re = 6'($urandom); f_w_im = 6'($urandom); f_x1_re = 6'($urandom); f_x1_im = 6'($urandom);
    f_sign = 4'($urandom);
    wr = f_sign[0] ? -int'(f_w_re) : int'(f_w_re);
    xr = f_sign[1] ? -int'(f_x1_re) : int'(f_x1_re);
    wi = f_sign[2] ? -int'(f_w_im) : int'(f_w_im);
    xi = f_sign[3] ? -int'(f_x1_im) : int'(f_x1_im);
    x0r = $urandom_range(0, 16000) - 8000;
    x0i = $urandom_range(0, 16000) - 8000;
    x0r_w = wrap(x0r); x0i_w = wrap(x0i); x0_slot = 0;
    pr = wr * xr - wi * xi;
    pi = wr * xi + wi * xr;
    @(negedge clk);
    f_start = 1'b1;
    @(negedge clk);
    f_start = 1'b0;
    lat = 1;
    while (!f_out_valid && lat < 5000) begin @(negedge clk); lat++; end
    check("butterfly latency", lat, 1 + tmul + 1 + 2 * (FR + FND));
    foreach (c0r[n]) begin c0r[n] = 0; c0i[n] = 0; c1r[n] = 0; c1i[n] = 0; end
    for (int s = 0; s < FR; s++) begin
      for (int n = 0; n < FND; n++) begin
        c0r[n] += f_y0_re[n]; c0i[n] += f_y0_im[n]; c1r[n] += f_y1_re[n]; c1i[n] += f_y1_im[n];
      end
      @(negedge clk);
    end
    g0r = 0; g0i = 0; g1r = 0; g1i = 0;
    for (int n = FND - 1; n >= 0; n--) begin
      g0r = g0r * FR + c0r[n]; g0i = g0i * FR + c0i[n];
      g1r = g1r * FR + c1r[n]; g1i = g1i * FR + c1i[n];
    end
    check("Re X0", g0r, wrap(x0r + pr));
    check("Im X0", g0i, wrap(x0i + pi));
    check("Re X1", g1r, wrap(x0r - pr));
    check("Im X1", g1i, wrap(x0i - pi));
  endtask

  initial begin
    rst = 1'b1; g_en = 1'b0; g_rw = 1'b1; g_a = '0; g_b = '0;
    f_start = 1'b0; f_sign = '0; f_w_re = '0; f_w_im = '0; f_x1_re = '0; f_x1_im = '0;
    x0r_w = 0; x0i_w = 0; x0_slot = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 4; t++) gemm_op();
    for (int t = 0; t < 8; t++) bfly_op();
    $display("mechanisms: sign padding %0d, complemented last row %0d, GEMM adder carries %0d, converter complements %0d, butterfly adder carries %0d",
             n_sign_pad, n_cmpl_row, n_gemm_carry, n_conv, n_bfly_carry);
    check("sign padding happened", n_sign_pad > 0, 1);
    check("complemented last partial product happened", n_cmpl_row > 0, 1);
    check("GEMM adder carry happened", n_gemm_carry > 0, 1);
    check("butterfly converter complement happened", n_conv > 0, 1);
    check("butterfly adder carry happened", n_bfly_carry > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
