// tb_ups_butterfly: self-checking test of the UPS FFT butterfly at its
// default R=8, N=2 (5 output positions). Random sign-magnitude W and x1 and
// random x0 complements are applied; the four outputs read from the streams
// are compared with X0 = x0 + W x1 and X1 = x0 - W x1 computed in integers,
// modulo 8^5. The time from start to the first output slot is checked
// against 1 + Tmul + 1 + 2 (R + ND).
module tb_ups_butterfly;
  localparam int unsigned R = 8, N = 2, ND = 5, MOD = 32768;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, start, x0_rd, out_valid, busy, done;
  logic [N-1:0][2:0] w_re, w_im, x1_re, x1_im;
  logic [3:0] sign;
  logic [ND-1:0] x0_re, x0_im, y0_re, y0_im, y1_re, y1_im;

  ups_butterfly #(.R(R), .N(N)) dut (
    .clk, .rst, .start, .w_re, .w_im, .x1_re, .x1_im, .sign, .x0_re, .x0_im,
    .x0_rd, .y0_re, .y0_im, .y1_re, .y1_im, .out_valid, .busy, .done);

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

  function automatic int unsigned wrap(input int v);
    return int'(((v % int'(MOD)) + int'(MOD)) % int'(MOD));
  endfunction

  int unsigned x0r_w, x0i_w;   // x0 words streamed while x0_rd
  int          x0_slot;

  // x0 stream source
  always @(posedge clk) begin
    if (x0_rd) x0_slot <= x0_slot + 1;
  end
  always_comb begin
    for (int n = 0; n < ND; n++) begin
      x0_re[n] = x0_rd && (x0_slot < ((x0r_w >> (3 * n)) & 7));
      x0_im[n] = x0_rd && (x0_slot < ((x0i_w >> (3 * n)) & 7));
    end
  end

  initial begin
    int wr, wi, xr, xi, x0r, x0i, pr, pi, lat, tmul, negs;
    int unsigned c0r[ND], c0i[ND], c1r[ND], c1i[ND];
    int unsigned g0r, g0i, g1r, g1i;
    tmul = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);
    negs = 0;
    rst = 1'b1; start = 1'b0; sign = '0;
    w_re = '0; w_im = '0; x1_re = '0; x1_im = '0; x0r_w = 0; x0i_w = 0; x0_slot = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin : one
      w_re = 6'($urandom); w_im = 6'($urandom); x1_re = 6'($urandom); x1_im = 6'($urandom);
      sign = 4'($urandom);
      if (t == 0) begin w_re = 6'd63; w_im = 6'd63; x1_re = 6'd63; x1_im = 6'd63; sign = 4'b0100; end
      negs += $countones(sign);
      wr = sign[0] ? -int'(w_re) : int'(w_re);
      xr = sign[1] ? -int'(x1_re) : int'(x1_re);
      wi = sign[2] ? -int'(w_im) : int'(w_im);
      xi = sign[3] ? -int'(x1_im) : int'(x1_im);
      x0r = $urandom_range(0, 16000) - 8000;
      x0i = $urandom_range(0, 16000) - 8000;
      x0r_w = wrap(x0r); x0i_w = wrap(x0i); x0_slot = 0;
      pr = wr * xr - wi * xi;
      pi = wr * xi + wi * xr;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!out_valid && lat < 5000) begin @(negedge clk); lat++; end
      check("latency", lat, 1 + tmul + 1 + 2 * (R + ND));
      foreach (c0r[n]) begin c0r[n] = 0; c0i[n] = 0; c1r[n] = 0; c1i[n] = 0; end
      for (int s = 0; s < R; s++) begin
        for (int n = 0; n < ND; n++) begin
          c0r[n] += y0_re[n]; c0i[n] += y0_im[n]; c1r[n] += y1_re[n]; c1i[n] += y1_im[n];
        end
        @(negedge clk);
      end
      check("done", done, 1);
      g0r = 0; g0i = 0; g1r = 0; g1i = 0;
      for (int n = ND - 1; n >= 0; n--) begin
        g0r = g0r * R + c0r[n]; g0i = g0i * R + c0i[n];
        g1r = g1r * R + c1r[n]; g1i = g1i * R + c1i[n];
      end
      check("Re X0", g0r, wrap(x0r + pr));
      check("Im X0", g0i, wrap(x0i + pi));
      check("Re X1", g1r, wrap(x0r - pr));
      check("Im X1", g1i, wrap(x0i - pi));
    end
    check("negative signs exercised", negs > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
