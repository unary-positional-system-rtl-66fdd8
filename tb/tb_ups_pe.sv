// tb_ups_pe: self-checking test of the GEMM processing element at
// R=4, N=4, K=4, in bipolar and unipolar form. Random operand vectors are
// streamed in, and the dot product counted from the output streams is
// compared with integer arithmetic (modulo R^NC, NC = 2N+1). The write time
// is checked against Tmul + 1 + R + NC: the multiplier latency, one cycle to
// see the multipliers done, R cycles of product read-out and NC cycles of
// carry settling.
module tb_ups_pe;
  localparam int unsigned R = 4, N = 4, K = 4, NC = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, en, rw, done_b, done_u;
  logic [K-1:0][N-1:0] a_s, b_s;
  logic [NC-1:0] cb_s, cu_s;

  ups_pe #(.R(R), .N(N), .K(K), .BIPOLAR(1'b1)) dut_b (.clk, .rst, .en, .rw, .a(a_s), .b(b_s), .c(cb_s), .done(done_b));
  ups_pe #(.R(R), .N(N), .K(K), .BIPOLAR(1'b0)) dut_u (.clk, .rst, .en, .rw, .a(a_s), .b(b_s), .c(cu_s), .done(done_u));

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

  // signed value of an 8-bit (UP(4,4)) complement word with sign digit 0 or 3
  function automatic longint sv(input int unsigned w);
    return (w >= 128) ? longint'(w) - 256 : longint'(w);
  endfunction

  function automatic int unsigned rnd_bip();
    int unsigned h = $urandom_range(0, 63);
    return $urandom_range(0, 1) ? h + 192 : h;
  endfunction

  initial begin
    int unsigned av[K], bv[K], cntb[NC], cntu[NC], lat;
    longint eb, eu, gb, gu;
    int unsigned tmul, negs;
    tmul = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);
    negs = 0;
    rst = 1'b1; en = 1'b0; rw = 1'b1; a_s = '0; b_s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 30; t++) begin
      eb = 0; eu = 0;
      for (int k = 0; k < K; k++) begin
        av[k] = rnd_bip(); bv[k] = rnd_bip();
        eb += sv(av[k]) * sv(bv[k]);
        eu += longint'(av[k]) * longint'(bv[k]);
        if (av[k] >= 192) negs++;
      end
      en = 1'b1; rw = 1'b1; lat = 0;
      for (int s = 0; s < 2000; s++) begin
        for (int k = 0; k < K; k++)
          for (int n = 0; n < N; n++) begin
            a_s[k][n] = (s < R) && (s < ((av[k] >> (2 * n)) & 3));
            b_s[k][n] = (s < R) && (s < ((bv[k] >> (2 * n)) & 3));
          end
        @(negedge clk);
        lat++;
        if (done_b && done_u) break;
      end
      a_s = '0; b_s = '0;
      check("latency", lat, tmul + 1 + R + NC);
      rw = 1'b0;
      foreach (cntb[n]) begin cntb[n] = 0; cntu[n] = 0; end
      for (int s = 0; s < R; s++) begin
        #1;
        for (int n = 0; n < NC; n++) begin cntb[n] += cb_s[n]; cntu[n] += cu_s[n]; end
        @(negedge clk);
      end
      en = 1'b0;
      gb = 0; gu = 0;
      for (int n = NC - 1; n >= 0; n--) begin gb = gb * R + cntb[n]; gu = gu * R + cntu[n]; end
      check("bipolar dot product", gb, ((eb % 262144) + 262144) % 262144);
      check("unipolar dot product", gu, eu);
      @(negedge clk);
    end
    check("negative operands exercised", negs > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
