// tb_ups_gemm: self-checking test of the UPS GEMM array, reduced to
// M=2, KD=3, P=2 with UP(4,2) bipolar elements (NC = 5 result positions).
// Random signed matrices are streamed in; every element of C read back from
// the output streams is compared with the integer product A*B modulo 4^5.
// The write time is checked against Tmul + 1 + R + NC.
module tb_ups_gemm;
  localparam int unsigned R = 4, N = 2, M = 2, KD = 3, P = 2, NC = 5;
  localparam int unsigned MOD = 1024;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, en, rw, done;
  logic [M-1:0][KD-1:0][N-1:0] a_s;
  logic [KD-1:0][P-1:0][N-1:0] b_s;
  logic [M-1:0][P-1:0][NC-1:0] c_s;

  ups_gemm #(.R(R), .N(N), .M(M), .KD(KD), .P(P), .BIPOLAR(1'b1)) dut (
    .clk, .rst, .en, .rw, .a(a_s), .b(b_s), .c(c_s), .done);

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

  function automatic int sv(input int unsigned w);
    return (w >= 8) ? int'(w) - 16 : int'(w);
  endfunction

  function automatic int unsigned rnd_bip();
    int unsigned h = $urandom_range(0, 3);
    return $urandom_range(0, 1) ? h + 12 : h;
  endfunction

  initial begin
    int unsigned av[M][KD], bv[KD][P], cnt[M][P][NC], lat, tmul;
    int e, g;
    tmul = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);
    rst = 1'b1; en = 1'b0; rw = 1'b1; a_s = '0; b_s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 20; t++) begin
      foreach (av[i, k]) av[i][k] = rnd_bip();
      foreach (bv[k, j]) bv[k][j] = rnd_bip();
      en = 1'b1; rw = 1'b1; lat = 0;
      for (int s = 0; s < 2000; s++) begin
        for (int n = 0; n < N; n++) begin
          foreach (av[i, k]) a_s[i][k][n] = (s < R) && (s < ((av[i][k] >> (2 * n)) & 3));
          foreach (bv[k, j]) b_s[k][j][n] = (s < R) && (s < ((bv[k][j] >> (2 * n)) & 3));
        end
        @(negedge clk);
        lat++;
        if (done) break;
      end
      a_s = '0; b_s = '0;
      check("latency", lat, tmul + 1 + R + NC);
      rw = 1'b0;
      foreach (cnt[i, j, n]) cnt[i][j][n] = 0;
      for (int s = 0; s < R; s++) begin
        #1;
        foreach (cnt[i, j, n]) cnt[i][j][n] += c_s[i][j][n];
        @(negedge clk);
      end
      en = 1'b0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < P; j++) begin
          e = 0;
          for (int k = 0; k < KD; k++) e += sv(av[i][k]) * sv(bv[k][j]);
          g = 0;
          for (int n = NC - 1; n >= 0; n--) g = g * R + cnt[i][j][n];
          check("C element", g, ((e % MOD) + MOD) % MOD);
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
