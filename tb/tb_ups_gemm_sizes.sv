// tb_ups_gemm_sizes: workload test of the UPS GEMM at the larger matrix
// size of interest, m = n = k = 8 (an 8x8 array of processing elements with
// 8 multipliers each), in two element formats that run in parallel:
//   * bipolar UP(8,3), a 9-bit equivalent (8^3 = 2^9);
//   * unipolar UP(16,2), an 8-bit equivalent (16^2 = 2^8).
// Random matrices are streamed in (signed ones with sign digit 0 or R-1)
// and every element of C is compared with the integer product A*B, modulo
// R^NC for the signed case. The write time is checked against
// Tmul + 1 + R + NC, and the cycles of one whole GEMM (write plus read) are
// printed.
module tb_ups_gemm_sizes;
  localparam int unsigned M = 8, KD = 8, P = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nfin = 0;
  logic rst;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  for (genvar gi = 0; gi < 2; gi++) begin : g_fmt
    localparam bit          BIP = (gi == 0);
    localparam int unsigned R   = (gi == 0) ? 8 : 16;
    localparam int unsigned N   = (gi == 0) ? 3 : 2;
    localparam int unsigned G   = 1;   // smallest G with R^G >= KD
    localparam int unsigned NC  = 2 * N + G;
    localparam longint unsigned MOD = longint'(R) ** NC;
    localparam int unsigned HALF = R ** N / 2;

    logic en, rw, done;
    logic [M-1:0][KD-1:0][N-1:0] a_s;
    logic [KD-1:0][P-1:0][N-1:0] b_s;
    logic [M-1:0][P-1:0][NC-1:0] c_s;

    ups_gemm #(.R(R), .N(N), .M(M), .KD(KD), .P(P), .BIPOLAR(BIP)) dut (
      .clk, .rst, .en, .rw, .a(a_s), .b(b_s), .c(c_s), .done);

    // value of an element word: complement of R^N when signed
    function automatic int sv(input int unsigned w);
      return (BIP && w >= HALF) ? int'(w) - int'(R ** N) : int'(w);
    endfunction

    // random element; signed ones have sign digit 0 or R-1, so |value| <= R^(N-1)
    function automatic int unsigned rnd_elem();
      int unsigned low;
      if (!BIP) return $urandom_range(0, R ** N - 1);
      low = $urandom_range(0, R ** (N - 1) - 1);
      return $urandom_range(0, 1) ? low + (R - 1) * R ** (N - 1) : low;
    endfunction

    function automatic int digit(input int unsigned w, input int n);
      return int'((w / (R ** n)) % R);
    endfunction

    initial begin
      int unsigned av[M][KD], bv[KD][P], cnt[M][P][NC], lat, tmul, total;
      longint e, g;
      tmul = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);
      en = 1'b0; rw = 1'b1; a_s = '0; b_s = '0;
      repeat (4) @(negedge clk);   // past reset
      for (int t = 0; t < 3; t++) begin
        foreach (av[i, k]) av[i][k] = rnd_elem();
        foreach (bv[k, j]) bv[k][j] = rnd_elem();
        if (t == 0) begin   // extreme operands everywhere: -R^(N-1), or R^N-1
          foreach (av[i, k]) av[i][k] = BIP ? (R - 1) * R ** (N - 1) : R ** N - 1;
          foreach (bv[k, j]) bv[k][j] = BIP ? (R - 1) * R ** (N - 1) : R ** N - 1;
        end
        en = 1'b1; rw = 1'b1; lat = 0;
        for (int s = 0; s < 2000; s++) begin
          for (int n = 0; n < N; n++) begin
            foreach (av[i, k]) a_s[i][k][n] = (s < digit(av[i][k], n));
            foreach (bv[k, j]) b_s[k][j][n] = (s < digit(bv[k][j], n));
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
        total = lat + R;
        for (int i = 0; i < M; i++)
          for (int j = 0; j < P; j++) begin
            e = 0;
            for (int k = 0; k < KD; k++) e += longint'(sv(av[i][k])) * longint'(sv(bv[k][j]));
            g = 0;
            for (int n = NC - 1; n >= 0; n--) g = g * R + cnt[i][j][n];
            check("C element", g, ((e % longint'(MOD)) + longint'(MOD)) % longint'(MOD));
          end
        if (BIP) $display("GEMM %0dx%0dx%0d in UP(%0d,%0d) bipolar: %0d cycles (write %0d, read %0d)",
                          M, KD, P, R, N, total, lat, R);
        else $display("GEMM %0dx%0dx%0d in UP(%0d,%0d) unipolar: %0d cycles (write %0d, read %0d)",
                      M, KD, P, R, N, total, lat, R);
        @(negedge clk);
      end
      nfin++;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait (nfin == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
