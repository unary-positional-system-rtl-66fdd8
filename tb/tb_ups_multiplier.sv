// tb_ups_multiplier: self-checking test of the UPS array multiplier, unipolar
// and bipolar, at R=4, N=4 (the worked examples) and at R=8, N=2.
// Operands are sent as R-slot streams (digit d = d leading ones); the product
// digits are counted from the output streams and compared with integer
// arithmetic (modulo R^2N for bipolar). The write latency is checked against
// R + (R-1)^2 + 2N + N(R+2N).
module tb_ups_multiplier;
  localparam int unsigned R  = 4;
  localparam int unsigned N  = 4;
  localparam int unsigned R2 = 8;
  localparam int unsigned N2 = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // unipolar and bipolar at R=4, N=4
  logic rst, en, rw;
  logic [N-1:0] a_s, b_s;
  logic [2*N-1:0] pu_s, pb_s;
  logic done_u, done_b;
  ups_multiplier #(.R(R), .N(N), .BIPOLAR(1'b0)) dut_u (
    .clk(clk), .rst(rst), .en(en), .rw(rw), .dinA(a_s), .dinB(b_s), .dout(pu_s), .done(done_u));
  ups_multiplier #(.R(R), .N(N), .BIPOLAR(1'b1)) dut_b (
    .clk(clk), .rst(rst), .en(en), .rw(rw), .dinA(a_s), .dinB(b_s), .dout(pb_s), .done(done_b));

  // bipolar at R=8, N=2
  logic [N2-1:0] a2_s, b2_s;
  logic [2*N2-1:0] p2_s;
  logic done_2, en2, rw2;
  ups_multiplier #(.R(R2), .N(N2), .BIPOLAR(1'b1)) dut_2 (
    .clk(clk), .rst(rst), .en(en2), .rw(rw2), .dinA(a2_s), .dinB(b2_s), .dout(p2_s), .done(done_2));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned digit(input longint unsigned v, input int unsigned r, input int unsigned n);
    longint unsigned x = v;
    for (int i = 0; i < n; i++) x = x / r;
    return int'(x % r);
  endfunction

  // One multiplication on the two R=4 units, then one on the R=8 unit.
  task automatic run(input longint unsigned a, input longint unsigned b,
                     input longint unsigned a2, input longint unsigned b2,
                     output longint unsigned pu, output longint unsigned pb,
                     output longint unsigned p2, output int unsigned lat);
    int unsigned cu[2*N], cb[2*N], c2[2*N2];
    int unsigned lat2;
    @(negedge clk);
    en = 1'b1; rw = 1'b1;
    lat = 0;
    for (int s = 0; s < 4096; s++) begin
      for (int n = 0; n < N; n++) begin
        a_s[n] = (s < R) && (s < digit(a, R, n));
        b_s[n] = (s < R) && (s < digit(b, R, n));
      end
      @(negedge clk);
      lat++;
      if (done_u && done_b) break;
    end
    a_s = '0; b_s = '0;
    rw = 1'b0;
    foreach (cu[i]) begin cu[i] = 0; cb[i] = 0; end
    for (int s = 0; s < R; s++) begin
      #1;
      for (int i = 0; i < 2*N; i++) begin cu[i] += pu_s[i]; cb[i] += pb_s[i]; end
      @(negedge clk);
    end
    en = 1'b0;
    en2 = 1'b1; rw2 = 1'b1;
    lat2 = 0;
    for (int s = 0; s < 4096; s++) begin
      for (int n = 0; n < N2; n++) begin
        a2_s[n] = (s < R2) && (s < digit(a2, R2, n));
        b2_s[n] = (s < R2) && (s < digit(b2, R2, n));
      end
      @(negedge clk);
      lat2++;
      if (done_2) break;
    end
    a2_s = '0; b2_s = '0;
    rw2 = 1'b0;
    foreach (c2[i]) c2[i] = 0;
    for (int s = 0; s < R2; s++) begin
      #1;
      for (int i = 0; i < 2*N2; i++) c2[i] += p2_s[i];
      @(negedge clk);
    end
    en2 = 1'b0;
    check("latency R8", lat2, R2 + (R2-1)*(R2-1) + 2*N2 + N2*(R2 + 2*N2));
    pu = 0; pb = 0; p2 = 0;
    for (int i = 2*N-1; i >= 0; i--) begin pu = pu * R + cu[i]; pb = pb * R + cb[i]; end
    for (int i = 2*N2-1; i >= 0; i--) p2 = p2 * R2 + c2[i];
  endtask

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // signed value of a bipolar UP(R,N) complement word
  function automatic longint sval(input longint unsigned w, input int unsigned r, input int unsigned n);
    longint unsigned m = 1;
    for (int i = 0; i < n; i++) m = m * r;
    return (w >= m / 2) ? longint'(w) - longint'(m) : longint'(w);
  endfunction

  // random bipolar operand: sign position 0 or R-1
  function automatic longint unsigned rnd_bip(input int unsigned r, input int unsigned n);
    longint unsigned m = 1, h;
    for (int i = 0; i < n - 1; i++) m = m * r;
    h = longint'($urandom_range(0, 32'hffff)) % m;
    if ($urandom_range(0, 1)) h = h + (r - 1) * m;
    return h;
  endfunction

  initial begin
    longint unsigned pu, pb, p2, a, b, a2, b2, m4, m8;
    int unsigned lat, exp_lat;
    rst = 1'b1; en = 1'b0; rw = 1'b0; en2 = 1'b0; rw2 = 1'b0;
    a_s = '0; b_s = '0; a2_s = '0; b2_s = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    m4 = 64'd1 << 16;  // 4^8
    m8 = 64'd1 << 12;  // 8^4
    exp_lat = R + (R-1)*(R-1) + 2*N + N*(R + 2*N);

    // Worked examples: 3102 x 0222 (base 4) = 02021310 unipolar, 33201310 bipolar
    run(64'h0d2, 64'h02a, 64'd0, 64'd0, pu, pb, p2, lat);
    check("unipolar 3102x0222", pu, 64'd8820);
    check("bipolar 3102x0222", pb, 64'(63604));
    check("latency", lat, exp_lat);
    run(64'h02a, 64'h0d2, 64'd0, 64'd0, pu, pb, p2, lat);
    check("bipolar 0222x3102", pb, 64'(63604));
    run(64'hff, 64'hff, 64'd0, 64'd0, pu, pb, p2, lat);
    check("unipolar max", pu, 64'd255 * 64'd255);

    for (int t = 0; t < 40; t++) begin
      a = $urandom_range(0, 255); b = $urandom_range(0, 255);
      a2 = rnd_bip(R2, N2); b2 = rnd_bip(R2, N2);
      run(a, b, a2, b2, pu, pb, p2, lat);
      check("unipolar", pu, a * b);
      check("latency", lat, exp_lat);
      if (((a >> 6) == 0 || (a >> 6) == 3) && ((b >> 6) == 0 || (b >> 6) == 3))
        check("bipolar R4", pb, 64'(sval(a, R, N) * sval(b, R, N)) % m4);
      check("bipolar R8", p2, 64'(sval(a2, R2, N2) * sval(b2, R2, N2)) % m8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
