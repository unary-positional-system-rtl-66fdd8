// tb_ups_multi_adder: self-checking test of the K-input UPS adder at
// R=4, ND=5, K=4 and at R=2, ND=6, K=4 (where several carries per cycle
// occur). K random numbers are written as streams for R cycles, carries
// settle for ND cycles, and the sum read from the output streams is compared
// with the integer sum modulo R^ND.
module tb_ups_multi_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, en, rw;
  logic [3:0][4:0] da;
  logic [4:0]      qa;
  logic [3:0][5:0] db;
  logic [5:0]      qb;

  ups_multi_adder #(.R(4), .ND(5), .K(4)) dut_a (.clk, .rst, .en, .rw, .din(da), .dout(qa));
  ups_multi_adder #(.R(2), .ND(6), .K(4)) dut_b (.clk, .rst, .en, .rw, .din(db), .dout(qb));

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

  int multi = 0;

  initial begin
    int unsigned xa[4], xb[4];
    int unsigned ca[5], cb[6];
    int unsigned sa, sb, ea, eb;
    rst = 1'b1; en = 1'b0; rw = 1'b1; da = '0; db = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      ea = 0; eb = 0;
      for (int k = 0; k < 4; k++) begin
        xa[k] = (t == 0) ? 1023 : $urandom_range(0, 1023);
        xb[k] = (t == 0) ? 63 : $urandom_range(0, 63);
        ea += xa[k]; eb += xb[k];
      end
      if ((xb[0] & 1) + (xb[1] & 1) + (xb[2] & 1) + (xb[3] & 1) >= 2) multi++;
      en = 1'b1; rw = 1'b1;
      for (int s = 0; s < 4 + 6; s++) begin
        for (int k = 0; k < 4; k++) begin
          for (int n = 0; n < 5; n++) da[k][n] = (s < 4) && (s < ((xa[k] >> (2 * n)) & 3));
          for (int n = 0; n < 6; n++) db[k][n] = (s < 2) && (s < ((xb[k] >> n) & 1));
        end
        @(negedge clk);
      end
      da = '0; db = '0;
      rw = 1'b0;
      foreach (ca[n]) ca[n] = 0;
      foreach (cb[n]) cb[n] = 0;
      for (int s = 0; s < 4; s++) begin
        #1;
        for (int n = 0; n < 5; n++) ca[n] += qa[n];
        for (int n = 0; n < 6; n++) cb[n] += qb[n];
        @(negedge clk);
      end
      en = 1'b0;
      sa = 0; sb = 0;
      for (int n = 4; n >= 0; n--) sa = sa * 4 + ca[n];
      for (int n = 5; n >= 0; n--) sb = sb * 2 + cb[n];
      check("sum R4", sa, ea % 1024);
      check("sum R2", sb, eb % 64);
    end
    check("multiple carries exercised", multi > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
