// tb_ups_input_buffer: self-checking test of the butterfly input buffer at
// R=8, N=2, CH=4. Random digits are loaded; the streams are checked slot by
// slot to carry exactly `digit` leading 1s and a 0 in slot R-1, to repeat
// every R cycles while en stays high, and to be all 0 while en is low.
module tb_ups_input_buffer;
  localparam int unsigned R = 8, N = 2, CH = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst, load, en;
  logic [CH-1:0][N-1:0][2:0] din;
  logic [CH-1:0][N-1:0]      dout;

  ups_input_buffer #(.R(R), .N(N), .CH(CH)) dut (.clk, .rst, .load, .din, .en, .dout);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  initial begin
    int unsigned d[CH][N], ones[CH][N];
    rst = 1'b1; load = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 50; t++) begin
      foreach (d[c, n]) begin
        d[c][n] = $urandom_range(0, R - 1);
        din[c][n] = 3'(d[c][n]);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      din = '0;
      #1 check("idle zero", dout, 0);
      en = 1'b1;
      for (int rep = 0; rep < 2; rep++) begin
        foreach (ones[c, n]) ones[c][n] = 0;
        for (int s = 0; s < R; s++) begin
          #1;
          foreach (ones[c, n]) ones[c][n] += dout[c][n];
          if (s == R - 1) check("last slot", dout, 0);
          @(negedge clk);
        end
        foreach (d[c, n]) check("digit", ones[c][n], d[c][n]);
      end
      en = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
