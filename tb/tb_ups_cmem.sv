// tb_ups_cmem: self-checking test of the Counting Memory in its single-input
// (R=4), dual-input (R=4) and dual-input radix-3 forms.
// Random input bits and carries are written; an integer model tracks the
// digit modulo R and the carries, which are checked one cycle after the
// wrap. Read-out streams are checked to hold the digit as leading 1s with a
// 0 in the last slot, and en=0 is checked to hold the digit.
module tb_ups_cmem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       rst, en, rw;
  logic [0:0] d1, ci1, c1;
  logic [1:0] d2, ci2, c2, d3, ci3, c3;
  logic       o1, o2, o3;
  logic [1:0] v1, v2, v3;

  ups_cmem #(.R(4), .NIN(1)) dut1 (.clk, .rst, .en, .rw, .din(d1), .cin(ci1), .c(c1), .dout(o1), .value(v1));
  ups_cmem #(.R(4), .NIN(2)) dut2 (.clk, .rst, .en, .rw, .din(d2), .cin(ci2), .c(c2), .dout(o2), .value(v2));
  ups_cmem #(.R(3), .NIN(2)) dut3 (.clk, .rst, .en, .rw, .din(d3), .cin(ci3), .c(c3), .dout(o3), .value(v3));

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

  int m1, m2, m3, e1, e2, e3;   // model digits and expected carries
  int wraps;

  initial begin
    rst = 1'b1; en = 1'b0; rw = 1'b1;
    d1 = '0; d2 = '0; d3 = '0; ci1 = '0; ci2 = '0; ci3 = '0;
    wraps = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m1 = 0; m2 = 0; m3 = 0;
    for (int round = 0; round < 60; round++) begin
      // write phase with random inputs
      en = 1'b1; rw = 1'b1;
      for (int t = 0; t < 12; t++) begin
        d1 = 1'($urandom); ci1 = 1'($urandom);
        d2 = 2'($urandom); ci2 = 2'($urandom_range(0, 1));
        d3 = 2'($urandom); ci3 = 2'($urandom_range(0, 2));
        if (!$urandom_range(0, 4)) en = 1'b0; else en = 1'b1;
        if (en) begin
          m1 += d1[0] + ci1; m2 += d2[0] + d2[1] + ci2; m3 += d3[0] + d3[1] + ci3;
          e1 = m1 / 4; m1 %= 4; e2 = m2 / 4; m2 %= 4; e3 = m3 / 3; m3 %= 3;
        end else begin
          e1 = 0; e2 = 0; e3 = 0;
        end
        @(negedge clk);
        wraps += e1 + e2 + e3;
        check("carry1", c1, e1); check("carry2", c2, e2); check("carry3", c3, e3);
        check("value1", v1, m1); check("value2", v2, m2); check("value3", v3, m3);
      end
      d1 = '0; d2 = '0; d3 = '0; ci1 = '0; ci2 = '0; ci3 = '0;
      // hold
      en = 1'b0;
      repeat (2) @(negedge clk);
      check("hold1", v1, m1); check("hold2", v2, m2);
      // read phase: R slots of leading ones, last slot 0
      en = 1'b1; rw = 1'b0;
      for (int s = 0; s < 4; s++) begin
        #1;
        check("stream1", o1, s < m1); check("stream2", o2, s < m2);
        if (s < 3) check("stream3", o3, s < m3);
        @(negedge clk);
      end
      check("empty1", v1, 0); check("empty2", v2, 0); check("empty3", v3, 0);
      m1 = 0; m2 = 0; m3 = 0;
    end
    // synchronous reset clears
    en = 1'b1; rw = 1'b1; d1 = 1'b1; d2 = 2'b11;
    @(negedge clk);
    rst = 1'b1; d1 = '0; d2 = '0;
    @(negedge clk);
    rst = 1'b0;
    check("reset", v1 + v2, 0);
    check("wraps seen", wraps > 20, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
