// ups_butterfly: radix-2 FFT butterfly in UPS arithmetic,
//   X0 = x0 + W*x1,  X1 = x0 - W*x1   (complex values).
//
// Data path, in the order of the original butterfly operator:
//   input buffer  holds |Re W|, |Re x1|, |Im W|, |Im x1| (UP(R,N) magnitudes,
//                 given as binary digits) and plays them as streams;
//   4 multipliers unipolar UPS multipliers form ReW*Rex1, ImW*Imx1, ReW*Imx1
//                 and ImW*Rex1 (2N positions each);
//   converter 1   extends each product by one sign position (ND = 2N+1) and
//                 complements it when its sign is negative: the signs of the
//                 operands, and the minus of -ImW*Imx1;
//   2 adders      Re(W x1) and Im(W x1) as ND-position complements;
//   converter 2   complements W*x1 for the X1 outputs;
//   4 adders      add x0 to W*x1 and to its complement.
// The "+1" of each complement enters the following adder as carry into its
// position 0.
//
// Number format: W and x1 are sign-magnitude, N positions of radix R plus a
// sign bit each (sign[0..3] for ReW, Rex1, ImW, Imx1; 1 = negative).
// x0 and all outputs are ND-position complements at the scale of the
// products (the integer product of the magnitudes); results are modulo
// R^ND, so |x0| + 2 (R^N-1)^2 must stay below R^ND / 2.
//
// Timing: start=1 for one cycle loads W and x1 (busy rises). The multipliers
// then run (Tmul cycles), their products are summed (R + ND cycles), and the
// second adder stage runs (R + ND cycles) while x0_rd=1 for R cycles: x0_re
// and x0_im must carry the x0 streams exactly while x0_rd=1. After that
// out_valid=1 for R cycles while the four results play out, then done=1.
// The structure follows the original butterfly operator; the number format,
// the x0 timing and the control are this implementation's choices.
module ups_butterfly #(
  parameter int unsigned R = 8,
  parameter int unsigned N = 2,
  localparam int unsigned ND = 2 * N + 1,
  localparam int unsigned VW = ups_pkg::digit_width(R)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [N-1:0][VW-1:0] w_re,
  input  logic [N-1:0][VW-1:0] w_im,
  input  logic [N-1:0][VW-1:0] x1_re,
  input  logic [N-1:0][VW-1:0] x1_im,
  input  logic [3:0]           sign,
  input  logic [ND-1:0]        x0_re,
  input  logic [ND-1:0]        x0_im,
  output logic                 x0_rd,
  output logic [ND-1:0]        y0_re,   // Re X0
  output logic [ND-1:0]        y0_im,   // Im X0
  output logic [ND-1:0]        y1_re,   // Re X1
  output logic [ND-1:0]        y1_im,   // Im X1
  output logic                 out_valid,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned W2   = 2 * N;
  localparam int unsigned CNTW = $clog2(R + ND + 1) + 1;

  typedef enum logic [2:0] {B_IDLE, B_MUL, B_S1, B_S2, B_OUT} state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic [3:0]      sgn;

  // --------------------------------------------------------------- control
  logic [3:0] m_done;
  logic       m_rd;     // products stream out in the first R cycles of B_S1
  assign m_rd = (state == B_S1) && (cnt < CNTW'(R));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      sgn   <= '0;
    end else begin
      unique case (state)
        B_IDLE:
          if (start) begin
            state <= B_MUL;
            cnt   <= '0;
            done  <= 1'b0;
            sgn   <= sign;
          end
        B_MUL: begin
          if (cnt != CNTW'(R)) cnt <= cnt + 1'b1;
          if (cnt != '0 && m_done[0]) begin
            state <= B_S1;
            cnt   <= '0;
          end
        end
        B_S1, B_S2:
          if (cnt == CNTW'(R + ND - 1)) begin
            state <= (state == B_S1) ? B_S2 : B_OUT;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        B_OUT:
          if (cnt == CNTW'(R - 1)) begin
            state <= B_IDLE;
            cnt   <= '0;
            done  <= 1'b1;
          end else cnt <= cnt + 1'b1;
        default: state <= B_IDLE;
      endcase
    end
  end

  assign busy      = (state != B_IDLE);
  assign x0_rd     = (state == B_S2) && (cnt < CNTW'(R));
  assign out_valid = (state == B_OUT);

  logic first, last;
  assign first = (cnt == '0);
  assign last  = (cnt == CNTW'(R - 1));

  // ----------------------------------------------------------- input buffer
  localparam int unsigned CH_RW = 0, CH_RX = 1, CH_IW = 2, CH_IX = 3;
  logic [3:0][N-1:0] op;
  logic ib_load, ib_en;
  assign ib_load = (state == B_IDLE) && start;
  assign ib_en   = (state == B_MUL) && (cnt < CNTW'(R));

  ups_input_buffer #(.R(R), .N(N), .CH(4)) u_ib (
    .clk (clk),
    .rst (rst),
    .load(ib_load),
    .din ({x1_im, w_im, x1_re, w_re}),
    .en  (ib_en),
    .dout(op)
  );

  // ------------------------------------------------------------ multipliers
  // 0: ReW*Rex1  1: ImW*Imx1  2: ReW*Imx1  3: ImW*Rex1
  logic [3:0][N-1:0]  m_a, m_b;
  logic [3:0][W2-1:0] prod;
  logic               m_en, m_rw;
  assign m_a = {op[CH_IW], op[CH_RW], op[CH_IW], op[CH_RW]};
  assign m_b = {op[CH_RX], op[CH_IX], op[CH_IX], op[CH_RX]};
  assign m_en = ((state == B_MUL) && (cnt == '0 || !m_done[0])) ||
                m_rd;
  assign m_rw = (state == B_MUL);

  for (genvar m = 0; m < 4; m++) begin : g_mul
    ups_multiplier #(.R(R), .N(N), .BIPOLAR(1'b0)) u_mul (
      .clk (clk),
      .rst (rst),
      .en  (m_en),
      .rw  (m_rw),
      .dinA(m_a[m]),
      .dinB(m_b[m]),
      .dout(prod[m]),
      .done(m_done[m])
    );
  end

  // ---------------------------------------------------- data converter 1
  logic [3:0][ND-1:0] prod_x, prod_c;
  logic [3:0]         neg1, one1;
  always_comb begin
    for (int m = 0; m < 4; m++) prod_x[m] = {1'b0, prod[m]};
    neg1[0] = sgn[CH_RW] ^ sgn[CH_RX];
    neg1[1] = !(sgn[CH_IW] ^ sgn[CH_IX]);   // subtracted: Re = RR - II
    neg1[2] = sgn[CH_RW] ^ sgn[CH_IX];
    neg1[3] = sgn[CH_IW] ^ sgn[CH_RX];
  end

  ups_data_converter #(.ND(ND), .CH(4)) u_conv1 (
    .din    (prod_x),
    .neg    (neg1 & {4{m_rd}}),
    .first  (first),
    .last   (last),
    .dout   (prod_c),
    .add_one(one1)
  );

  // --------------------------------------------------------- adder stage 1
  logic          s1_en, s1_rw, s_clr;
  logic [ND-1:0] t_re, t_im;
  logic          unused_c1_re, unused_c1_im;
  assign s_clr = rst || ib_load;
  assign s1_en = (state == B_S1) || ((state == B_S2) && cnt < CNTW'(R));
  assign s1_rw = (state == B_S1);

  ups_adder #(.R(R), .N(ND)) u_add_re (
    .clk(clk), .rst(s_clr), .en(s1_en), .rw(s1_rw),
    .dinA(prod_c[0]), .dinB(prod_c[1]),
    .cin({1'b0, one1[0] & s1_rw} + {1'b0, one1[1] & s1_rw}),
    .dout(t_re), .c(unused_c1_re)
  );
  ups_adder #(.R(R), .N(ND)) u_add_im (
    .clk(clk), .rst(s_clr), .en(s1_en), .rw(s1_rw),
    .dinA(prod_c[2]), .dinB(prod_c[3]),
    .cin({1'b0, one1[2] & s1_rw} + {1'b0, one1[3] & s1_rw}),
    .dout(t_im), .c(unused_c1_im)
  );

  // ---------------------------------------------------- data converter 2
  logic [1:0][ND-1:0] t_c;
  logic [1:0]         one2;
  ups_data_converter #(.ND(ND), .CH(2)) u_conv2 (
    .din    ({t_im, t_re}),
    .neg    ({x0_rd, x0_rd}),
    .first  (first),
    .last   (last),
    .dout   (t_c),
    .add_one(one2)
  );

  // --------------------------------------------------------- adder stage 2
  logic s2_en, s2_rw;
  logic [3:0] unused_c2;
  assign s2_en = (state == B_S2) || (state == B_OUT);
  assign s2_rw = (state == B_S2);

  logic [ND-1:0] x0r, x0i;
  assign x0r = x0_rd ? x0_re : '0;
  assign x0i = x0_rd ? x0_im : '0;

  ups_adder #(.R(R), .N(ND)) u_y0_re (
    .clk(clk), .rst(s_clr), .en(s2_en), .rw(s2_rw),
    .dinA(x0r), .dinB(t_re), .cin(2'b00), .dout(y0_re), .c(unused_c2[0])
  );
  ups_adder #(.R(R), .N(ND)) u_y1_re (
    .clk(clk), .rst(s_clr), .en(s2_en), .rw(s2_rw),
    .dinA(x0r), .dinB(t_c[0]), .cin({1'b0, one2[0]}), .dout(y1_re), .c(unused_c2[1])
  );
  ups_adder #(.R(R), .N(ND)) u_y0_im (
    .clk(clk), .rst(s_clr), .en(s2_en), .rw(s2_rw),
    .dinA(x0i), .dinB(t_im), .cin(2'b00), .dout(y0_im), .c(unused_c2[2])
  );
  ups_adder #(.R(R), .N(ND)) u_y1_im (
    .clk(clk), .rst(s_clr), .en(s2_en), .rw(s2_rw),
    .dinA(x0i), .dinB(t_c[1]), .cin({1'b0, one2[1]}), .dout(y1_im), .c(unused_c2[3])
  );

  always_ff @(posedge clk)
    if (!rst && state == B_S1 && first)
      assert (m_done == 4'hf) else $error("ups_butterfly: multipliers not done");

endmodule
