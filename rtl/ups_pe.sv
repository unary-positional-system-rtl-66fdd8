// ups_pe: GEMM processing element, C[i][j] = sum_k A[i][k] * B[k][j], built
// from K UPS multipliers and one K-input UPS adder.
//
// All K multipliers run in parallel on the operand streams (a[k] x b[k]).
// When they are done the PE reads the K products out together (R cycles)
// into the K-input adder, lets its carries settle (NC cycles) and raises
// done. The dot product is then read out with rw=0 for R cycles on c.
// The result has NC = 2N + G positions, with G guard positions so that the
// sum of K products cannot overflow (R^G >= K). In bipolar mode every product
// is sign-extended into the guard positions by repeating the stream of its
// top position, which is 0 or R-1 for a product of two bipolar numbers.
//
// Interface and timing: as for ups_multiplier. en=1, rw=1 starts (slot 0 of
// the operand streams) and is held until done; the write takes
// Tmul + 1 + R + NC cycles, where Tmul is the multiplier latency and one
// cycle is spent seeing the multipliers done.
// Then en=1, rw=0 reads c for R cycles. rst is synchronous.
// The multipliers-plus-adder structure follows the original processing
// element; the sequencing, the guard positions and the sign extension are
// this implementation's choices.
module ups_pe #(
  parameter int unsigned R       = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned K       = 4,
  parameter bit          BIPOLAR = 1'b1,
  localparam int unsigned NC = 2 * N + ups_pkg::clog_r(K, R)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 rw,
  input  logic [K-1:0][N-1:0]  a,      // A[i][k] streams, k = 0..K-1
  input  logic [K-1:0][N-1:0]  b,      // B[k][j] streams
  output logic [NC-1:0]        c,
  output logic                 done
);

  localparam int unsigned W2   = 2 * N;
  localparam int unsigned CNTW = $clog2(R + NC + 1) + 1;

  typedef enum logic [1:0] {P_IDLE, P_MUL, P_SUM} state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic            adv;
  assign adv = en && rw;

  logic [K-1:0]          m_done;
  logic [K-1:0][W2-1:0]  prod;
  logic                  m_en, m_rw;

  always_comb begin
    m_en = 1'b0;
    m_rw = 1'b1;
    unique case (state)
      P_IDLE: m_en = adv;
      P_MUL:  m_en = adv && !m_done[0];
      P_SUM:  begin m_en = adv && (cnt < CNTW'(R)); m_rw = 1'b0; end
      default: ;
    endcase
  end

  for (genvar k = 0; k < K; k++) begin : g_mul
    ups_multiplier #(.R(R), .N(N), .BIPOLAR(BIPOLAR)) u_mul (
      .clk (clk),
      .rst (rst),
      .en  (m_en),
      .rw  (m_rw),
      .dinA(a[k]),
      .dinB(b[k]),
      .dout(prod[k]),
      .done(m_done[k])
    );
  end

  // products, sign-extended to NC positions
  logic [K-1:0][NC-1:0] addend;
  always_comb begin
    for (int k = 0; k < K; k++)
      for (int n = 0; n < NC; n++)
        if (n < W2)       addend[k][n] = prod[k][n];
        else if (BIPOLAR) addend[k][n] = prod[k][W2-1];
        else              addend[k][n] = 1'b0;
  end

  logic s_en, s_rw, s_clr;
  assign s_en  = (adv && state == P_SUM) || (en && !rw && state == P_IDLE && done);
  assign s_rw  = rw;
  assign s_clr = rst || (adv && state == P_IDLE);

  ups_multi_adder #(.R(R), .ND(NC), .K(K)) u_sum (
    .clk (clk),
    .rst (s_clr),
    .en  (s_en),
    .rw  (s_rw),
    .din (addend),
    .dout(c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else if (adv) begin
      unique case (state)
        P_IDLE: begin
          state <= P_MUL;
          done  <= 1'b0;
        end
        P_MUL:
          if (m_done[0]) begin
            state <= P_SUM;
            cnt   <= '0;
          end
        P_SUM:
          if (cnt == CNTW'(R + NC - 1)) begin
            state <= P_IDLE;
            done  <= 1'b1;
          end else cnt <= cnt + 1'b1;
        default: state <= P_IDLE;
      endcase
    end
  end

  // All multipliers see the same control and must finish together.
  always_ff @(posedge clk)
    if (!rst) assert (m_done == '0 || m_done == '1)
      else $error("ups_pe: multipliers out of step");

endmodule
