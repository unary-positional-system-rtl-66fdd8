// ups_multiplier: UPS array multiplier, UP(R,N) x UP(R,N) -> UP(R,2N),
// unipolar (BIPOLAR=0) or bipolar in complement form (BIPOLAR=1).
//
// dinA carries the multiplicand A (positions A[N-1..0]), dinB the multiplier
// B, each position as an R-slot bit stream. The product C[2N-1..0] is played
// back on dout.
//
// How it works:
//   LOAD  (R cycles) the first R-1 slots of every input stream are captured.
//   MUL   ((R-1)^2 cycles) single-digit products are formed by the extended
//         AND of two streams: A's captured pattern is repeated R-1 times while
//         each captured bit of B is held for R-1 cycles, so the AND carries
//         a*b ones. Row i of a partial-product array of single-input CMems
//         counts A[j] AND B[i] in column i+j, with carries rippling to the
//         next column of the same row.
//   MFL   (2N cycles) the row carries settle.
//   ACC   (N steps of R+2N cycles) the rows are read out one after the other
//         into an accumulator row of 2N dual-input CMems at their column
//         offset, each step followed by 2N cycles of carry settling.
// The product is then ready (done=1) and is read with rw=0 for R cycles.
//
// Bipolar mode follows the complement rule C(X*Y) = C(X) * (-Sgn(y[N-1])
// R^(N-1) + y[N-2] R^(N-2) + ... + y[0]): A's sign position is padded into
// every column up to 2N-1 (sign padding), the top row multiplies by the sign
// of B (0 or 1) and is complemented while it is read into the accumulator
// (each data slot inverted, plus one added at column N-1). Results are taken
// modulo R^(2N). Bipolar operands must have a sign position of 0 or R-1.
//
// Interface and timing: en=1, rw=1 starts an operation (that cycle is slot 0
// of the operand streams) and must be held until done rises; the write takes
// R + (R-1)^2 + 2N + N(R+2N) cycles, after which done=1. While done=1, en=1, rw=0 reads the
// product for R cycles. rst is synchronous. Dropping en pauses the sequence.
// The array, the row-by-row accumulation, the sign padding and the
// complemented last row follow the original architecture; the capture
// registers, the separate accumulator row and the settling times are choices
// of this implementation.
module ups_multiplier #(
  parameter int unsigned R       = 4,
  parameter int unsigned N       = 4,
  parameter bit          BIPOLAR = 1'b0,
  localparam int unsigned W2 = 2 * N
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          rw,
  input  logic [N-1:0]  dinA,
  input  logic [N-1:0]  dinB,
  output logic [W2-1:0] dout,
  output logic          done
);

  localparam int unsigned D    = R - 1;         // data slots per stream
  localparam int unsigned TMUL = D * D;
  localparam int unsigned TACC = R + W2;
  localparam int unsigned CNTW = $clog2(TMUL + TACC + R + 1) + 1;
  localparam int unsigned ROWW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned DW   = (D > 1) ? $clog2(D) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MUL, S_MFL, S_ACC} state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic [ROWW-1:0] row;
  logic [D-1:0]    a_bits [N];
  logic [D-1:0]    b_bits [N];

  logic adv, start, clr;
  assign adv   = en && rw;
  assign start = adv && (state == S_IDLE);
  assign clr   = rst || start;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      row   <= '0;
      done  <= 1'b0;
    end else if (adv) begin
      unique case (state)
        S_IDLE: begin
          state <= S_LOAD;
          cnt   <= CNTW'(1);
          row   <= '0;
          done  <= 1'b0;
        end
        S_LOAD:
          if (cnt == CNTW'(R - 1)) begin
            state <= S_MUL;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        S_MUL:
          if (cnt == CNTW'(TMUL - 1)) begin
            state <= S_MFL;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        S_MFL:
          if (cnt == CNTW'(W2 - 1)) begin
            state <= S_ACC;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        S_ACC:
          if (cnt == CNTW'(TACC - 1)) begin
            cnt <= '0;
            if (row == ROWW'(N - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else row <= row + 1'b1;
          end else cnt <= cnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- operand capture
  logic [CNTW-1:0] slot;
  logic [DW-1:0]   slot_i;
  assign slot   = (state == S_IDLE) ? '0 : cnt;
  assign slot_i = DW'(slot);

  always_ff @(posedge clk) begin
    if (adv && (state == S_IDLE || state == S_LOAD) && slot < CNTW'(D)) begin
      for (int n = 0; n < N; n++) begin
        a_bits[n][slot_i] <= dinA[n];
        b_bits[n][slot_i] <= dinB[n];
      end
    end
  end

  // ------------------------------------------------ extended AND streams
  logic [DW-1:0] u, v;
  assign u = DW'(cnt % CNTW'(D));   // position in A's repeated pattern
  assign v = DW'(cnt / CNTW'(D));   // index of B's held bit (valid in MUL)

  logic b_neg;                  // B's sign position is non-zero
  assign b_neg = BIPOLAR && (b_bits[N-1] != '0);

  logic a_ext [W2];             // A (sign padded in bipolar mode), per column offset
  logic b_ext [N];              // B's digit stream of each row
  always_comb begin
    for (int j = 0; j < W2; j++) begin
      if (j < N)        a_ext[j] = a_bits[j][u];
      else if (BIPOLAR) a_ext[j] = a_bits[N-1][u];
      else              a_ext[j] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      if (BIPOLAR && i == N - 1) b_ext[i] = b_neg && (v == '0);
      else                       b_ext[i] = b_bits[i][v];
    end
  end

  // ------------------------------------------------- partial-product rows
  logic pp_dout [N][W2];
  logic pp_en   [N];
  logic pp_rw;
  assign pp_rw = (state != S_ACC);

  for (genvar i = 0; i < N; i++) begin : g_row
    localparam int unsigned WROW = BIPOLAR ? (W2 - i) : (N + 1);
    logic [0:0] carry [W2+1];
    assign carry[i] = 1'b0;
    assign pp_en[i] = adv && ((state == S_MUL) || (state == S_MFL) ||
                              (state == S_ACC && row == ROWW'(i) && cnt < CNTW'(R)));

    for (genvar col = 0; col < W2; col++) begin : g_col
      if (col >= i && col < i + WROW) begin : g_cm
        logic pp_in;
        logic [ups_pkg::digit_width(R)-1:0] unused_value;
        assign pp_in = (state == S_MUL) && a_ext[col-i] && b_ext[i];
        ups_cmem #(.R(R), .NIN(1)) u_cm (
          .clk  (clk),
          .rst  (clr),
          .en   (pp_en[i]),
          .rw   (pp_rw),
          .din  (pp_in),
          .cin  (carry[col]),
          .c    (carry[col+1]),
          .dout (pp_dout[i][col]),
          .value(unused_value)
        );
      end else begin : g_none
        assign pp_dout[i][col] = 1'b0;
        if (col == i + WROW) begin : g_top
          logic unused_carry;
          assign unused_carry = carry[col][0];
        end
      end
    end
  end

  // ---------------------------------------------------------- accumulator
  logic cmpl;                   // complementing the last partial product
  assign cmpl = BIPOLAR && b_neg && (row == ROWW'(N - 1));

  logic acc_en, acc_rw;
  assign acc_en = (adv && state == S_ACC) || (en && !rw && state == S_IDLE && done);
  assign acc_rw = rw;

  logic [1:0] acc_carry [W2+1];
  assign acc_carry[0] = '0;

  for (genvar col = 0; col < W2; col++) begin : g_acc
    logic stream, add_one;
    logic [ups_pkg::digit_width(R)-1:0] unused_value;
    always_comb begin
      stream = 1'b0;
      for (int i = 0; i < N; i++)
        if (row == ROWW'(i)) stream = pp_dout[i][col];
      if (state != S_ACC || cnt >= CNTW'(D)) stream = 1'b0;
      else if (cmpl && col >= N - 1)         stream = !stream;
    end
    assign add_one = (state == S_ACC) && cmpl && (col == N - 1) && (cnt == '0);
    ups_cmem #(.R(R), .NIN(2)) u_cm (
      .clk  (clk),
      .rst  (clr),
      .en   (acc_en),
      .rw   (acc_rw),
      .din  ({add_one, stream}),
      .cin  (acc_carry[col]),
      .c    (acc_carry[col+1]),
      .dout (dout[col]),
      .value(unused_value)
    );
  end

  logic [1:0] unused_acc_carry;
  assign unused_acc_carry = acc_carry[W2];

endmodule
