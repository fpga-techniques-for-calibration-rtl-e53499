// Back substitution: solves R w = u for the weight vector w, with R upper
// triangular (the output of the QRD-RLS array).
//
//   w[N-1] = u[N-1] / R[N-1][N-1]
//   w[i]   = (u[i] - sum_{j>i} R[i][j] * w[j]) / R[i][i],  i = N-2 .. 0
//
// The engine has one multiplier, used once per clock for the
// multiply-accumulate, and one sequential divider (seq_divider) for the
// divisions by the diagonal. A start pulse samples nothing: R and u must hold
// still until done. Each weight costs (N-1-i) multiply clocks, one clock to
// start the divider and NW clocks of division, about N*(NW+3) + N*(N-1)/2
// clocks in all (about 500 for N = 8). The weights are WW-bit two's
// complement numbers with WF fractional bits; R and u may use any common
// fixed-point scale since only their ratios matter. A zero on the diagonal
// saturates that weight and sets singular. The equations follow the
// published design, which runs this step in software with a hardware
// multiplier and a divide accelerator; doing it in a small dedicated engine is
// a choice of this design.
module back_substitution #(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 26,    // width of R and u
  parameter int unsigned WW = 24,    // weight width
  parameter int unsigned WF = 12     // weight fraction bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  r_mat [N][N],
  input  logic signed [W-1:0]  u_vec [N],
  output logic                 busy,
  output logic                 done,
  output logic                 singular,
  output logic signed [WW-1:0] w [N]
);
  localparam int unsigned AW = W + WW + $clog2(N) + 2;   // accumulator width
  localparam int unsigned LN = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {IDLE, MAC, DIV_GO, DIV_WAIT} state_t;
  state_t state;

  logic [LN-1:0]         i, j;
  logic signed [AW-1:0]  acc;
  logic                  div_start, div_done, div_zero;
  logic signed [AW-1:0]  quo;

  seq_divider #(.NW(AW), .DW(W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .num(acc), .den(r_mat[i][i]),
    .busy(), .done(div_done), .quo(quo), .div_zero(div_zero));

  logic signed [AW-1:0]  prod;     // R[i][j] * w[j]
  logic signed [WW-1:0]  q_sat;    // quotient saturated to the weight width
  always_comb begin
    prod = AW'(r_mat[i][j]) * AW'(w[j]);
    if (quo > AW'((longint'(1) << (WW - 1)) - 1))  q_sat = {1'b0, {(WW-1){1'b1}}};
    else if (quo < -AW'(longint'(1) << (WW - 1)))  q_sat = {1'b1, {(WW-1){1'b0}}};
    else                                            q_sat = WW'(quo);
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; i <= '0; j <= '0; acc <= '0; div_start <= 1'b0;
      done <= 1'b0; singular <= 1'b0;
      for (int k = 0; k < N; k++) w[k] <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          i        <= LN'(N - 1);
          j        <= LN'(N - 1);
          acc      <= AW'(u_vec[N-1]) <<< WF;
          singular <= 1'b0;
          state    <= DIV_GO;
        end
        MAC: begin                       // acc -= R[i][j] * w[j], j = N-1 down to i+1
          acc <= acc - prod;
          j   <= j - 1'b1;
          if (j == i + 1'b1) state <= DIV_GO;
        end
        DIV_GO: begin
          div_start <= 1'b1;
          state     <= DIV_WAIT;
        end
        DIV_WAIT: if (div_done) begin
          w[i] <= q_sat;
          if (div_zero) singular <= 1'b1;
          if (i == '0) begin
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            i     <= i - 1'b1;
            j     <= LN'(N - 1);
            acc   <= AW'(u_vec[i - 1'b1]) <<< WF;
            state <= (i - 1'b1 == LN'(N - 1)) ? DIV_GO : MAC;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
