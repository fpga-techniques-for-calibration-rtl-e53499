// Sequential signed divider (restoring, one quotient bit per clock).
//
// The calibration path uses it to normalise channel amplitudes against the
// reference channel, and the back-substitution engine uses it for the
// divisions by the diagonal of R. Processors of the target FPGAs have a
// hardware multiplier but no divider, which is why the divide is a custom
// logic block of its own.
//
// Interface: start samples num/den; done pulses NW clocks after the edge
// that samples start, with quo = trunc(num/den) (rounded toward zero) saturated
// to NW signed bits. A zero denominator gives the largest quotient of the
// numerator's sign and raises div_zero. The restoring algorithm and the
// saturation rule are choices of this design.
module seq_divider #(
  parameter int unsigned NW = 32,   // numerator and quotient width
  parameter int unsigned DW = 24    // denominator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quo,
  output logic                 div_zero
);
  logic [NW-1:0]   n_abs;     // shifts out numerator bits
  logic [DW-1:0]   d_abs;
  logic [DW:0]     rem;
  logic [NW-2:0]   q;
  logic            neg;
  logic [$clog2(NW)-1:0] cnt;
  logic [DW+1:0]   trial;     // remainder minus divisor
  logic            bit_q;     // next quotient bit
  logic [NW-1:0]   qf;        // final unsigned quotient

  always_comb begin
    trial = {rem, n_abs[NW-1]} - {2'b00, d_abs};
    bit_q = !trial[DW+1];
    qf    = {q, bit_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quo <= '0; div_zero <= 1'b0;
      n_abs <= '0; d_abs <= '0; rem <= '0; q <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        if (den == '0) begin
          quo      <= num[NW-1] ? {1'b1, {(NW-1){1'b0}}} : {1'b0, {(NW-1){1'b1}}};
          div_zero <= 1'b1;
          done     <= 1'b1;
        end else begin
          busy     <= 1'b1;
          div_zero <= 1'b0;
          n_abs    <= num[NW-1] ? NW'(-num) : NW'(num);
          d_abs    <= den[DW-1] ? DW'(-den) : DW'(den);
          neg      <= num[NW-1] ^ den[DW-1];
          rem      <= '0;
          q        <= '0;
          cnt      <= $bits(cnt)'(NW - 1);
        end
      end else if (busy) begin
        rem   <= bit_q ? trial[DW:0] : {rem[DW-1:0], n_abs[NW-1]};
        n_abs <= n_abs << 1;
        q     <= {q[NW-3:0], bit_q};
        cnt   <= cnt - 1'b1;
        if (cnt == '0) begin
          // |quotient| above the signed range only for -2**(NW-1) / 1 style cases
          if (!neg && qf[NW-1]) quo <= {1'b0, {(NW-1){1'b1}}};
          else                  quo <= neg ? NW'(-qf) : NW'(qf);
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
