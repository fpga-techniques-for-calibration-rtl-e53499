// Iterative CORDIC in vectoring mode: magnitude and phase of a complex value.
//
// Used by the calibration path to turn the selected FFT bin of a channel into
// its amplitude (the square root of re^2 + im^2) and its phase. After a start
// pulse the vector is first folded into the right half-plane (a rotation by
// pi when re < 0), then ITER shift-and-add micro-rotations drive the imaginary
// part to zero while the rotation angles, taken from an arctangent table
// computed at elaboration, are accumulated. The remaining real part, times the
// inverse CORDIC gain, is the magnitude.
//
// Interface: start samples x_in/y_in; done pulses ITER+1 clocks after the clock edge that samples start with
// mag (unsigned, same scale as the inputs) and phase (PH_W bits, 2*pi =
// 2**PH_W, rounded), which then hold until the next start. The use of CORDIC
// for the magnitude follows the published design; the iterative organisation,
// iteration count and widths are choices of this design.
module cordic_vectoring #(
  parameter int unsigned W     = 16,   // input width
  parameter int unsigned MAG_W = 18,   // magnitude output width
  parameter int unsigned PH_W  = 10,   // phase output width
  parameter int unsigned ITER  = 16    // micro-rotations
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                busy,
  output logic                done,
  output logic [MAG_W-1:0]    mag,
  output logic [PH_W-1:0]     phase
);
  localparam int unsigned IW   = W + 4;    // 2 integer guard bits, 2 fraction bits
  localparam int unsigned AW   = 20;       // internal angle width, 2*pi = 2**AW
  localparam real         PI   = 3.14159265358979323846;

  // arctangent table and inverse gain
  logic [AW-1:0] atan_t [ITER];
  for (genvar i = 0; i < ITER; i++) begin : g_atan
    localparam real A = $atan(1.0 / real'(longint'(1) << i)) / (2.0 * PI) * real'(longint'(1) << AW);
    assign atan_t[i] = AW'(longint'($floor(A + 0.5)));
  end
  function automatic real inv_gain();
    real k;
    k = 1.0;
    for (int i = 0; i < ITER; i++) k = k * $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    return 1.0 / k;
  endfunction
  localparam int unsigned INVK = int'($floor(inv_gain() * 65536.0 + 0.5));

  logic signed [IW-1:0] x, y;
  logic [AW-1:0]        z;
  logic [$clog2(ITER)-1:0] it;
  logic                 fin;
  logic [IW+16:0]       p;        // final x times the inverse gain
  assign p = (IW+17)'(unsigned'(x)) * (IW+17)'(INVK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      fin   <= 1'b0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      mag   <= '0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        it   <= '0;
        if (x_in < 0) begin
          x <= -(IW'(x_in) <<< 2);
          y <= -(IW'(y_in) <<< 2);
          z <= AW'(1) << (AW - 1);      // pi
        end else begin
          x <= IW'(x_in) <<< 2;
          y <= IW'(y_in) <<< 2;
          z <= '0;
        end
      end else if (busy && !fin) begin
        if (y < 0) begin               // rotate counter-clockwise
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_t[it];
        end else begin                 // rotate clockwise
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_t[it];
        end
        it <= it + 1'b1;
        if (it == $bits(it)'(ITER - 1)) fin <= 1'b1;
      end
      if (fin) begin
        mag   <= MAG_W'((p + (1 << 17)) >> 18);   // remove 2 fraction bits and 16 gain bits
        phase <= PH_W'((z + (AW'(1) << (AW - PH_W - 1))) >> (AW - PH_W));
        busy  <= 1'b0;
        done  <= 1'b1;
      end
    end
  end

endmodule
