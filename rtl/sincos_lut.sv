// Sine/cosine lookup table: PH_W-bit phase in, LUT_W-bit signed cosine and
// sine out.
//
// The phase is an unsigned fraction of a full turn (2*pi = 2**PH_W). The
// table holds round((2**(LUT_W-1) - 1) * cos/sin(2*pi*p / 2**PH_W)) for every
// phase p and is filled at elaboration. Outputs are registered: they follow
// the phase one clock later, as from a synchronous block RAM. The 10-bit phase
// and 12-bit outputs follow the published design; the full-turn table and the
// scale are choices of this design.
module sincos_lut #(
  parameter int unsigned PH_W  = 10,
  parameter int unsigned LUT_W = 12
) (
  input  logic                    clk,
  input  logic [PH_W-1:0]         phase,
  output logic signed [LUT_W-1:0] cos_o,
  output logic signed [LUT_W-1:0] sin_o
);
  localparam int unsigned DEPTH = 1 << PH_W;
  localparam real         PI    = 3.14159265358979323846;
  localparam real         AMP   = real'((1 << (LUT_W - 1)) - 1);

  logic signed [LUT_W-1:0] cos_t [DEPTH];
  logic signed [LUT_W-1:0] sin_t [DEPTH];
  for (genvar p = 0; p < DEPTH; p++) begin : g_tab
    localparam real ANG = 2.0 * PI * real'(p) / real'(DEPTH);
    assign cos_t[p] = LUT_W'(int'($floor(AMP * $cos(ANG) + 0.5)));
    assign sin_t[p] = LUT_W'(int'($floor(AMP * $sin(ANG) + 0.5)));
  end

  always_ff @(posedge clk) begin
    cos_o <= cos_t[phase];
    sin_o <= sin_t[phase];
  end
endmodule
