// In-place radix-4 decimation-in-frequency FFT (Cooley-Tukey), default 1024
// points: five ranks of 256 radix-4 butterflies.
//
// Operation: real samples (imaginary part zero) are written through the load
// port at natural addresses. A start pulse runs the transform: one butterfly
// per clock, 4 reads and 4 writes of the working memory per clock, so a
// 1024-point transform takes 5*256 = 1280 clocks from start to the done pulse.
// Results sit in the working memory in base-4 digit-reversed order; the read
// port undoes the reversal, so rd_addr is the natural bin index. Read data
// appear one clock after rd_addr.
//
// Arithmetic: the working memory is IW bits wide, wide enough for the full
// growth of the transform (IN_W + log2 N bits plus sign and margin) plus four
// fractional guard bits that keep the rounding noise of the early ranks out of
// the output LSBs, so no rank scales. Twiddles are Q1.16 values of exp(-j*2*pi*e/N), computed at
// elaboration. Outputs are the working values shifted right by
// IN_W + log2(N) - OUT_W and saturated to OUT_W bits. The transform size,
// radix, decimation in frequency, 8-bit inputs and 16-bit outputs follow the
// published design; the memory organisation and the fixed-point scaling are
// choices of this design.
module fft1024_r4 #(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // sample load (natural order, real input)
  input  logic                    load_en,
  input  logic [$clog2(N)-1:0]    load_addr,
  input  logic signed [IN_W-1:0]  load_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,     // one-clock pulse at the end
  // result read (natural bin order, one clock latency)
  input  logic [$clog2(N)-1:0]    rd_addr,
  output logic signed [OUT_W-1:0] rd_re,
  output logic signed [OUT_W-1:0] rd_im
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned STAGES = LOGN / 2;
  localparam int unsigned NBF    = N / 4;           // butterflies per rank
  localparam int unsigned GUARD  = 4;               // fractional guard bits
  localparam int unsigned IW     = IN_W + LOGN + 2 + GUARD; // working width
  localparam int unsigned TW_W   = 18;
  localparam int unsigned TW_F   = 16;
  localparam int          SHIFT  = IN_W + LOGN - OUT_W + GUARD;
  localparam real         PI     = 3.14159265358979323846;

  typedef logic signed [IW-1:0] word_t;

  // ---------------------------------------------------------------- twiddles
  logic signed [TW_W-1:0] tw_c [N];
  logic signed [TW_W-1:0] tw_s [N];
  for (genvar e = 0; e < N; e++) begin : g_tw
    localparam real ANG = 2.0 * PI * real'(e) / real'(N);
    localparam int  CV  = int'($floor($cos(ANG) * real'(1 << TW_F) + 0.5));
    localparam int  SV  = int'($floor($sin(ANG) * real'(1 << TW_F) + 0.5));
    assign tw_c[e] = TW_W'(CV);
    assign tw_s[e] = TW_W'(SV);
  end

  // ---------------------------------------------------------- working memory
  word_t mem_re [N];
  word_t mem_im [N];

  logic [$clog2(STAGES+1)-1:0] stage;
  logic [$clog2(NBF)-1:0]      bfly;

  // butterfly addressing for the current rank
  logic [LOGN-1:0] a [4];
  logic [LOGN-1:0] e1;
  always_comb begin
    int unsigned lq;            // log2 of the butterfly span
    logic [LOGN-1:0] j, grp;
    lq  = LOGN - 2 * (int'(stage) + 1);
    j   = LOGN'(bfly) & LOGN'((1 << lq) - 1);
    grp = LOGN'(bfly) >> lq;
    a[0] = (grp << (lq + 2)) | j;
    for (int k = 1; k < 4; k++) a[k] = a[0] + LOGN'(k << lq);
    e1 = j << (2 * stage);
  end

  // complex multiply by a twiddle, rounded back to the working width
  function automatic void cmul_tw(input word_t xr, input word_t xi,
                                  input logic signed [TW_W-1:0] c,
                                  input logic signed [TW_W-1:0] s,
                                  output word_t yr, output word_t yi);
    logic signed [IW+TW_W:0] pr, pi;
    // (xr + j xi)(c - j s)
    pr = xr * c + xi * s + (1 <<< (TW_F - 1));
    pi = xi * c - xr * s + (1 <<< (TW_F - 1));
    yr = word_t'(pr >>> TW_F);
    yi = word_t'(pi >>> TW_F);
  endfunction

  word_t y_re [4];
  word_t y_im [4];
  always_comb begin
    word_t t0r, t0i, t1r, t1i, t2r, t2i, t3r, t3i;
    word_t u1r, u1i, u2r, u2i, u3r, u3i;
    logic [LOGN-1:0] e2, e3;
    t0r = mem_re[a[0]] + mem_re[a[2]];  t0i = mem_im[a[0]] + mem_im[a[2]];
    t1r = mem_re[a[0]] - mem_re[a[2]];  t1i = mem_im[a[0]] - mem_im[a[2]];
    t2r = mem_re[a[1]] + mem_re[a[3]];  t2i = mem_im[a[1]] + mem_im[a[3]];
    t3r = mem_re[a[1]] - mem_re[a[3]];  t3i = mem_im[a[1]] - mem_im[a[3]];
    y_re[0] = t0r + t2r;  y_im[0] = t0i + t2i;
    u2r = t0r - t2r;      u2i = t0i - t2i;
    u1r = t1r + t3i;      u1i = t1i - t3r;   // t1 - j t3
    u3r = t1r - t3i;      u3i = t1i + t3r;   // t1 + j t3
    e2 = e1 << 1;
    e3 = e1 + e2;
    cmul_tw(u1r, u1i, tw_c[e1], tw_s[e1], y_re[1], y_im[1]);
    cmul_tw(u2r, u2i, tw_c[e2], tw_s[e2], y_re[2], y_im[2]);
    cmul_tw(u3r, u3i, tw_c[e3], tw_s[e3], y_re[3], y_im[3]);
  end

  always_ff @(posedge clk) begin
    if (load_en && !busy) begin
      mem_re[load_addr] <= word_t'(load_data) <<< GUARD;
      mem_im[load_addr] <= '0;
    end else if (busy) begin
      for (int k = 0; k < 4; k++) begin
        mem_re[a[k]] <= y_re[k];
        mem_im[a[k]] <= y_im[k];
      end
    end
  end

  // --------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bfly  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= '0;
          bfly  <= '0;
        end
      end else begin
        bfly <= bfly + 1'b1;
        if (bfly == $clog2(NBF)'(NBF - 1)) begin
          if (stage == $bits(stage)'(STAGES - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------- output, natural order
  function automatic logic [LOGN-1:0] digit_rev4(input logic [LOGN-1:0] k);
    logic [LOGN-1:0] r;
    for (int d = 0; d < STAGES; d++) r[2*d +: 2] = k[2*(STAGES-1-d) +: 2];
    return r;
  endfunction

  function automatic logic signed [OUT_W-1:0] scale_sat(input word_t v);
    word_t s;
    s = v >>> SHIFT;
    if (s > word_t'((1 <<< (OUT_W - 1)) - 1))   return {1'b0, {(OUT_W-1){1'b1}}};
    else if (s < -word_t'(1 <<< (OUT_W - 1)))   return {1'b1, {(OUT_W-1){1'b0}}};
    else                                        return OUT_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    rd_re <= scale_sat(mem_re[digit_rev4(rd_addr)]);
    rd_im <= scale_sat(mem_im[digit_rev4(rd_addr)]);
  end

endmodule
