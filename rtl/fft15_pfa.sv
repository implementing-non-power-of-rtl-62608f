// fft15_pfa: 15-point DFT by the Prime Factor Algorithm, five 3-point DFTs
// followed by three 5-point DFTs. Drop-in alternative to fft15 with the same
// ports.
//
// With 15 = 3 * 5, Good's mapping puts x((5*n1 + 3*n2) mod 15) at row n1
// (0..2), column n2 (0..4). Pass 1 runs one FFT-3 per column (n2 = 0..4, one
// per cycle) giving Y(k1, n2); pass 2 runs one FFT-5 per row (k1 = 0..2, one
// per cycle) and its output k2 is X((10*k1 + 6*k2) mod 15). There are no
// twiddle multiplications between the passes. Both small transforms use the
// symmetric (Winograd-style) forms, with s = x(n) + x(N-n), d = x(n) - x(N-n):
//   FFT-3: X0 = x0 + s,  X1,2 = x0 - s/2 -/+ j sin(2pi/3) d
//   FFT-5: X0 = x0 + t,  t = s1 + s2,
//          A1,2 = X0 - 1.25 t +/- ((cos u - cos 2u)/2) (s1 - s2),  u = 2pi/5
//          X1,4 = A1 -/+ j (sin u d1 + sin 2u d2)
//          X2,3 = A2 -/+ j (sin 2u d1 - sin u d2)
// Splitting the FFT-15 into five FFT-3 and three FFT-5 follows the design
// description; the small-transform formulas are the standard ones and the
// sequencing (one small transform per cycle) is this design's own choice.
//
// The FFT-3 results keep EXT_FRAC extra fraction bits; each result is
// rounded once at the end. Timing: 15 load cycles, 5 FFT-3 cycles and 3 FFT-5
// cycles; results are offered from the cycle after the last FFT-5, in natural
// order, while the next block loads (one block every 23 cycles).
module fft15_pfa #(
  parameter int unsigned IN_W      = fft_pkg::IN_W,
  parameter int unsigned OUT_W     = fft_pkg::DATA_W,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [3:0]              out_k,
  output logic                    computing
);
  localparam int unsigned P        = 15;
  localparam int unsigned EXT_FRAC = 2;
  localparam int unsigned Y_W      = IN_W + 2 + EXT_FRAC;          // FFT-3 results
  localparam int unsigned W_W      = Y_W + COEF_W + 4;             // products
  localparam real         PI       = 3.14159265358979323846;

  function automatic logic signed [COEF_W-1:0] q(input real v);
    real s;
    s = v * real'(1 << COEF_FRAC);
    return COEF_W'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  localparam logic signed [COEF_W-1:0] S3  = q($sin(2.0 * PI / 3.0));
  localparam logic signed [COEF_W-1:0] K51 = q(-1.25);
  localparam logic signed [COEF_W-1:0] K52 = q(($cos(2.0 * PI / 5.0) - $cos(4.0 * PI / 5.0)) / 2.0);
  localparam logic signed [COEF_W-1:0] SU  = q($sin(2.0 * PI / 5.0));
  localparam logic signed [COEF_W-1:0] S2U = q($sin(4.0 * PI / 5.0));

  typedef enum logic [1:0] {S_LOAD, S_FFT3, S_FFT5} state_t;
  state_t state;

  logic signed [IN_W-1:0]  xr [P], xi [P];
  logic signed [Y_W-1:0]   yr [P], yi [P];     // Y(k1, n2) at 5*k1 + n2
  logic signed [OUT_W-1:0] obr [P], obi [P];
  logic [3:0]              ld_idx, ob_idx;
  logic [2:0]              step;
  logic                    ob_full;

  // ---- FFT-3 on column n2 = step ----------------------------------------------
  function automatic logic [3:0] in_map(input int unsigned n1, input logic [2:0] n2);
    return 4'((5 * n1 + 3 * 32'(n2)) % P);
  endfunction

  logic signed [Y_W-1:0]   a0r, a0i, a1r, a1i, a2r, a2i, s3r, s3i, d3r, d3i;
  logic signed [W_W-1:0]   hr, hi, pr3, pi3, y0r, y0i, y1r, y1i, y2r, y2i;

  always_comb begin
    a0r = Y_W'(xr[in_map(0, step)]) <<< EXT_FRAC;  a0i = Y_W'(xi[in_map(0, step)]) <<< EXT_FRAC;
    a1r = Y_W'(xr[in_map(1, step)]) <<< EXT_FRAC;  a1i = Y_W'(xi[in_map(1, step)]) <<< EXT_FRAC;
    a2r = Y_W'(xr[in_map(2, step)]) <<< EXT_FRAC;  a2i = Y_W'(xi[in_map(2, step)]) <<< EXT_FRAC;
    s3r = a1r + a2r;  s3i = a1i + a2i;
    d3r = a1r - a2r;  d3i = a1i - a2i;
    // everything scaled by 2^COEF_FRAC before the single rounding
    hr  = (W_W'(a0r) <<< COEF_FRAC) - (W_W'(s3r) <<< (COEF_FRAC - 1));
    hi  = (W_W'(a0i) <<< COEF_FRAC) - (W_W'(s3i) <<< (COEF_FRAC - 1));
    pr3 = W_W'(d3i) * W_W'(S3);
    pi3 = W_W'(d3r) * W_W'(S3);
    y0r = W_W'(a0r) + W_W'(s3r);                  // not scaled
    y0i = W_W'(a0i) + W_W'(s3i);
    y1r = (hr + pr3 + (W_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    y1i = (hi - pi3 + (W_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    y2r = (hr - pr3 + (W_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    y2i = (hi + pi3 + (W_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  // ---- FFT-5 on row k1 = step ---------------------------------------------------
  logic signed [Y_W+2:0]  b0r, b0i, b1r, b1i, b2r, b2i, b3r, b3i, b4r, b4i;
  logic signed [Y_W+2:0]  s1r, s1i, s2r, s2i, e1r, e1i, e2r, e2i, tr, ti, ur, ui;
  logic signed [W_W-1:0]  x0r_s, x0i_s, m1r, m1i, m2r, m2i, c1r, c1i, c2r, c2i;
  logic signed [W_W-1:0]  g1r, g1i, g2r, g2i, rnd;
  logic signed [W_W-1:0]  z0r, z0i, z1r, z1i, z2r, z2i, z3r, z3i, z4r, z4i;

  always_comb begin
    b0r = (Y_W+3)'(yr[5 * 32'(step) + 0]);  b0i = (Y_W+3)'(yi[5 * 32'(step) + 0]);
    b1r = (Y_W+3)'(yr[5 * 32'(step) + 1]);  b1i = (Y_W+3)'(yi[5 * 32'(step) + 1]);
    b2r = (Y_W+3)'(yr[5 * 32'(step) + 2]);  b2i = (Y_W+3)'(yi[5 * 32'(step) + 2]);
    b3r = (Y_W+3)'(yr[5 * 32'(step) + 3]);  b3i = (Y_W+3)'(yi[5 * 32'(step) + 3]);
    b4r = (Y_W+3)'(yr[5 * 32'(step) + 4]);  b4i = (Y_W+3)'(yi[5 * 32'(step) + 4]);
    s1r = b1r + b4r;  s1i = b1i + b4i;  e1r = b1r - b4r;  e1i = b1i - b4i;
    s2r = b2r + b3r;  s2i = b2i + b3i;  e2r = b2r - b3r;  e2i = b2i - b3i;
    tr  = s1r + s2r;  ti  = s1i + s2i;
    ur  = s1r - s2r;  ui  = s1i - s2i;
    rnd   = W_W'(1) <<< (COEF_FRAC + EXT_FRAC - 1);
    x0r_s = W_W'(b0r + tr) <<< COEF_FRAC;        // X0, scaled
    x0i_s = W_W'(b0i + ti) <<< COEF_FRAC;
    m1r = W_W'(tr) * W_W'(K51);  m1i = W_W'(ti) * W_W'(K51);
    m2r = W_W'(ur) * W_W'(K52);  m2i = W_W'(ui) * W_W'(K52);
    c1r = x0r_s + m1r + m2r;     c1i = x0i_s + m1i + m2i;   // x0 + A1
    c2r = x0r_s + m1r - m2r;     c2i = x0i_s + m1i - m2i;   // x0 + A2
    // B1 = sin u d1 + sin 2u d2, B2 = sin 2u d1 - sin u d2
    g1r = W_W'(e1r) * W_W'(SU)  + W_W'(e2r) * W_W'(S2U);
    g1i = W_W'(e1i) * W_W'(SU)  + W_W'(e2i) * W_W'(S2U);
    g2r = W_W'(e1r) * W_W'(S2U) - W_W'(e2r) * W_W'(SU);
    g2i = W_W'(e1i) * W_W'(S2U) - W_W'(e2i) * W_W'(SU);
    // X = c -/+ j g :  -j g = g_i - j g_r
    z0r = (x0r_s + rnd) >>> (COEF_FRAC + EXT_FRAC);  z0i = (x0i_s + rnd) >>> (COEF_FRAC + EXT_FRAC);
    z1r = (c1r + g1i + rnd) >>> (COEF_FRAC + EXT_FRAC);  z1i = (c1i - g1r + rnd) >>> (COEF_FRAC + EXT_FRAC);
    z4r = (c1r - g1i + rnd) >>> (COEF_FRAC + EXT_FRAC);  z4i = (c1i + g1r + rnd) >>> (COEF_FRAC + EXT_FRAC);
    z2r = (c2r + g2i + rnd) >>> (COEF_FRAC + EXT_FRAC);  z2i = (c2i - g2r + rnd) >>> (COEF_FRAC + EXT_FRAC);
    z3r = (c2r - g2i + rnd) >>> (COEF_FRAC + EXT_FRAC);  z3i = (c2i + g2r + rnd) >>> (COEF_FRAC + EXT_FRAC);
  end

  function automatic logic [3:0] out_map(input logic [2:0] k1, input int unsigned k2);
    return 4'((10 * 32'(k1) + 6 * k2) % P);
  endfunction

  // ---- control --------------------------------------------------------------------
  logic ob_free, start;
  assign ob_free   = !ob_full || (out_ready && ob_idx == 4'(P - 1));
  assign start     = (state == S_LOAD) && ob_free &&
                     ((ld_idx == 4'(P)) || (ld_idx == 4'(P - 1) && in_valid));
  assign in_ready  = (state == S_LOAD) && (ld_idx != 4'(P));
  assign computing = (state != S_LOAD);
  assign out_valid = ob_full;
  assign out_re    = obr[ob_idx];
  assign out_im    = obi[ob_idx];
  assign out_k     = ob_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      ld_idx  <= '0;
      step    <= '0;
      ob_full <= 1'b0;
      ob_idx  <= '0;
      for (int i = 0; i < P; i++) begin
        xr[i] <= '0; xi[i] <= '0; yr[i] <= '0; yi[i] <= '0; obr[i] <= '0; obi[i] <= '0;
      end
    end else begin
      if (ob_full && out_ready) begin
        if (ob_idx == 4'(P - 1)) begin
          ob_idx  <= '0;
          ob_full <= 1'b0;
        end else begin
          ob_idx <= ob_idx + 4'd1;
        end
      end
      unique case (state)
        S_LOAD: begin
          if (in_valid && in_ready) begin
            xr[ld_idx] <= in_re;
            xi[ld_idx] <= in_im;
            ld_idx     <= ld_idx + 4'd1;
          end
          if (start) begin
            state  <= S_FFT3;
            step   <= '0;
            ld_idx <= '0;
          end
        end
        S_FFT3: begin
          yr[32'(step)]      <= Y_W'(y0r);  yi[32'(step)]      <= Y_W'(y0i);
          yr[5 + 32'(step)]  <= Y_W'(y1r);  yi[5 + 32'(step)]  <= Y_W'(y1i);
          yr[10 + 32'(step)] <= Y_W'(y2r);  yi[10 + 32'(step)] <= Y_W'(y2i);
          if (step == 3'd4) begin
            state <= S_FFT5;
            step  <= '0;
          end else step <= step + 3'd1;
        end
        S_FFT5: begin
          obr[out_map(step, 0)] <= OUT_W'(z0r);  obi[out_map(step, 0)] <= OUT_W'(z0i);
          obr[out_map(step, 1)] <= OUT_W'(z1r);  obi[out_map(step, 1)] <= OUT_W'(z1i);
          obr[out_map(step, 2)] <= OUT_W'(z2r);  obi[out_map(step, 2)] <= OUT_W'(z2i);
          obr[out_map(step, 3)] <= OUT_W'(z3r);  obi[out_map(step, 3)] <= OUT_W'(z3i);
          obr[out_map(step, 4)] <= OUT_W'(z4r);  obi[out_map(step, 4)] <= OUT_W'(z4i);
          if (step == 3'd2) begin
            state   <= S_LOAD;
            ob_full <= 1'b1;
            ob_idx  <= '0;
          end else step <= step + 3'd1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
