// fft128_r4: 128-point FFT as two radix-4 64-point FFTs followed by 64
// 2-point FFTs. Drop-in alternative to fft128 (same ports, no LOG2N).
//
// Decimation in time by 2: E(k) is the 64-point DFT of the even samples and
// O(k) that of the odd samples, and X(k) = E(k) + W128^k O(k),
// X(k+64) = E(k) - W128^k O(k) for k = 0..63. Each 64-point DFT is a radix-4
// decimation-in-time FFT of three stages of 16 radix-4 butterflies. The
// working memory holds the even samples in words 0..63 and the odd samples in
// words 64..127, each half loaded at base-4 digit-reversed addresses. In
// stage st (quarter = 4^st) butterfly b of a half uses the words
// base + m*quarter, m = 0..3, base = (b / quarter) * 4*quarter + (b mod quarter),
// multiplies input m by W64^(m * (b mod quarter) * 16 / quarter) and combines
// them with the 4-point DFT. The final pass combines word k and word 64+k
// with W128^k and writes X(k) to word k and X(k+64) to word 64+k, so the
// results leave in natural order. One butterfly per cycle: 2 * 3 * 16 = 96
// radix-4 cycles and 64 radix-2 cycles, 160 compute cycles per transform.
//
// The decomposition (two radix-4 FFT-64 and 64 FFT-2) follows the design
// description; the memory organisation, the one-butterfly-per-cycle schedule
// and the scaling are this design's own. Scaling: the first two radix-4
// stages divide by 4 (with rounding), so the output is X(k) / 16, the same as
// fft128 with its defaults.
//
// Interface and timing: valid/ready in (natural order), 160 compute cycles,
// valid/ready out (natural order, bin number on out_k); 416 cycles per
// transform without stalls.
module fft128_r4 #(
  parameter int unsigned DATA_W    = fft_pkg::DATA_W,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_re,
  input  logic signed [DATA_W-1:0] in_im,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_re,
  output logic signed [DATA_W-1:0] out_im,
  output logic [6:0]               out_k,
  output logic                     computing
);
  localparam int unsigned NP   = 128;
  localparam int unsigned PR_W = DATA_W + COEF_W + 3;
  localparam int unsigned S_W  = DATA_W + 3;          // butterfly sums

  typedef logic signed [COEF_W-1:0] tw_tab_t [NP];

  function automatic tw_tab_t mk_tw(input bit want_sin);
    tw_tab_t t;
    for (int m = 0; m < int'(NP); m++)
      t[m] = want_sin ? fft_pkg::sin_q(m, NP) : fft_pkg::cos_q(m, NP);
    return t;
  endfunction

  localparam tw_tab_t TW_COS = mk_tw(1'b0);   // W128^m = cos - j sin
  localparam tw_tab_t TW_SIN = mk_tw(1'b1);

  typedef enum logic [1:0] {S_LOAD, S_R4, S_R2, S_OUT} state_t;
  state_t state;

  logic signed [DATA_W-1:0] mem_re [NP];
  logic signed [DATA_W-1:0] mem_im [NP];

  logic [6:0] idx;        // load / output index, radix-2 butterfly k (0..63)
  logic [1:0] st;         // radix-4 stage 0..2
  logic       half;       // which 64-point DFT
  logic [3:0] b;          // radix-4 butterfly 0..15

  // load address: half = n[0], base-4 digit reversal of n[6:1]
  logic [6:0] ld_addr;
  assign ld_addr = {idx[0], idx[2:1], idx[4:3], idx[6:5]};

  // complex multiply by W128^m, rounded
  function automatic logic signed [S_W-1:0] cmul_re(input logic signed [S_W-1:0] xr,
                                                    input logic signed [S_W-1:0] xi,
                                                    input logic [6:0] m);
    logic signed [PR_W-1:0] p;
    p = (PR_W'(xr) * PR_W'(TW_COS[m]) + PR_W'(xi) * PR_W'(TW_SIN[m]) +
         (PR_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    return S_W'(p);
  endfunction
  function automatic logic signed [S_W-1:0] cmul_im(input logic signed [S_W-1:0] xr,
                                                    input logic signed [S_W-1:0] xi,
                                                    input logic [6:0] m);
    logic signed [PR_W-1:0] p;
    p = (PR_W'(xi) * PR_W'(TW_COS[m]) - PR_W'(xr) * PR_W'(TW_SIN[m]) +
         (PR_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    return S_W'(p);
  endfunction

  // ---- radix-4 butterfly ---------------------------------------------------------
  logic [6:0]             a4 [4];
  logic [6:0]             tw4 [4];
  logic [5:0]             q, j;
  logic signed [S_W-1:0]  ar [4], ai [4];
  logic signed [S_W-1:0]  yr [4], yi [4];
  logic                   scale4;

  always_comb begin
    q = 6'(1 << (2 * st));                       // quarter = 4^st
    j = 6'(b) & (q - 6'd1);
    for (int m = 0; m < 4; m++) begin
      a4[m]  = {half, 6'((6'(b) & ~(q - 6'd1)) << 2) | j} + 7'(m * q);
      // W64^(m*j*16/q) = W128^(m*j*32/q)
      tw4[m] = 7'((m * 32'(j) * 32) >> (2 * st));
      ar[m]  = cmul_re(S_W'(mem_re[a4[m]]), S_W'(mem_im[a4[m]]), tw4[m]);
      ai[m]  = cmul_im(S_W'(mem_re[a4[m]]), S_W'(mem_im[a4[m]]), tw4[m]);
    end
    // 4-point DFT, W4 = -j
    yr[0] = ar[0] + ar[1] + ar[2] + ar[3];
    yi[0] = ai[0] + ai[1] + ai[2] + ai[3];
    yr[1] = ar[0] + ai[1] - ar[2] - ai[3];      // a0 - j a1 - a2 + j a3
    yi[1] = ai[0] - ar[1] - ai[2] + ar[3];
    yr[2] = ar[0] - ar[1] + ar[2] - ar[3];
    yi[2] = ai[0] - ai[1] + ai[2] - ai[3];
    yr[3] = ar[0] - ai[1] - ar[2] + ai[3];      // a0 + j a1 - a2 - j a3
    yi[3] = ai[0] + ar[1] - ai[2] - ar[3];
    scale4 = (st < 2'd2);
    if (scale4)
      for (int m = 0; m < 4; m++) begin
        yr[m] = (yr[m] + S_W'(2)) >>> 2;
        yi[m] = (yi[m] + S_W'(2)) >>> 2;
      end
  end

  // ---- final radix-2 pass ----------------------------------------------------------
  logic [5:0]            k2;
  logic signed [S_W-1:0] er, ei, tr, ti, u_re, u_im, v_re, v_im;
  always_comb begin
    k2   = idx[5:0];
    er   = S_W'(mem_re[{1'b0, k2}]);
    ei   = S_W'(mem_im[{1'b0, k2}]);
    tr   = cmul_re(S_W'(mem_re[{1'b1, k2}]), S_W'(mem_im[{1'b1, k2}]), {1'b0, k2});
    ti   = cmul_im(S_W'(mem_re[{1'b1, k2}]), S_W'(mem_im[{1'b1, k2}]), {1'b0, k2});
    u_re = er + tr;  u_im = ei + ti;
    v_re = er - tr;  v_im = ei - ti;
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign computing = (state == S_R4) || (state == S_R2);
  assign out_re    = mem_re[idx];
  assign out_im    = mem_im[idx];
  assign out_k     = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      idx   <= '0;
      st    <= '0;
      half  <= 1'b0;
      b     <= '0;
      for (int i = 0; i < int'(NP); i++) begin
        mem_re[i] <= '0;
        mem_im[i] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          mem_re[ld_addr] <= in_re;
          mem_im[ld_addr] <= in_im;
          idx <= idx + 1'b1;
          if (idx == 7'(NP - 1)) begin
            state <= S_R4;
            st    <= '0;
            half  <= 1'b0;
            b     <= '0;
          end
        end
        S_R4: begin
          for (int m = 0; m < 4; m++) begin
            mem_re[a4[m]] <= DATA_W'(yr[m]);
            mem_im[a4[m]] <= DATA_W'(yi[m]);
          end
          b <= b + 1'b1;
          if (b == 4'd15) begin
            half <= ~half;
            if (half) begin
              if (st == 2'd2) begin
                state <= S_R2;
                idx   <= '0;
              end else st <= st + 1'b1;
            end
          end
        end
        S_R2: begin
          mem_re[{1'b0, k2}] <= DATA_W'(u_re);
          mem_im[{1'b0, k2}] <= DATA_W'(u_im);
          mem_re[{1'b1, k2}] <= DATA_W'(v_re);
          mem_im[{1'b1, k2}] <= DATA_W'(v_im);
          if (k2 == 6'd63) begin
            state <= S_OUT;
            idx   <= '0;
          end else idx <= idx + 1'b1;
        end
        S_OUT: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == 7'(NP - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
