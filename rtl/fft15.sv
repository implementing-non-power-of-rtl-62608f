// fft15: 15-point DFT engine, computed pairwise from the symmetry of the
// odd-length DFT coefficients.
//
// For odd N the coefficients obey Re W^{nk} = Re W^{(N-n)k} and
// Im W^{nk} = -Im W^{(N-n)k}. With s_n = x(n) + x(15-n) and
// d_n = x(n) - x(15-n), n = 1..7, the outputs come in pairs
//   X(k)    = x(0) + sum_n s_n cos(2 pi n k/15) - j sum_n d_n sin(2 pi n k/15)
//   X(15-k) = x(0) + sum_n s_n cos(2 pi n k/15) + j sum_n d_n sin(2 pi n k/15)
// for k = 1..7, and X(0) = x(0) + sum_n s_n. Four multiply-accumulate lanes
// (Re s * cos, Im s * cos, Im d * sin, Re d * sin) work on one n per cycle, so
// a pair takes 7 cycles and the seven pairs 49 cycles; a fifth lane adds up
// X(0) during the first pair. This pairing, the four lanes, the 7-cycle pair
// and the 49-cycle total follow the design description.
//
// Interface: a valid/ready stream of 15 samples x(0)..x(14) in, a valid/ready
// stream of 15 results X(0)..X(14) out, in natural order, with out_k giving
// the bin number. Timing: the 15 inputs are accepted one per cycle; the 49
// compute cycles start on the cycle after the last one; the results are held
// in an output bank and the first one is offered on the cycle after the
// compute ends, 50 cycles after the last input. There are two input banks and
// two output banks, so the next block loads and the previous one drains while
// a block is computed: with input fast enough and no back-pressure the engine
// computes back to back, one transform every 49 cycles. The banks are this
// design's own choice.
//
// Arithmetic: products are kept exact and summed with x(0) scaled by
// 2^COEF_FRAC, then rounded once (add half, shift right). The result grows by
// at most 15x, so OUT_W >= IN_W + 5 holds every result without overflow.
module fft15 #(
  parameter int unsigned IN_W      = fft_pkg::IN_W,
  parameter int unsigned OUT_W     = fft_pkg::DATA_W,
  parameter int unsigned COEF_W    = fft_pkg::COEF_W,
  parameter int unsigned COEF_FRAC = fft_pkg::COEF_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input stream x(0) .. x(14)
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  // output stream X(0) .. X(14)
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic [3:0]              out_k,
  // high during the 49 compute cycles
  output logic                    computing
);

  localparam int unsigned P     = 15;
  localparam int unsigned SD_W  = IN_W + 1;                 // s_n, d_n
  localparam int unsigned ACC_W = SD_W + COEF_W + 4;        // 7 products + x(0)
  localparam int unsigned X0_W  = IN_W + 4;                 // 15 inputs

  typedef logic signed [COEF_W-1:0] coef_tab_t [64];   // index 8*n + k

  function automatic coef_tab_t mk_tab(input bit want_sin);
    coef_tab_t t;
    for (int n = 0; n < 8; n++)
      for (int k = 0; k < 8; k++)
        t[8 * n + k] = want_sin ? fft_pkg::sin_q((n * k) % P, P) : fft_pkg::cos_q((n * k) % P, P);
    return t;
  endfunction

  localparam coef_tab_t COS_T = mk_tab(1'b0);
  localparam coef_tab_t SIN_T = mk_tab(1'b1);

  typedef enum logic [0:0] {S_IDLE, S_COMP} state_t;
  state_t state;

  // two input banks: one loads while the other is computed
  logic signed [IN_W-1:0]  xr [2][P];
  logic signed [IN_W-1:0]  xi [2][P];
  logic [1:0]              bank_full;
  logic                    ld_bank, cp_bank;
  logic [3:0]              ld_idx;
  logic [2:0]              n, k;            // 1..7 during S_COMP

  logic signed [ACC_W-1:0] acc_src, acc_sic, acc_dis, acc_drs;
  logic signed [X0_W-1:0]  acc_x0r, acc_x0i;

  // two output banks: one is written by the compute, the other drains
  logic signed [OUT_W-1:0] obr [2][P];
  logic signed [OUT_W-1:0] obi [2][P];
  logic [1:0]              ob_full;
  logic                    ob_wr, ob_rd;
  logic [3:0]              ob_idx;

  // ---- one lane step -------------------------------------------------------
  logic signed [SD_W-1:0]  sr, si, dr, di;
  logic signed [COEF_W-1:0] c, s;
  logic signed [ACC_W-1:0] nx_src, nx_sic, nx_dis, nx_drs;
  logic signed [X0_W-1:0]  nx_x0r, nx_x0i;
  logic signed [ACC_W-1:0] x0r_sc, x0i_sc, half;
  logic signed [ACC_W-1:0] yk_re, yk_im, ym_re, ym_im;

  always_comb begin
    sr = SD_W'(xr[cp_bank][4'(n)]) + SD_W'(xr[cp_bank][4'(P) - 4'(n)]);
    si = SD_W'(xi[cp_bank][4'(n)]) + SD_W'(xi[cp_bank][4'(P) - 4'(n)]);
    dr = SD_W'(xr[cp_bank][4'(n)]) - SD_W'(xr[cp_bank][4'(P) - 4'(n)]);
    di = SD_W'(xi[cp_bank][4'(n)]) - SD_W'(xi[cp_bank][4'(P) - 4'(n)]);
    c  = COS_T[{n, k}];
    s  = SIN_T[{n, k}];
    nx_src = acc_src + ACC_W'(sr * c);
    nx_sic = acc_sic + ACC_W'(si * c);
    nx_dis = acc_dis + ACC_W'(di * s);
    nx_drs = acc_drs + ACC_W'(dr * s);
    nx_x0r = acc_x0r + X0_W'(sr);
    nx_x0i = acc_x0i + X0_W'(si);
    // results of the pair once n = 7 has been accumulated
    x0r_sc = ACC_W'(xr[cp_bank][0]) <<< COEF_FRAC;
    x0i_sc = ACC_W'(xi[cp_bank][0]) <<< COEF_FRAC;
    half   = ACC_W'(1) <<< (COEF_FRAC - 1);
    yk_re  = (x0r_sc + nx_src + nx_dis + half) >>> COEF_FRAC;   // X(k)
    yk_im  = (x0i_sc + nx_sic - nx_drs + half) >>> COEF_FRAC;
    ym_re  = (x0r_sc + nx_src - nx_dis + half) >>> COEF_FRAC;   // X(15-k)
    ym_im  = (x0i_sc + nx_sic + nx_drs + half) >>> COEF_FRAC;
  end

  logic ld_fire, ld_last, cp_last, drain_last;
  assign in_ready   = !bank_full[ld_bank];
  assign ld_fire    = in_valid && in_ready;
  assign ld_last    = ld_fire && (ld_idx == 4'(P - 1));
  assign cp_last    = (state == S_COMP) && (n == 3'd7) && (k == 3'd7);
  assign drain_last = ob_full[ob_rd] && out_ready && (ob_idx == 4'(P - 1));

  assign computing = (state == S_COMP);
  assign out_valid = ob_full[ob_rd];
  assign out_re    = obr[ob_rd][ob_idx];
  assign out_im    = obi[ob_rd][ob_idx];
  assign out_k     = ob_idx;

  // A transform starts when the engine is idle or finishing, the next input
  // bank is full (or receives its last sample now) and the next output bank
  // is empty (or hands over its last result now).
  logic nx_cp, nx_ob, bank_ok, ob_ok, start_comp;
  assign nx_cp      = cp_last ? ~cp_bank : cp_bank;
  assign nx_ob      = cp_last ? ~ob_wr : ob_wr;
  assign bank_ok    = bank_full[nx_cp] || (ld_last && ld_bank == nx_cp);
  assign ob_ok      = !ob_full[nx_ob] || (drain_last && ob_rd == nx_ob);
  assign start_comp = ((state == S_IDLE) || cp_last) && bank_ok && ob_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bank_full <= '0;
      ld_bank   <= 1'b0;
      cp_bank   <= 1'b0;
      ld_idx    <= '0;
      n         <= 3'd1;
      k         <= 3'd1;
      acc_src <= '0; acc_sic <= '0; acc_dis <= '0; acc_drs <= '0;
      acc_x0r <= '0; acc_x0i <= '0;
      ob_full   <= '0;
      ob_wr     <= 1'b0;
      ob_rd     <= 1'b0;
      ob_idx    <= '0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < P; i++) begin
          xr[b][i] <= '0; xi[b][i] <= '0; obr[b][i] <= '0; obi[b][i] <= '0;
        end
    end else begin
      // ---- output drain
      if (ob_full[ob_rd] && out_ready) begin
        if (ob_idx == 4'(P - 1)) begin
          ob_idx         <= '0;
          ob_full[ob_rd] <= 1'b0;
          ob_rd          <= ~ob_rd;
        end else begin
          ob_idx <= ob_idx + 4'd1;
        end
      end

      // ---- input load
      if (ld_fire) begin
        xr[ld_bank][ld_idx] <= in_re;
        xi[ld_bank][ld_idx] <= in_im;
        if (ld_idx == 4'(P - 1)) begin
          ld_idx             <= '0;
          bank_full[ld_bank] <= 1'b1;
          ld_bank            <= ~ld_bank;
        end else begin
          ld_idx <= ld_idx + 4'd1;
        end
      end

      // ---- compute
      if (state == S_COMP) begin
        if (k == 3'd1) begin
          acc_x0r <= nx_x0r;
          acc_x0i <= nx_x0i;
        end
        if (n == 3'd7) begin
          obr[ob_wr][4'(k)]         <= OUT_W'(yk_re);
          obi[ob_wr][4'(k)]         <= OUT_W'(yk_im);
          obr[ob_wr][4'(P) - 4'(k)] <= OUT_W'(ym_re);
          obi[ob_wr][4'(P) - 4'(k)] <= OUT_W'(ym_im);
          if (k == 3'd1) begin
            obr[ob_wr][0] <= OUT_W'(nx_x0r);
            obi[ob_wr][0] <= OUT_W'(nx_x0i);
          end
          acc_src <= '0; acc_sic <= '0; acc_dis <= '0; acc_drs <= '0;
          n <= 3'd1;
          if (k == 3'd7) begin
            bank_full[cp_bank] <= 1'b0;
            cp_bank            <= ~cp_bank;
            ob_full[ob_wr]     <= 1'b1;
            ob_wr              <= ~ob_wr;
            state              <= S_IDLE;
          end else begin
            k <= k + 3'd1;
          end
        end else begin
          acc_src <= nx_src; acc_sic <= nx_sic; acc_dis <= nx_dis; acc_drs <= nx_drs;
          n <= n + 3'd1;
        end
      end

      if (start_comp) begin
        state   <= S_COMP;
        n       <= 3'd1;
        k       <= 3'd1;
        acc_src <= '0; acc_sic <= '0; acc_dis <= '0; acc_drs <= '0;
        acc_x0r <= X0_W'(xr[nx_cp][0]);
        acc_x0i <= X0_W'(xi[nx_cp][0]);
      end
    end
  end
endmodule
