// fft128: radix-2 decimation-in-time FFT of 2^LOG2N points (128 by default),
// one butterfly per clock cycle, computed in place in a working memory.
//
// The input stream, x(0) .. x(N-1) in natural order, is written to the
// working memory at bit-reversed addresses. The transform then runs LOG2N
// stages of N/2 butterflies; in stage st the butterfly b combines the words
// top = (b >> st) * 2^(st+1) + (b mod 2^st) and bot = top + 2^st with the
// twiddle W_N^((b mod 2^st) * 2^(LOG2N-1-st)). The working memory is a
// register array with two reads and two writes per cycle, so a butterfly reads
// its two words, multiplies, adds and writes back in the same cycle. The
// results X(0) .. X(N-1) are then copied in one cycle to an output bank and
// streamed out in natural order. The input goes to an input bank that is
// copied in one cycle to the working memory, so the next block loads and the
// previous one drains while a block is computed.
//
// Using a radix-2 algorithm for the 128-point transform follows the design
// description. One butterfly per cycle, the bit-reversed load, the banks and
// the scaling are this design's own choices: the first SCALE_STAGES stages halve their
// outputs (with rounding), so the output is X(k) / 2^SCALE_STAGES. With the
// defaults and inputs of up to 20 significant bits (FFT-15 results) no word of
// 24 bits can overflow.
//
// Interface: valid/ready input stream, valid/ready output stream with the bin
// number on out_k. Timing: N input cycles, N/2 * LOG2N compute cycles (448 for
// N = 128), the first result 451 cycles after the last input. With input fast
// enough and no back-pressure the engine takes one transform every 449 cycles
// (the compute plus one copy cycle).
module fft128 #(
  parameter int unsigned LOG2N        = 7,
  parameter int unsigned DATA_W       = fft_pkg::DATA_W,
  parameter int unsigned COEF_W       = fft_pkg::COEF_W,
  parameter int unsigned COEF_FRAC    = fft_pkg::COEF_FRAC,
  parameter int unsigned SCALE_STAGES = 4
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
  output logic [LOG2N-1:0]         out_k,
  // high during the N/2 * LOG2N butterfly cycles
  output logic                     computing
);

  localparam int unsigned NP   = 1 << LOG2N;
  localparam int unsigned HALF = NP / 2;
  localparam int unsigned ST_W = (LOG2N > 1) ? $clog2(LOG2N) : 1;
  localparam int unsigned PR_W = DATA_W + COEF_W + 1;

  typedef logic signed [COEF_W-1:0] tw_tab_t [HALF];

  function automatic tw_tab_t mk_tw(input bit want_sin);
    tw_tab_t t;
    for (int m = 0; m < int'(HALF); m++)
      t[m] = want_sin ? fft_pkg::sin_q(m, NP) : fft_pkg::cos_q(m, NP);
    return t;
  endfunction

  localparam tw_tab_t TW_COS = mk_tw(1'b0);
  localparam tw_tab_t TW_SIN = mk_tw(1'b1);

  typedef enum logic [1:0] {S_IDLE, S_COMP, S_DONE} state_t;
  state_t state;

  // input bank, working memory and output bank
  logic signed [DATA_W-1:0] ib_re  [NP];
  logic signed [DATA_W-1:0] ib_im  [NP];
  logic signed [DATA_W-1:0] mem_re [NP];
  logic signed [DATA_W-1:0] mem_im [NP];
  logic signed [DATA_W-1:0] ob_re  [NP];
  logic signed [DATA_W-1:0] ob_im  [NP];
  logic                     ib_full, ob_full;

  logic [LOG2N-1:0]   ld_idx;     // load index
  logic [LOG2N-1:0]   idx;        // output index
  logic [ST_W-1:0]    st;         // stage
  logic [LOG2N-2:0]   b;          // butterfly within the stage

  function automatic logic [LOG2N-1:0] rev(input logic [LOG2N-1:0] v);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < int'(LOG2N); i++) r[i] = v[LOG2N-1-i];
    return r;
  endfunction

  // ---- butterfly -----------------------------------------------------------
  logic [LOG2N-1:0]         top, bot, jmask;
  logic [LOG2N-2:0]         tw;
  logic signed [COEF_W-1:0] c, s;
  logic signed [PR_W-1:0]   pr, pi_, rnd;
  logic signed [DATA_W:0]   t_re, t_im, a_re, a_im, u_re, u_im, v_re, v_im;
  logic                     scale;

  always_comb begin
    jmask = LOG2N'((1 << st) - 1);
    top   = ((LOG2N'(b) & ~jmask) << 1) | (LOG2N'(b) & jmask);
    bot   = top | LOG2N'(1 << st);
    tw    = (LOG2N-1)'((LOG2N'(b) & jmask) << (LOG2N - 1 - 32'(st)));
    c     = TW_COS[tw];
    s     = TW_SIN[tw];
    rnd   = PR_W'(1) <<< (COEF_FRAC - 1);
    // t = mem[bot] * (c - j s)
    pr    = (PR_W'(mem_re[bot]) * PR_W'(c) + PR_W'(mem_im[bot]) * PR_W'(s) + rnd) >>> COEF_FRAC;
    pi_   = (PR_W'(mem_im[bot]) * PR_W'(c) - PR_W'(mem_re[bot]) * PR_W'(s) + rnd) >>> COEF_FRAC;
    t_re  = (DATA_W+1)'(pr);
    t_im  = (DATA_W+1)'(pi_);
    a_re  = (DATA_W+1)'(mem_re[top]);
    a_im  = (DATA_W+1)'(mem_im[top]);
    scale = (32'(st) < SCALE_STAGES);
    u_re  = a_re + t_re;
    u_im  = a_im + t_im;
    v_re  = a_re - t_re;
    v_im  = a_im - t_im;
    if (scale) begin
      u_re = (u_re + 1) >>> 1;
      u_im = (u_im + 1) >>> 1;
      v_re = (v_re + 1) >>> 1;
      v_im = (v_im + 1) >>> 1;
    end
  end

  logic ob_free, take_in;
  assign ob_free   = !ob_full || (out_ready && idx == LOG2N'(NP - 1));
  // the working memory takes a new block when it is idle or when its
  // results move to the output bank in the same cycle
  assign take_in   = ib_full && ((state == S_IDLE) || (state == S_DONE && ob_free));

  assign in_ready  = !ib_full;
  assign out_valid = ob_full;
  assign computing = (state == S_COMP);
  assign out_re    = ob_re[idx];
  assign out_im    = ob_im[idx];
  assign out_k     = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ib_full <= 1'b0;
      ob_full <= 1'b0;
      ld_idx  <= '0;
      idx     <= '0;
      st      <= '0;
      b       <= '0;
      for (int i = 0; i < int'(NP); i++) begin
        ib_re[i]  <= '0; ib_im[i]  <= '0;
        mem_re[i] <= '0; mem_im[i] <= '0;
        ob_re[i]  <= '0; ob_im[i]  <= '0;
      end
    end else begin
      // ---- load, in bit-reversed order
      if (in_valid && !ib_full) begin
        ib_re[rev(ld_idx)] <= in_re;
        ib_im[rev(ld_idx)] <= in_im;
        ld_idx <= ld_idx + 1'b1;
        if (ld_idx == LOG2N'(NP - 1)) ib_full <= 1'b1;
      end

      // ---- output drain
      if (ob_full && out_ready) begin
        idx <= idx + 1'b1;
        if (idx == LOG2N'(NP - 1)) ob_full <= 1'b0;
      end

      // ---- butterflies
      if (state == S_COMP) begin
        mem_re[top] <= DATA_W'(u_re);
        mem_im[top] <= DATA_W'(u_im);
        mem_re[bot] <= DATA_W'(v_re);
        mem_im[bot] <= DATA_W'(v_im);
        b <= b + 1'b1;
        if (b == (LOG2N-1)'(HALF - 1)) begin
          if (32'(st) == LOG2N - 1) state <= S_DONE;
          else st <= st + 1'b1;
        end
      end

      // ---- results to the output bank
      if (state == S_DONE && ob_free) begin
        ob_re   <= mem_re;
        ob_im   <= mem_im;
        ob_full <= 1'b1;
        state   <= S_IDLE;
      end

      // ---- new block into the working memory
      if (take_in) begin
        mem_re  <= ib_re;
        mem_im  <= ib_im;
        ib_full <= 1'b0;
        state   <= S_COMP;
        st      <= '0;
        b       <= '0;
      end
    end
  end
endmodule
