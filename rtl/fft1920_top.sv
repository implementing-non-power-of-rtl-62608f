// fft1920_top: 1920-point FFT built from 15-point and 128-point transforms
// by the Prime Factor Algorithm (PFA).
//
// Because 1920 = 128 * 15 with 128 and 15 co-prime, Good's index mapping
// turns the 1920-point DFT into a 128 x 15 two-dimensional DFT with no twiddle
// multiplications between the two passes: 128 FFT-15 (one per row n1) followed
// by 15 FFT-128 (one per column k2). The flow is:
//
//   input stream -> fft15 -> real RAM / imaginary RAM -> fft128 -> output
//                            ^ write address counter   ^ read address FIFO
//
// The FFT-15 results are written to the two RAMs in the order they come out
// (address 15*n1 + k2) by the write address counter; the read address FIFO,
// filled once after reset by read_seq_init and then recirculating, reads them
// back column by column for the FFT-128. This structure follows the design
// description. Each pass has two engines, chosen by parameter: by default the
// 15-point pairwise engine (fft15) and the radix-2 128-point transform
// (fft128); with FFT15_ALG = FFT15_PFA and FFT128_ALG = FFT128_R4 the
// prime-factor FFT-15 (fft15_pfa) and the radix-4 based FFT-128 (fft128_r4).
// Both pairs are methods the design description gives; the defaults are the
// ones it describes in most detail. The sequencing below (a pass over all FFT-15, then a pass over
// all FFT-128, the next frame's FFT-15 pass starting as soon as the last
// column has been read out of the RAMs) is this design's own.
//
// Input order: the input stream is one frame of 1920 samples in PFA order,
// sample number 15*n1 + n2 (n1 = 0..127, n2 = 0..14) carrying
// x((15*n1 + 128*n2) mod 1920). Output: 1920 results X(k) / 16, 24 bits, in
// column order; out_index gives k = (1665*k1 + 256*k2) mod 1920 for FFT-128
// bin k1 of column k2, and out_last marks the last result of a frame.
// All streams use valid/ready handshakes. in_ready stays low for the 1920
// cycles after reset while the FIFO is filled (init_done low), whenever the
// FFT-15 engine cannot take a sample, and while the FFT-128 pass owns the RAMs. f15_computing and
// f128_computing are status outputs of the engines that the sequencing does
// not need.
module fft1920_top #(
  parameter int unsigned         IN_W       = fft_pkg::IN_W,
  parameter int unsigned         DATA_W     = fft_pkg::DATA_W,
  parameter fft_pkg::fft15_alg_e  FFT15_ALG  = fft_pkg::FFT15_PAIRWISE,
  parameter fft_pkg::fft128_alg_e FFT128_ALG = fft_pkg::FFT128_RADIX2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_re,
  output logic signed [DATA_W-1:0] out_im,
  output logic [10:0]              out_index,
  output logic                     out_last,
  output logic                     init_done
);
  import fft_pkg::*;

  localparam int unsigned AW = $clog2(N);      // 11

  typedef enum logic [1:0] {PH_INIT, PH_FFT15, PH_FFT128} phase_t;
  phase_t phase;

  // ---- read address FIFO and its initialiser --------------------------------
  logic          seq_push, seq_done;
  logic [AW-1:0] seq_data, rd_addr;
  logic          fifo_pop, fifo_empty, fifo_full;
  logic [AW:0]   fifo_count;

  read_seq_init #(.ROWS(N1), .COLS(N2), .ADDR_W(AW)) u_seq (
    .clk, .rst_n, .push(seq_push), .data(seq_data), .done(seq_done)
  );

  read_addr_fifo #(.DEPTH(N), .WIDTH(AW), .CNT_W(AW + 1)) u_rfifo (
    .clk, .rst_n, .recirc(seq_done), .push(seq_push), .push_data(seq_data),
    .pop(fifo_pop), .head(rd_addr), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count)
  );

  assign init_done = seq_done;

  // ---- FFT-15 pass ------------------------------------------------------------
  logic [AW:0]              in_cnt;
  logic                     f15_in_valid, f15_in_ready, f15_out_valid, f15_computing;
  logic signed [DATA_W-1:0] f15_re, f15_im;
  logic [3:0]               f15_k;

  assign f15_in_valid = in_valid && (phase == PH_FFT15) && (in_cnt != (AW+1)'(N));
  assign in_ready     = f15_in_ready && (phase == PH_FFT15) && (in_cnt != (AW+1)'(N));

  if (FFT15_ALG == FFT15_PFA) begin : g_fft15
    fft15_pfa #(.IN_W(IN_W), .OUT_W(DATA_W)) u_fft15 (
      .clk, .rst_n,
      .in_valid(f15_in_valid), .in_ready(f15_in_ready), .in_re, .in_im,
      .out_valid(f15_out_valid), .out_ready(1'b1),
      .out_re(f15_re), .out_im(f15_im), .out_k(f15_k), .computing(f15_computing)
    );
  end else begin : g_fft15
    fft15 #(.IN_W(IN_W), .OUT_W(DATA_W)) u_fft15 (
      .clk, .rst_n,
      .in_valid(f15_in_valid), .in_ready(f15_in_ready), .in_re, .in_im,
      .out_valid(f15_out_valid), .out_ready(1'b1),
      .out_re(f15_re), .out_im(f15_im), .out_k(f15_k), .computing(f15_computing)
    );
  end

  // ---- write address counter and the two RAMs --------------------------------
  logic [AW-1:0]     wr_addr;
  logic              wr_last;
  logic [DATA_W-1:0] ram_re_q, ram_im_q;

  write_addr_counter #(.DEPTH(N), .ADDR_W(AW)) u_wcnt (
    .clk, .rst_n, .clr(1'b0), .inc(f15_out_valid), .addr(wr_addr), .last(wr_last)
  );

  sample_ram #(.DEPTH(N), .WIDTH(DATA_W), .ADDR_W(AW)) u_ram_re (
    .clk, .we(f15_out_valid), .waddr(wr_addr), .wdata(f15_re),
    .re(fifo_pop), .raddr(rd_addr), .rdata(ram_re_q)
  );

  sample_ram #(.DEPTH(N), .WIDTH(DATA_W), .ADDR_W(AW)) u_ram_im (
    .clk, .we(f15_out_valid), .waddr(wr_addr), .wdata(f15_im),
    .re(fifo_pop), .raddr(rd_addr), .rdata(ram_im_q)
  );

  // ---- FFT-128 pass -----------------------------------------------------------
  logic [7:0] rd_issued;       // reads issued for the current column, 0..128
  logic [3:0] rd_col;          // column being read, 0..14
  logic       rd_valid;
  logic       f128_in_ready, f128_out_valid, f128_computing;
  logic [6:0] f128_k;

  assign fifo_pop = (phase == PH_FFT128) && (rd_issued != 8'(N1)) && f128_in_ready && !fifo_empty;

  if (FFT128_ALG == FFT128_R4) begin : g_fft128
    fft128_r4 #(.DATA_W(DATA_W)) u_fft128 (
      .clk, .rst_n,
      .in_valid(rd_valid), .in_ready(f128_in_ready),
      .in_re(signed'(ram_re_q)), .in_im(signed'(ram_im_q)),
      .out_valid(f128_out_valid), .out_ready,
      .out_re, .out_im, .out_k(f128_k), .computing(f128_computing)
    );
  end else begin : g_fft128
    fft128 #(.LOG2N(7), .DATA_W(DATA_W)) u_fft128 (
      .clk, .rst_n,
      .in_valid(rd_valid), .in_ready(f128_in_ready),
      .in_re(signed'(ram_re_q)), .in_im(signed'(ram_im_q)),
      .out_valid(f128_out_valid), .out_ready,
      .out_re, .out_im, .out_k(f128_k), .computing(f128_computing)
    );
  end

  assign out_valid = f128_out_valid;

  // ---- output index (CRT map), built incrementally ---------------------------
  // within a column the index steps by 1665 mod 1920, from column to column
  // the start steps by 256 mod 1920
  localparam int unsigned STEP_K1 = (N2 * T2) % N;   // 1665
  localparam int unsigned STEP_K2 = (N1 * T1) % N;   // 256

  logic [AW-1:0] col_base;
  logic [3:0]    out_col;

  function automatic logic [AW-1:0] add_mod(input logic [AW-1:0] a, input int unsigned step);
    logic [AW:0] s;
    s = (AW+1)'(a) + (AW+1)'(step);
    return (s >= (AW+1)'(N)) ? AW'(s - (AW+1)'(N)) : AW'(s);
  endfunction

  assign out_last = (f128_k == 7'(N1 - 1)) && (out_col == 4'(N2 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_index <= '0;
      col_base  <= '0;
      out_col   <= '0;
    end else if (f128_out_valid && out_ready) begin
      if (f128_k == 7'(N1 - 1)) begin
        col_base  <= add_mod(col_base, STEP_K2);
        out_index <= add_mod(col_base, STEP_K2);
        out_col   <= (out_col == 4'(N2 - 1)) ? '0 : out_col + 1'b1;
      end else begin
        out_index <= add_mod(out_index, STEP_K1);
      end
    end
  end

  // ---- pass sequencing ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_INIT;
      in_cnt    <= '0;
      rd_issued <= '0;
      rd_col    <= '0;
      rd_valid  <= 1'b0;
    end else begin
      rd_valid <= fifo_pop;
      if (in_valid && in_ready) in_cnt <= in_cnt + 1'b1;
      if (fifo_pop) rd_issued <= rd_issued + 1'b1;

      unique case (phase)
        PH_INIT: if (seq_done) phase <= PH_FFT15;
        PH_FFT15: if (f15_out_valid && wr_last) begin
          // last FFT-15 result of the frame written
          phase  <= PH_FFT128;
          in_cnt <= '0;
        end
        PH_FFT128: if (rd_issued == 8'(N1) && !f128_in_ready) begin
          // the FFT-128 has taken the whole column
          rd_issued <= '0;
          if (rd_col == 4'(N2 - 1)) begin
            rd_col <= '0;
            phase  <= PH_FFT15;
          end else begin
            rd_col <= rd_col + 1'b1;
          end
        end
        default: phase <= PH_INIT;
      endcase
    end
  end

  // the RAM write side and the read side never overlap
  a_no_write_in_read_pass: assert property (@(posedge clk) disable iff (!rst_n)
    !(f15_out_valid && phase == PH_FFT128))
    else $error("fft1920_top: FFT-15 result written during the FFT-128 pass");
  a_fifo_full_when_running: assert property (@(posedge clk) disable iff (!rst_n)
    (phase != PH_INIT) |-> fifo_full || fifo_pop)
    else $error("fft1920_top: read address FIFO lost an entry");
endmodule
