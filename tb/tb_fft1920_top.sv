// tb_fft1920_top: end-to-end self-checking testbench of the FFT-1920, with
// every parameter of the design at its default.
//
// Generates frames of 1920 complex 16-bit samples (a single tone, full-scale
// random data, and random data with random stalls), computes the 1920-point
// DFT of each in floating point, streams the samples into the design in PFA
// order and compares each result with X(out_index) / 16. Every frequency
// index must come exactly once per frame, and out_last must mark the last
// result. It also counts how often each mechanism of the flow happened and
// fails a run in which one of them never did: input stalls (in_valid low),
// the design refusing input (in_ready low while in_valid is high), output
// back-pressure, the FIFO being reused by recirculation (any frame after the
// first), and the next frame's FFT-15 pass overlapping the last FFT-128.
// Cycle counts: the FIFO is filled in 1920 cycles after reset, and a frame
// fed and drained without stalls takes FRAME_CYC cycles from its first input
// to its last output.
module tb_fft1920_top;
  localparam int N = 1920;
  localparam int NFRM = 3;
  // FFT-15 pass: 15 loads of the first block, 128 FFT-15 back to back at 49
  // cycles, 14 more cycles to drain the last one. FFT-128 pass: 128 reads of
  // the first column plus 2 cycles of RAM latency and bank copy, 15 columns
  // at 449 cycles (448 butterflies + 1 copy cycle, the reads of the next
  // column and the outputs of the previous one overlapping), then the 128
  // outputs of the last column.
  localparam int FRAME_CYC = (15 + 128 * 49 + 14) + (128 + 2) + 15 * 449 + 128;
  localparam real PI = 3.14159265358979323846;

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last, init_done;
  logic signed [15:0] in_re, in_im;
  logic signed [23:0] out_re, out_im;
  logic [10:0] out_index;

  fft1920_top dut (.*);

  int checks = 0, failures = 0;
  int xr [NFRM][N], xi [NFRM][N];
  real rr [NFRM][N], ri [NFRM][N];
  real peak [NFRM];
  real cw [N], sw [N];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference data and DFT
  initial begin
    for (int m = 0; m < N; m++) begin cw[m] = $cos(2.0*PI*m/N); sw[m] = $sin(2.0*PI*m/N); end
    for (int f = 0; f < NFRM; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin
          xr[f][n] = $rtoi(20000.0 * cw[(77 * n) % N]);
          xi[f][n] = $rtoi(20000.0 * sw[(77 * n) % N]);
        end else begin
          xr[f][n] = int'($signed(16'($urandom)));
          xi[f][n] = int'($signed(16'($urandom)));
        end
      end
      peak[f] = 0;
      for (int k = 0; k < N; k++) begin
        real ar, ai;
        ar = 0; ai = 0;
        for (int n = 0; n < N; n++) begin
          int m;
          m = (n * k) % N;
          ar += xr[f][n] * cw[m] + xi[f][n] * sw[m];
          ai += xi[f][n] * cw[m] - xr[f][n] * sw[m];
        end
        rr[f][k] = ar / 16.0; ri[f][k] = ai / 16.0;
        if (fabs(rr[f][k]) > peak[f]) peak[f] = fabs(rr[f][k]);
        if (fabs(ri[f][k]) > peak[f]) peak[f] = fabs(ri[f][k]);
      end
    end
  end

  // mechanism counters
  int cyc = 0, n_in_gap = 0, n_refused = 0, n_backpressure = 0, n_recirc_frames = 0, n_overlap = 0;
  int rst_cyc = -1, init_cyc = -1, first_in_cyc [NFRM], last_out_cyc [NFRM];

  // driver: PFA input order, random gaps in frame 2
  initial begin
    in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NFRM; f++)
      for (int n1 = 0; n1 < 128; n1++)
        for (int n2 = 0; n2 < 15; n2++) begin
          int n;
          n = (15 * n1 + 128 * n2) % N;
          if (f == 2) while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0; n_in_gap++; @(posedge clk);
          end
          in_valid <= 1; in_re <= 16'(xr[f][n]); in_im <= 16'(xi[f][n]);
          @(posedge clk iff in_ready);
        end
    in_valid <= 0;
  end

  int ofrm = 0, ocnt = 0;
  bit seen [N];
  always @(posedge clk) out_ready <= (ofrm < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);

  int n_in = 0;
  real err_max = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && rst_cyc < 0) rst_cyc = cyc;
    if (rst_n && init_done && init_cyc < 0) init_cyc = cyc;
    if (rst_n && in_valid && in_ready) begin
      if (n_in % N == 0) first_in_cyc[n_in / N] = cyc;
      n_in++;
    end
    if (rst_n && in_valid && !in_ready && init_done) n_refused++;
    if (out_valid && !out_ready) n_backpressure++;
    // next frame entering while the last FFT-128 of the previous one still works
    if (in_valid && in_ready && (dut.f128_computing || dut.f128_out_valid)) n_overlap++;
    if (rst_n && out_valid && out_ready) begin
      real er, ei, tol;
      tol = 8.0 + peak[ofrm] / 4096.0;
      er = real'(out_re) - rr[ofrm][out_index];
      ei = real'(out_im) - ri[ofrm][out_index];
      if (fabs(er) > err_max) err_max = fabs(er);
      if (fabs(ei) > err_max) err_max = fabs(ei);
      checks++;
      if (fabs(er) > tol || fabs(ei) > tol || seen[out_index]) begin
        failures++;
        if (failures < 10) $display("frame %0d X(%0d): got %0d,%0d want %f,%f%s", ofrm, out_index,
                                    out_re, out_im, rr[ofrm][out_index], ri[ofrm][out_index],
                                    seen[out_index] ? " (index repeated)" : "");
      end
      seen[out_index] = 1;
      ocnt++;
      checks++;
      if (out_last != (ocnt == N)) begin failures++; $display("out_last wrong at output %0d", ocnt); end
      if (ocnt == N) begin
        last_out_cyc[ofrm] = cyc;
        for (int k = 0; k < N; k++) seen[k] = 0;
        if (ofrm > 0) n_recirc_frames++;
        $display("frame %0d done: %0d cycles from first input to last output, max error %0.1f LSB (peak %0.0f)",
                 ofrm, cyc - first_in_cyc[ofrm], err_max, peak[ofrm]);
        ocnt = 0; err_max = 0;
        ofrm++;
        if (ofrm == NFRM) finish();
      end
    end
  end

  task automatic finish();
    checks++;
    if (init_cyc - rst_cyc != N) begin failures++; $display("FIFO initialised after %0d cycles, want %0d", init_cyc - rst_cyc, N); end
    checks++;
    if (last_out_cyc[0] - first_in_cyc[0] != FRAME_CYC) begin
      failures++; $display("frame 0 took %0d cycles, want %0d", last_out_cyc[0] - first_in_cyc[0], FRAME_CYC);
    end
    $display("mechanisms: input gaps %0d, input refused %0d, output back-pressure %0d, recirculated frames %0d, overlapped inputs %0d",
             n_in_gap, n_refused, n_backpressure, n_recirc_frames, n_overlap);
    checks += 5;
    if (n_in_gap == 0) failures++;
    if (n_refused == 0) failures++;
    if (n_backpressure == 0) failures++;
    if (n_recirc_frames == 0) failures++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
