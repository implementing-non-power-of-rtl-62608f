// tb_fft1920_xpp: end-to-end self-checking testbench of the FFT-1920 with the
// alternative engines: the prime-factor FFT-15 (five FFT-3 then three FFT-5)
// and the FFT-128 built from two radix-4 FFT-64 and 64 FFT-2. Widths and
// everything else stay at their defaults.
//
// Same stimulus, reference and mechanism counters as the testbench of the
// default configuration: frames of 1920 samples in PFA order, each result
// compared with X(out_index) / 16 from a floating-point DFT, every index once
// per frame, input stalls, refused input, output back-pressure, FIFO
// recirculation and frame overlap each required at least once, and the cycle
// count of an unstalled frame checked.
module tb_fft1920_xpp;
  localparam int N = 1920;
  localparam int NFRM = 3;
  // 128 FFT-15 at 23 cycles, 14 more cycles to drain the last one, then
  // 15 columns at 417 cycles (128 loads + 160 butterfly cycles + 128 outputs
  // + 1 cycle of RAM read latency)
  localparam int FRAME_CYC = 128 * 23 + 14 + 15 * 417;
  localparam real PI = 3.14159265358979323846;

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last, init_done;
  logic signed [15:0] in_re, in_im;
  logic signed [23:0] out_re, out_im;
  logic [10:0] out_index;

  fft1920_top #(.FFT15_ALG(fft_pkg::FFT15_PFA), .FFT128_ALG(fft_pkg::FFT128_R4)) dut (.*);

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
