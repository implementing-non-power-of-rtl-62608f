// tb_fft128_r4: self-checking testbench of the 128-point FFT built from two
// radix-4 64-point FFTs and 64 2-point FFTs. Same stimulus and floating-point
// reference (X/16) as the radix-2 engine's testbench; the timing checks are
// this engine's: 160 compute cycles per transform and the first output 161
// cycles after the last input. Random back-pressure on the later frames.
module tb_fft128_r4;
  localparam int LOG2N = 7, NP = 128, DATA_W = 24, SCALE = 4;
  localparam int NFRM = 6;
  localparam real PI = 3.14159265358979323846;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, computing;
  logic signed [DATA_W-1:0] in_re, in_im, out_re, out_im;
  logic [LOG2N-1:0] out_k;

  fft128_r4 #(.DATA_W(DATA_W)) dut (.*);

  int checks = 0, failures = 0;
  int xr [NFRM][NP], xi [NFRM][NP];
  real rr [NFRM][NP], ri [NFRM][NP];
  real peak [NFRM];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NFRM; f++) begin
      for (int n = 0; n < NP; n++) begin
        if (f == 0) begin xr[f][n] = (n == 0) ? 400000 : 0; xi[f][n] = (n == 0) ? -160000 : 0; end
        else if (f == 1) begin
          xr[f][n] = $rtoi(500000.0 * $cos(2.0*PI*5*n/NP));
          xi[f][n] = $rtoi(500000.0 * $sin(2.0*PI*5*n/NP));
        end else begin
          xr[f][n] = $urandom_range(0, 1048575) - 524288;
          xi[f][n] = $urandom_range(0, 1048575) - 524288;
        end
      end
      peak[f] = 0;
      for (int k = 0; k < NP; k++) begin
        rr[f][k] = 0; ri[f][k] = 0;
        for (int n = 0; n < NP; n++) begin
          rr[f][k] += xr[f][n] * $cos(2.0*PI*n*k/NP) + xi[f][n] * $sin(2.0*PI*n*k/NP);
          ri[f][k] += xi[f][n] * $cos(2.0*PI*n*k/NP) - xr[f][n] * $sin(2.0*PI*n*k/NP);
        end
        rr[f][k] /= real'(1 << SCALE); ri[f][k] /= real'(1 << SCALE);
        if (fabs(rr[f][k]) > peak[f]) peak[f] = fabs(rr[f][k]);
        if (fabs(ri[f][k]) > peak[f]) peak[f] = fabs(ri[f][k]);
      end
    end
  end

  initial begin
    in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRM; f++)
      for (int n = 0; n < NP; n++) begin
        in_valid <= 1; in_re <= DATA_W'(xr[f][n]); in_im <= DATA_W'(xi[f][n]);
        @(posedge clk iff in_ready);
      end
    in_valid <= 0;
  end

  int frm = 0;
  always @(posedge clk) out_ready <= (frm < 2) ? 1'b1 : ($urandom_range(0, 2) != 0);

  int cyc = 0, n_in = 0, last_in_cyc = 0, comp_len = 0, stalls = 0;
  real tol;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready) begin
      n_in++;
      if (n_in % NP == 0) last_in_cyc = cyc;
    end
    if (rst_n && computing) comp_len++;
    if (out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      real er, ei;
      tol = 4.0 + peak[frm] / 2048.0;
      er = real'(out_re) - rr[frm][out_k]; ei = real'(out_im) - ri[frm][out_k];
      checks++;
      if (fabs(er) > tol || fabs(ei) > tol) begin
        failures++;
        if (failures < 10) $display("frm %0d X(%0d) got %0d,%0d want %f,%f", frm, out_k, out_re, out_im, rr[frm][out_k], ri[frm][out_k]);
      end
      if (out_k == 0) begin
        checks++;
        if (frm < 2 && cyc - last_in_cyc != 161) begin
          failures++; $display("frm %0d: first output %0d cycles after last input, want 161", frm, cyc - last_in_cyc);
        end
      end
      if (out_k == 7'(NP - 1)) begin
        frm++;
        if (frm == NFRM) begin
          checks++;
          if (comp_len != 160 * NFRM) begin failures++; $display("compute cycles %0d want %0d", comp_len, 160*NFRM); end
          checks++;
          if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
