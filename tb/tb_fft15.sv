// tb_fft15: self-checking testbench of the 15-point pairwise DFT engine.
// Sends blocks of 15 complex samples (an impulse, a full-scale tone and random
// data), compares each of the 15 results with a DFT evaluated in floating
// point, and checks the timing: 49 compute cycles, the first result one cycle
// after them for the first block, and one block every 49 cycles (back-to-back
// computing) while the output is never stalled.
// A second phase drops out_ready at random to exercise back-pressure.
module tb_fft15;
  localparam int IN_W = 16, OUT_W = 24;
  localparam int NBLK = 40;
  localparam real TOL = 24.0;          // LSB; coefficient rounding bound
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, computing;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [OUT_W-1:0] out_re, out_im;
  logic [3:0] out_k;

  fft15 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0;
  int xr [NBLK][15], xi [NBLK][15];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus data
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 15; n++) begin
        if (b == 0) begin xr[b][n] = (n == 0) ? 12345 : 0; xi[b][n] = (n == 0) ? -321 : 0; end
        else if (b == 1) begin
          xr[b][n] = $rtoi(32767.0 * $cos(2.0*PI*3*n/15));
          xi[b][n] = $rtoi(32767.0 * $sin(2.0*PI*3*n/15));
        end else if (b == 2) begin xr[b][n] = 32767; xi[b][n] = -32768; end
        else begin
          xr[b][n] = int'($signed(16'($urandom)));
          xi[b][n] = int'($signed(16'($urandom)));
        end
      end
  end

  bit stall_phase = 0;
  // driver
  initial begin
    in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 15; n++) begin
        in_valid <= 1; in_re <= 16'(xr[b][n]); in_im <= 16'(xi[b][n]);
        @(posedge clk iff in_ready);
      end
    in_valid <= 0;
  end

  // sink with optional random back-pressure
  always @(posedge clk) out_ready <= stall_phase ? ($urandom_range(0, 3) != 0) : 1'b1;

  int blk = 0, idx = 0;
  int last_in_cyc [NBLK], first_out_cyc [NBLK];
  int cyc = 0;
  int n_in = 0;
  int comp_len = 0, comp_runs = 0;
  int stalls = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready) begin
      n_in++;
      if (n_in % 15 == 0 && n_in / 15 <= NBLK) last_in_cyc[n_in / 15 - 1] = cyc;
    end
    if (rst_n && computing) comp_len++;
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      real er, ei, rr, ri;
      rr = 0; ri = 0;
      for (int n = 0; n < 15; n++) begin
        rr += xr[blk][n] * $cos(2.0*PI*n*idx/15) + xi[blk][n] * $sin(2.0*PI*n*idx/15);
        ri += xi[blk][n] * $cos(2.0*PI*n*idx/15) - xr[blk][n] * $sin(2.0*PI*n*idx/15);
      end
      er = real'(out_re) - rr; ei = real'(out_im) - ri;
      checks++;
      if (er > TOL || er < -TOL || ei > TOL || ei < -TOL || out_k != 4'(idx)) begin
        failures++;
        if (failures < 10) $display("blk %0d X(%0d) k=%0d got %0d,%0d want %f,%f", blk, idx, out_k, out_re, out_im, rr, ri);
      end
      if (idx == 0) begin
        first_out_cyc[blk] = cyc;
        checks++;
        if (blk == 0 && cyc - last_in_cyc[blk] != 50) begin
          failures++;
          $display("blk %0d: first result %0d cycles after last input, want 50", blk, cyc - last_in_cyc[blk]);
        end
        if (blk >= 2 && blk < 20) begin
          checks++;
          if (first_out_cyc[blk] - first_out_cyc[blk-1] != 49) begin
            failures++;
            $display("blk %0d: period %0d cycles, want 49", blk, first_out_cyc[blk] - first_out_cyc[blk-1]);
          end
        end
      end
      if (idx == 14) begin
        idx = 0; blk++;
        if (blk == 20) stall_phase = 1;
        if (blk == NBLK) begin
          checks++;
          if (comp_len != 49 * NBLK) begin failures++; $display("compute cycles %0d, want %0d", comp_len, 49*NBLK); end
          checks++;
          if (stalls == 0) begin failures++; $display("back-pressure never applied"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end else idx++;
    end
  end
endmodule
