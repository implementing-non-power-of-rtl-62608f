// read_seq_init: fills the read address FIFO once after reset with the RAM
// read order of the FFT-1920 flow.
//
// The FFT-15 results of row n1 (n1 = 0..127) are stored at addresses
// 15*n1 + k2, k2 = 0..14. Each FFT-128 works on one column k2, taking the
// rows in natural order, so the sequence is
//   for k2 = 0..14: for n1 = 0..127: address = 15*n1 + k2.
// It is produced by two counters and an address register that steps by 15,
// one word per cycle (1920 cycles after reset). Filling the FIFO before the
// first frame follows the design description; generating the contents with
// counters, instead of loading them from outside, is this design's own choice.
//
// Interface: push/data go to the FIFO write port; done rises after the last
// word and stays high until the next reset.
module read_seq_init #(
  parameter int unsigned ROWS   = fft_pkg::N1,
  parameter int unsigned COLS   = fft_pkg::N2,
  parameter int unsigned ADDR_W = $clog2(ROWS * COLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              push,
  output logic [ADDR_W-1:0] data,
  output logic              done
);
  localparam int unsigned R_W = $clog2(ROWS);
  localparam int unsigned C_W = $clog2(COLS);

  logic [R_W-1:0] row;
  logic [C_W-1:0] col;

  assign push = !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row  <= '0;
      col  <= '0;
      data <= '0;
      done <= 1'b0;
    end else if (!done) begin
      if (row == R_W'(ROWS - 1)) begin
        row  <= '0;
        data <= ADDR_W'(col) + 1'b1;
        if (col == C_W'(COLS - 1)) done <= 1'b1;
        else col <= col + 1'b1;
      end else begin
        row  <= row + 1'b1;
        data <= data + ADDR_W'(COLS);
      end
    end
  end
endmodule
