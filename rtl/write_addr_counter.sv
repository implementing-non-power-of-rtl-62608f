// write_addr_counter: address generator of the RAM write port in the
// FFT-1920 flow. The FFT-15 results are stored "in normal order", i.e. at
// consecutive addresses in the order the FFT-15 engine produces them, so the
// generator is a counter from 0 to DEPTH-1 that wraps to 0.
//
// Interface: inc advances the counter at the clock edge; addr is the address
// to use in the current cycle; last is high while addr = DEPTH-1, so
// inc && last marks the final write of a frame. Reset (asynchronous,
// active low) and clr (synchronous) return it to 0. The counter itself
// follows the design description; last and clr are this design's own.
module write_addr_counter #(
  parameter int unsigned DEPTH  = fft_pkg::N,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  output logic [ADDR_W-1:0] addr,
  output logic              last
);
  assign last = (addr == ADDR_W'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (clr) addr <= '0;
    else if (inc) addr <= last ? '0 : addr + 1'b1;
  end
endmodule
