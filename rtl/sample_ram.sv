// sample_ram: one of the two intermediate memories of the FFT-1920 flow (one
// holds the real parts, the other the imaginary parts of the FFT-15 results).
//
// A simple dual-port RAM: one write port, driven by the write address
// counter, and one read port, addressed by the read address FIFO. Writes take
// effect at the clock edge; a read returns mem[raddr] on the cycle after
// re is high (registered output, as block RAMs have). Reading and writing the
// same address in one cycle returns the old word. The depth of one frame
// (1920 words) and the separate real and imaginary memories follow the design
// description; the width of 24 bits is the word width of the array the flow
// was first mapped to, and the port timing is this design's own choice. The
// memory is not reset: the flow always writes a word before it reads it.
module sample_ram #(
  parameter int unsigned DEPTH  = fft_pkg::N,
  parameter int unsigned WIDTH  = fft_pkg::DATA_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  // synthesis-neutral checks of the address range
  always @(posedge clk) begin
    assert (!we || 32'(waddr) < DEPTH) else $error("sample_ram: write address %0d out of range", waddr);
    assert (!re || 32'(raddr) < DEPTH) else $error("sample_ram: read address %0d out of range", raddr);
  end
endmodule
