// read_addr_fifo: the pre-initialised, recirculating FIFO that holds the RAM
// read address sequence of the FFT-1920 flow.
//
// The FIFO is filled once through the push port with one frame's worth of
// read addresses. After that it runs with recirc high: every address popped
// is written straight back at the tail, so the same sequence comes out again
// for every frame and nothing has to refill it. This loop from the FIFO
// output back to its input, and the FIFO being pre-initialised, follow the
// design description; the rest is this design's own.
//
// Interface: head is the word at the front (valid while !empty); pop removes
// it at the clock edge. push writes push_data at the tail when recirc is low;
// with recirc high, pop writes head back at the tail and push is ignored.
// full, empty and count give the fill level. Circular buffer of DEPTH words
// with read and write pointers and a word count; reset empties it.
module read_addr_fifo #(
  parameter int unsigned DEPTH = fft_pkg::N,
  parameter int unsigned WIDTH = $clog2(fft_pkg::N),
  parameter int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             recirc,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full,
  output logic [CNT_W-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  logic do_pop, do_wr;
  logic [WIDTH-1:0] wr_data;

  assign empty   = (count == '0);
  assign full    = (count == CNT_W'(DEPTH));
  assign head    = mem[rd_ptr];
  assign do_pop  = pop && !empty;
  assign do_wr   = recirc ? do_pop : (push && (!full || do_pop));
  assign wr_data = recirc ? head : push_data;

  function automatic logic [PTR_W-1:0] nxt(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_pop) rd_ptr <= nxt(rd_ptr);
      if (do_wr)  wr_ptr <= nxt(wr_ptr);
      count <= count + CNT_W'(do_wr) - CNT_W'(do_pop);
    end
  end

  // handshake rules: never pop an empty FIFO, never push into a full one
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("read_addr_fifo: pop while empty");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && !recirc && full && !pop))
    else $error("read_addr_fifo: push while full");
endmodule
