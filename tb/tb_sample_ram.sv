// tb_sample_ram: self-checking testbench of the intermediate sample RAM.
// Writes the whole memory with a pseudo-random pattern, reads it back in a
// different order and checks every word and the one-cycle read latency, then
// checks that a read and a write of the same address in one cycle return the
// old word.
module tb_sample_ram;
  localparam int DEPTH = 1920, WIDTH = 24, AW = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  sample_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] pat(input int a, input int seed);
    return WIDTH'((a * 40503 + seed * 977) ^ (a << 9));
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = pat(a, 1); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    // read back with stride 15 (the order the flow uses)
    for (int k2 = 0; k2 < 15; k2++)
      for (int n1 = 0; n1 < 128; n1++) begin
        re = 1; raddr = AW'(n1 * 15 + k2);
        @(negedge clk);
        checks++;
        if (rdata !== model[n1 * 15 + k2]) begin
          failures++;
          if (failures < 8) $display("addr %0d: got %h want %h", n1*15+k2, rdata, model[n1*15+k2]);
        end
      end
    // read enable low holds the output
    re = 0; raddr = 0;
    @(negedge clk);
    checks++;
    if (rdata !== model[127 * 15 + 14]) begin failures++; $display("rdata not held"); end
    // same-address read and write: old word returned, new word stored
    we = 1; re = 1; waddr = 11'd77; raddr = 11'd77; wdata = 24'hABCDEF;
    @(negedge clk);
    checks++;
    if (rdata !== model[77]) begin failures++; $display("read-during-write returned %h", rdata); end
    we = 0;
    @(negedge clk);
    checks++;
    if (rdata !== 24'hABCDEF) begin failures++; $display("write not stored: %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
