// tb_write_addr_counter: self-checking testbench of the RAM write address
// counter. Counts through two full frames with random gaps in inc, checking
// the address against a reference count, the wrap from DEPTH-1 to 0 and the
// last flag, then checks the synchronous clear.
module tb_write_addr_counter;
  localparam int DEPTH = 1920, AW = 11;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic clr = 0, inc = 0, last;
  logic [AW-1:0] addr;
  write_addr_counter #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, ref_addr = 0, wraps = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (wraps < 2) begin
      inc = ($urandom_range(0, 4) != 0);
      checks++;
      if (int'(addr) != ref_addr || last != (ref_addr == DEPTH - 1)) begin
        failures++;
        if (failures < 8) $display("addr %0d last %0d, want %0d", addr, last, ref_addr);
      end
      @(negedge clk);
      if (inc) begin
        if (ref_addr == DEPTH - 1) begin ref_addr = 0; wraps++; end
        else ref_addr++;
      end
    end
    inc = 1; repeat (5) @(negedge clk);
    clr = 1; @(negedge clk); clr = 0; inc = 0;
    checks++;
    if (addr != 0) begin failures++; $display("clear failed: %0d", addr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
