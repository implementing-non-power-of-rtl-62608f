// tb_read_addr_fifo: self-checking testbench of the recirculating read
// address FIFO. Fills it completely with an address sequence (checking full),
// pops it three times round with recirc high and random pauses (the same
// sequence must come out each time and the fill level must stay at DEPTH),
// then drains it with recirc low and checks empty. A small plain-FIFO phase
// checks simultaneous push and pop.
module tb_read_addr_fifo;
  localparam int DEPTH = 1920, W = 11;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic recirc = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] push_data = '0, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  read_addr_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  int seq [DEPTH];

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("%s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) seq[i] = ((i % 128) * 15 + i / 128) % DEPTH;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(empty && count == 0, "not empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      push = 1; push_data = W'(seq[i]); @(negedge clk);
    end
    push = 0;
    check(full && count == DEPTH, "not full after fill");
    recirc = 1;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < DEPTH; ) begin
        pop = ($urandom_range(0, 3) != 0);
        if (pop) begin
          check(int'(head) == seq[i], $sformatf("round %0d word %0d: got %0d want %0d", r, i, head, seq[i]));
          i++;
        end
        @(negedge clk);
        check(count == DEPTH, "fill level changed while recirculating");
      end
    pop = 0;
    recirc = 0;
    for (int i = 0; i < DEPTH; i++) begin
      pop = 1;
      check(int'(head) == seq[i], $sformatf("drain word %0d: got %0d want %0d", i, head, seq[i]));
      @(negedge clk);
    end
    pop = 0;
    check(empty, "not empty after drain");
    // plain FIFO: push and pop in the same cycle
    push = 1; push_data = 11'd5; @(negedge clk);
    push = 1; pop = 1; push_data = 11'd6;
    check(head == 11'd5, "head after single push");
    @(negedge clk);
    push = 0; pop = 0;
    check(head == 11'd6 && count == 1, "push and pop together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
