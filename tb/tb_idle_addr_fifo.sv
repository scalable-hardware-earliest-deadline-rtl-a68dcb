// tb_idle_addr_fifo - self-checking test of the self-initialising free list.
//
// Checks that init_done rises exactly COUNT cycles after reset, that the
// FIFO then hands out FIRST .. FIRST+COUNT-1 in order, and that random
// pushes and pops (also in the same cycle) follow a reference queue.
module tb_idle_addr_fifo;
  localparam int DEPTH = 16, AW = 6, FIRST = 4, COUNT = 12;
  logic clk = 0, rst_n = 0, pop = 0, push = 0, empty, init_done;
  logic [AW-1:0] push_addr = '0, head;

  idle_addr_fifo #(.DEPTH(DEPTH), .AW(AW), .FIRST(FIRST), .COUNT(COUNT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, both = 0;
  int model[$];

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!init_done) begin @(negedge clk); cyc++; end
    chk(cyc == COUNT, $sformatf("init took %0d cycles", cyc));
    for (int i = 0; i < COUNT; i++) model.push_back(FIRST + i);
    for (int n = 0; n < 2000; n++) begin
      pop  = ($urandom_range(0, 1) == 1) && model.size() > 0;
      push = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH || pop);
      push_addr = AW'($urandom_range(0, 63));
      #1;
      chk(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) chk(head == AW'(model[0]), $sformatf("head %0d expected %0d", head, model[0]));
      if (pop && push) both++;
      @(negedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_addr);
    end
    chk(both > 0, "simultaneous push and pop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
