// tb_nrt_fifo - self-checking test of the non-real-time cell FIFO.
// Random pushes and pops against a reference queue; checks the empty and
// full flags and that each popped cell appears one clock after the pop.
module tb_nrt_fifo;
  localparam int DEPTH = 8, CELL_W = 32;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [CELL_W-1:0] wdata = '0, rdata;

  nrt_fifo #(.DEPTH(DEPTH), .CELL_W(CELL_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, fulls = 0;
  logic [CELL_W-1:0] model[$];

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [CELL_W-1:0] expv;
      logic popped;
      @(negedge clk);
      push = $urandom_range(0, 99) < (n % 400 < 200 ? 70 : 30);
      pop  = $urandom_range(0, 99) < (n % 400 < 200 ? 30 : 70);
      wdata = $urandom;
      #1;
      checks += 2;
      if (empty != (model.size() == 0)) begin failures++; $display("FAIL: empty"); end
      if (full != (model.size() == DEPTH)) begin failures++; $display("FAIL: full"); end
      if (full) fulls++;
      popped = pop && model.size() > 0;
      if (popped) expv = model.pop_front();
      if (push && (model.size() < DEPTH || (popped && model.size() < DEPTH))) begin
        if (!(full)) model.push_back(wdata);
      end
      @(posedge clk); #1;
      if (popped) begin
        checks++;
        if (rdata != expv) begin failures++; $display("FAIL: data %h expected %h", rdata, expv); end
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: full never reached"); end
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
