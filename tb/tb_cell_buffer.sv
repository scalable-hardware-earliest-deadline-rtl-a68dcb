// tb_cell_buffer - self-checking test of the real-time cell buffer.
// Random cells are written; reads in the same cycles at other addresses must
// return the stored cell one clock later.
module tb_cell_buffer;
  localparam int DEPTH = 32, AW = 5, CELL_W = 64;
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [CELL_W-1:0] wdata = '0, rdata;

  cell_buffer #(.DEPTH(DEPTH), .AW(AW), .CELL_W(CELL_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [CELL_W-1:0] model [DEPTH];
  logic written [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [CELL_W-1:0] expv;
      logic chkme;
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH-1));
      wdata = {$urandom, $urandom};
      raddr = AW'($urandom_range(0, DEPTH-1));
      re = written[raddr] && raddr != waddr;
      expv = model[raddr]; chkme = re;
      @(posedge clk); #1;
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
      if (chkme) begin
        checks++;
        if (rdata != expv) begin failures++; $display("FAIL: read %0d", raddr); end
      end
    end
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
