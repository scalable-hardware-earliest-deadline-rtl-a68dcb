// tb_list_ptr_regs - self-checking test of the WA/RA register files.
// Checks the reset values WA_i = RA_i = i, then random writes to both files
// (also to the same channel in one cycle) against reference arrays.
module tb_list_ptr_regs;
  localparam int C = 8, CH_W = 3, AW = 6;
  logic clk = 0, rst_n = 0, wa_we = 0, ra_we = 0;
  logic [CH_W-1:0] wa_ch = '0, ra_ch = '0;
  logic [AW-1:0] wa_d = '0, ra_d = '0, wa_q, ra_q;

  list_ptr_regs #(.C(C), .CH_W(CH_W), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [AW-1:0] mwa [C], mra [C];

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < C; i++) begin
      mwa[i] = AW'(i); mra[i] = AW'(i);
      wa_ch = CH_W'(i); ra_ch = CH_W'(i); #1;
      chk(wa_q == AW'(i) && ra_q == AW'(i), $sformatf("reset value of channel %0d", i));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wa_ch = CH_W'($urandom_range(0, C-1)); ra_ch = CH_W'($urandom_range(0, C-1));
      wa_we = $urandom_range(0, 1); ra_we = $urandom_range(0, 1);
      wa_d = AW'($urandom); ra_d = AW'($urandom);
      #1;
      chk(wa_q == mwa[wa_ch], "WA read");
      chk(ra_q == mra[ra_ch], "RA read");
      @(posedge clk); #1;
      if (wa_we) mwa[wa_ch] = wa_d;
      if (ra_we) mra[ra_ch] = ra_d;
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
