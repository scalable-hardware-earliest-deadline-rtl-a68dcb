// tb_chan_counter_array - self-checking test of the per-channel cell counters.
// Random increments and decrements (never below zero), including both on
// the same channel in one cycle, against reference counters.
module tb_chan_counter_array;
  localparam int C = 8, CH_W = 3, CNT_W = 6;
  logic clk = 0, rst_n = 0, inc = 0, dec = 0;
  logic [CH_W-1:0] in_ch = '0, out_ch = '0;
  logic [CNT_W-1:0] cnt_in, cnt_out;

  chan_counter_array #(.C(C), .CH_W(CH_W), .CNT_W(CNT_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, same = 0;
  int model [C];

  initial begin
    for (int i = 0; i < C; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_ch = CH_W'($urandom_range(0, C-1));
      out_ch = ($urandom_range(0, 3) == 0) ? in_ch : CH_W'($urandom_range(0, C-1));
      inc = ($urandom_range(0, 1) == 1) && model[in_ch] < 60;
      dec = ($urandom_range(0, 1) == 1) && model[out_ch] > 0;
      #1;
      checks += 2;
      if (cnt_in != CNT_W'(model[in_ch])) begin failures++; $display("FAIL: cnt_in"); end
      if (cnt_out != CNT_W'(model[out_ch])) begin failures++; $display("FAIL: cnt_out"); end
      if (inc && dec && in_ch == out_ch) same++;
      @(posedge clk); #1;
      if (inc) model[in_ch]++;
      if (dec) model[out_ch]--;
    end
    checks++;
    if (same == 0) begin failures++; $display("FAIL: same-channel case not exercised"); end
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
