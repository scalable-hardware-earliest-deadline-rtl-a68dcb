// tb_channel_decoder - exhaustive test of the channel-bit decoder (2 to 4).
module tb_channel_decoder;
  logic en;
  logic [1:0] sel_bits;
  logic [3:0] sel;
  channel_decoder #(.SEL_W(2)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int e = 0; e < 2; e++)
      for (int b = 0; b < 4; b++) begin
        en = e[0]; sel_bits = b[1:0]; #1;
        checks++;
        if (sel != (e ? (4'b0001 << b) : 4'b0000)) begin
          failures++; $display("FAIL: en=%0d bits=%0d sel=%b", e, b, sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
