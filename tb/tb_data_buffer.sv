// tb_data_buffer - self-checking test of the two-port data buffer.
// Random writes of {D, A, NA} words and, in the same cycles, combinational
// reads at other addresses are compared with a reference array.
module tb_data_buffer;
  localparam int DEPTH = 32, AW = 5, DL_W = 10, CA_W = 8;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, wna = '0, raddr = '0, rna;
  logic [DL_W-1:0] wdl = '0, rdl;
  logic [CA_W-1:0] wca = '0, rca;

  data_buffer #(.DEPTH(DEPTH), .AW(AW), .DL_W(DL_W), .CA_W(CA_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DL_W+CA_W+AW-1:0] model [DEPTH];
  logic written [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) written[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, DEPTH-1));
      #1;
      if (written[raddr]) begin
        checks++;
        if ({rdl, rca, rna} != model[raddr]) begin failures++; $display("FAIL: read %0d", raddr); end
      end
      we = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH-1));
      wdl = DL_W'($urandom); wca = CA_W'($urandom); wna = AW'($urandom);
      @(posedge clk); #1;
      if (we) begin model[waddr] = {wdl, wca, wna}; written[waddr] = 1; end
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
