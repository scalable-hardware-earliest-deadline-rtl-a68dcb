// tb_edf_block - self-checking test of one EDF queue block.
//
// Loads a resident entry, then applies every operation with the broadcast
// deadline earlier, equal or later than the resident one and every value of
// the neighbour's M, and checks which value the block takes (hold, broadcast
// entry, right or left neighbour). The folded deadlines E0, F0, 10, 20 (hex)
// against a new F0 check that M follows the MSB of the 8-bit difference, not
// the borrow. A head-block instance checks that it always refills during
// simultaneous insert and remove.
module tb_edf_block;
  import edf_pkg::*;
  localparam int DL_W = 8, CH_W = 4, CA_W = 8;

  logic clk = 0, rst_n = 0;
  queue_op_e op;
  logic [DL_W-1:0] new_dl, r_dl, l_dl;
  logic [CH_W-1:0] new_ch, r_ch, l_ch;
  logic [CA_W-1:0] new_ca, r_ca, l_ca;
  logic r_valid, l_valid, m_r, m_l;
  logic m, q_valid, hm, hq_valid;
  logic [DL_W-1:0] q_dl, hq_dl;
  logic [CH_W-1:0] q_ch, hq_ch;
  logic [CA_W-1:0] q_ca, hq_ca;

  edf_block #(.DL_W(DL_W), .CH_W(CH_W), .CA_W(CA_W), .IS_HEAD(1'b0)) dut (.*);
  edf_block #(.DL_W(DL_W), .CH_W(CH_W), .CA_W(CA_W), .IS_HEAD(1'b1)) dut_head (
    .clk, .rst_n, .op, .new_dl, .new_ch, .new_ca,
    .r_valid, .r_dl, .r_ch, .r_ca, .m_r, .l_valid, .l_dl, .l_ch, .l_ca, .m_l,
    .m(hm), .q_valid(hq_valid), .q_dl(hq_dl), .q_ch(hq_ch), .q_ca(hq_ca));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // put value d (tag ca) into both blocks: ENQ into an empty block or with M=1,M_r=0
  task automatic load(input logic [DL_W-1:0] d, input logic [CA_W-1:0] ca);
    rst_n = 0; #1; rst_n = 1;
    @(negedge clk);
    op = Q_ENQ; new_dl = d; new_ca = ca; new_ch = CH_W'(ca); m_r = 0;
    @(negedge clk);
    op = Q_NOP;
    chk(q_valid && q_dl == d && q_ca == ca, "load");
  endtask

  // expected result codes: 0 hold, 1 new, 2 right, 3 left
  task automatic apply(input queue_op_e o, input logic [DL_W-1:0] e, input logic mr, input logic ml,
                       input int exp_code, input int exp_head_code, input string what);
    logic [CA_W-1:0] exp_ca, exp_hca;
    load(8'h40, 8'hAA);
    op = o; new_dl = e; new_ca = 8'h11; new_ch = 4'h1; m_r = mr; m_l = ml;
    r_valid = 1; r_dl = 8'h30; r_ca = 8'h22; r_ch = 4'h2;
    l_valid = 1; l_dl = 8'h50; l_ca = 8'h33; l_ch = 4'h3;
    #1;
    chk(m == (e - 8'h40 >= 8'h80), {what, " M"});
    @(negedge clk);
    op = Q_NOP;
    exp_ca  = (exp_code == 0) ? 8'hAA : (exp_code == 1) ? 8'h11 : (exp_code == 2) ? 8'h22 : 8'h33;
    exp_hca = (exp_head_code == 0) ? 8'hAA : (exp_head_code == 1) ? 8'h11 : (exp_head_code == 2) ? 8'h22 : 8'h33;
    chk(q_ca == exp_ca, what);
    chk(hq_ca == exp_hca, {what, " (head block)"});
  endtask

  initial begin
    op = Q_NOP; new_dl = 0; new_ch = 0; new_ca = 0; r_valid = 0; r_dl = 0; r_ch = 0; r_ca = 0;
    l_valid = 0; l_dl = 0; l_ch = 0; l_ca = 0; m_r = 0; m_l = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!q_valid && m, "empty block reports M=1");
    // Q_ENQ: e earlier (M=1)
    apply(Q_ENQ, 8'h20, 1, 0, 2, 2, "ENQ M=1 Mr=1 shift left");
    apply(Q_ENQ, 8'h20, 0, 0, 1, 1, "ENQ M=1 Mr=0 load");
    apply(Q_ENQ, 8'h40, 0, 0, 0, 0, "ENQ equal deadline holds");
    apply(Q_ENQ, 8'h60, 0, 0, 0, 0, "ENQ M=0 hold");
    // Q_ENQ_DEQ
    apply(Q_ENQ_DEQ, 8'h20, 0, 1, 0, 1, "ENQDEQ M=1 Ml=1 hold (head loads)");
    apply(Q_ENQ_DEQ, 8'h60, 0, 1, 1, 1, "ENQDEQ M=0 Ml=1 load");
    apply(Q_ENQ_DEQ, 8'h60, 0, 0, 3, 3, "ENQDEQ M=0 Ml=0 shift right");
    // Q_DEQ and Q_NOP
    apply(Q_DEQ, 8'h60, 0, 0, 3, 3, "DEQ shift right");
    apply(Q_NOP, 8'h20, 1, 1, 0, 0, "NOP hold");
    // folding example: e = F0 against E0, F0, 10, 20
    begin
      logic [DL_W-1:0] qs [4] = '{8'hE0, 8'hF0, 8'h10, 8'h20};
      logic exp_m [4] = '{1'b0, 1'b0, 1'b1, 1'b1};
      for (int i = 0; i < 4; i++) begin
        load(qs[i], 8'h01);
        new_dl = 8'hF0; #1;
        chk(m == exp_m[i], $sformatf("fold M for q=%h", qs[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
