// tb_trace_replay - replays a reference operation sequence on one link
// scheduler at its default size (256 channels, 4096-word data buffer,
// 15-bit folded deadlines) and checks, step by step, the state number, the
// cell that leaves (deadline, channel, cell address) and that every step
// takes one clock cycle except "input to an empty channel while the head's
// channel has more cells" (state 13 then 29, two cycles).
// The sequence ends with deadlines 32000, then 2000 and 1000 that have
// wrapped past 2**15: they must leave after 25000 and 32000, 1000 before
// 2000. The deadline bound di stays just above the expected head so that
// every comparison is inside the folding window.
module tb_trace_replay;
  import edf_pkg::*;
  localparam int DL_W = 15, CH_W = 8, CA_W = 12;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_ack, out_req = 0, out_ack, head_valid, init_done;
  logic [DL_W-1:0] in_dl = '0, di = '0, do_dl, head_dl;
  logic [CH_W-1:0] in_ch = '0, head_ch;
  logic [CA_W-1:0] in_ca = '0, out_ca;
  logic eo, sel;
  sched_state_e state;

  link_scheduler dut (.*, .ei(1'b1));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (state=%0d)", w, state); end
  endtask

  // one step: offer input and/or request output until both are served;
  // expected states, and the cell expected to leave (odl < 0: none)
  task automatic step(input logic iv, input int ich, input int idl, input int ica, input logic ov,
                      input sched_state_e s1, input sched_state_e s2, input int odl, input int och,
                      input int oca);
    int n = 0;
    logic in_done = !iv, out_done = !ov;
    in_valid = iv; in_ch = CH_W'(ich); in_dl = DL_W'(idl); in_ca = CA_W'(ica); out_req = ov;
    di = (odl >= 0) ? DL_W'(odl + 100) : DL_W'(head_dl + 100);
    while (!(in_done && out_done)) begin
      #1;
      chk(state == ((n == 0) ? s1 : s2), $sformatf("step state %0d expected %0d", state, (n == 0) ? s1 : s2));
      if (out_ack) begin
        chk(head_dl == DL_W'(odl) && head_ch == CH_W'(och) && out_ca == CA_W'(oca),
            $sformatf("output dl=%0d ch=%0d adr=%0d, expected dl=%0d ch=%0d adr=%0d",
                      head_dl, head_ch, out_ca, odl, och, oca));
        out_done = 1;
      end
      if (in_ack) in_done = 1;
      @(negedge clk);
      n++;
      if (in_done) in_valid = 0;
      if (out_done) out_req = 0;
      if (n > 3) break;
    end
    cycles += n;
    chk(n == ((s2 == ST_IDLE) ? 1 : 2), $sformatf("step took %0d cycles", n));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!init_done) @(negedge clk);
    //    in  ch  dl     adr out  state1       state2      out dl  ch adr
    step(1,  7, 1024, 11, 0, ST_IQ,       ST_IDLE,    -1,     0, 0);
    step(1,  7, 2048, 12, 0, ST_IB,       ST_IDLE,    -1,     0, 0);
    step(0,  0,    0,  0, 1, ST_BQ_QO,    ST_IDLE,    1024,   7, 11);
    step(0,  0,    0,  0, 1, ST_QO,       ST_IDLE,    2048,   7, 12);
    step(1,  1, 4096,  1, 0, ST_IQ,       ST_IDLE,    -1,     0, 0);
    step(1,  1, 8192,  2, 0, ST_IB,       ST_IDLE,    -1,     0, 0);
    step(1,  2, 15000, 3, 1, ST_IQ_DEFER, ST_BQ_QO_2, 4096,   1, 1);
    step(1,  3, 14000, 4, 1, ST_IQ_QO,    ST_IDLE,    8192,   1, 2);
    step(1,  3, 20000, 5, 0, ST_IB,       ST_IDLE,    -1,     0, 0);
    step(1,  3, 25000, 6, 1, ST_IB_BQ_QO, ST_IDLE,    14000,  3, 4);
    step(1,  3, 32000, 7, 1, ST_IB_QO,    ST_IDLE,    15000,  2, 3);
    step(1,  5, 2000,  8, 0, ST_IQ,       ST_IDLE,    -1,     0, 0);
    step(0,  0,    0,  0, 1, ST_BQ_QO,    ST_IDLE,    20000,  3, 5);
    step(1,  6, 1000,  9, 0, ST_IQ,       ST_IDLE,    -1,     0, 0);
    // drain: 25000, 32000 (from the data buffer), then the wrapped 1000, 2000
    step(0,  0,    0,  0, 1, ST_BQ_QO,    ST_IDLE,    25000,  3, 6);
    step(0,  0,    0,  0, 1, ST_QO,       ST_IDLE,    32000,  3, 7);
    step(0,  0,    0,  0, 1, ST_QO,       ST_IDLE,    1000,   6, 9);
    step(0,  0,    0,  0, 1, ST_QO,       ST_IDLE,    2000,   5, 8);
    #1;
    chk(!head_valid, "queue empty at the end");
    chk(cycles == 19, $sformatf("sequence took %0d cycles, expected 19", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
