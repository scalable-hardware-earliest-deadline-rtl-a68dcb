// tb_sched_ctrl - self-checking test of the link-scheduler controller.
//
// Applies every combination of IN, OUT, F, L and same-channel (with the
// queue non-empty and free space) and checks the state number and the
// datapath commands against the operation table of the state diagram:
// IN OUT' F -> 12, IN OUT' F' -> 4, IN' OUT L -> 3, IN' OUT L' -> 1,
// IN OUT F L -> 15, IN OUT F' L -> 7 (15 when same channel), IN OUT F' L' -> 5,
// IN OUT F L' -> 13 followed by 29 with inputs refused. Also checks state 30
// before initialisation and that an empty queue is never dequeued.
module tb_sched_ctrl;
  import edf_pkg::*;
  logic clk = 0, rst_n = 0, init_done = 0, in_valid = 0, out_req = 0, head_valid = 1;
  logic f = 0, l = 0, same_ch = 0, space_ok = 1;
  logic in_ready, in_ack, out_ack, q_from_buf, buf_write, buf_read;
  sched_state_e state;
  queue_op_e q_op;

  sched_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (state=%0d)", w, state); end
  endtask

  task automatic expect_op(input sched_state_e st, input logic ia, input logic oa, input queue_op_e qo,
                           input logic fb, input logic bw, input logic br, input string w);
    chk(state == st, {w, " state"});
    chk(in_ack == ia && out_ack == oa, {w, " acks"});
    chk(q_op == qo && q_from_buf == fb && buf_write == bw && buf_read == br, {w, " commands"});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    in_valid = 1; out_req = 1; #1;
    chk(state == ST_INIT && !in_ready && !in_ack && !out_ack, "init state 30");
    @(negedge clk); init_done = 1; in_valid = 0; out_req = 0;
    #1; expect_op(ST_IDLE, 0, 0, Q_NOP, 0, 0, 0, "idle 0");
    for (int c = 0; c < 32; c++) begin
      if (c[2] && c[0]) continue;           // F on the head's channel cannot happen
      @(negedge clk);
      {in_valid, out_req, f, l, same_ch} = c[4:0];
      #1;
      chk(in_ready, "in_ready in one-cycle cases");
      case ({in_valid, out_req})
        2'b00: expect_op(ST_IDLE, 0, 0, Q_NOP, 0, 0, 0, "idle");
        2'b10: if (f) expect_op(ST_IQ, 1, 0, Q_ENQ, 0, 0, 0, "IQ 12");
               else   expect_op(ST_IB, 1, 0, Q_NOP, 0, 1, 0, "IB 4");
        2'b01: if (l) expect_op(ST_QO, 0, 1, Q_DEQ, 0, 0, 0, "QO 3");
               else   expect_op(ST_BQ_QO, 0, 1, Q_ENQ_DEQ, 1, 0, 1, "BQ&QO 1");
        2'b11: begin
          if (f && l)              expect_op(ST_IQ_QO, 1, 1, Q_ENQ_DEQ, 0, 0, 0, "IQ&QO 15");
          else if (!f && l && same_ch) expect_op(ST_IQ_QO, 1, 1, Q_ENQ_DEQ, 0, 0, 0, "same channel IQ&QO 15");
          else if (!f && l)        expect_op(ST_IB_QO, 1, 1, Q_DEQ, 0, 1, 0, "IB&QO 7");
          else if (!f && !l)       expect_op(ST_IB_BQ_QO, 1, 1, Q_ENQ_DEQ, 1, 1, 1, "IB&BQ&QO 5");
          else begin
            expect_op(ST_IQ_DEFER, 1, 0, Q_ENQ, 0, 0, 0, "IQ 13");
            @(negedge clk); #1;
            chk(!in_ready, "inputs refused in second cycle");
            expect_op(ST_BQ_QO_2, 0, 1, Q_ENQ_DEQ, 1, 0, 1, "BQ&QO 29");
          end
        end
      endcase
    end
    // empty queue: no output, no free space: no input
    @(negedge clk);
    in_valid = 1; out_req = 1; head_valid = 0; space_ok = 0; f = 0; l = 1; same_ch = 0; #1;
    chk(!in_ready && !in_ack && !out_ack && q_op == Q_NOP, "empty queue and no space");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
