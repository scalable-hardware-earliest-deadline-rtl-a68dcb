// tb_edf_queue - self-checking test of the shift-register EDF queue.
//
// Drives random insert, remove and insert-with-remove operations on a small
// queue (C = 8, 8-bit folded deadlines) and compares the head, every cycle,
// with a reference model that keeps unfolded deadlines in a sorted list
// (new entries go behind equal deadlines). Deadlines wrap through zero many
// times, so the folded (MSB) comparison is exercised across the wrap. The
// queue is drained at the end and its length checked.
module tb_edf_queue;
  import edf_pkg::*;
  localparam int C = 8, DL_W = 8, CH_W = 4, CA_W = 12;

  logic clk = 0, rst_n = 0;
  queue_op_e op;
  logic [DL_W-1:0] new_dl;
  logic [CH_W-1:0] new_ch;
  logic [CA_W-1:0] new_ca;
  logic head_valid, full;
  logic [DL_W-1:0] head_dl;
  logic [CH_W-1:0] head_ch;
  logic [CA_W-1:0] head_ca;

  edf_queue #(.C(C), .DL_W(DL_W), .CH_W(CH_W), .CA_W(CA_W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int dl; int tag; } ent_t;
  ent_t model[$];
  int checks = 0, failures = 0, tag = 0, wraps = 0, head_ins = 0;
  int base = 0;

  task automatic check_head();
    checks++;
    if (model.size() == 0) begin
      if (head_valid) begin failures++; $display("FAIL: head valid on empty queue"); end
    end else if (!head_valid || head_dl != DL_W'(model[0].dl) || head_ca != CA_W'(model[0].tag)
                 || head_ch != CH_W'(model[0].tag)) begin
      failures++;
      $display("FAIL: head v=%0d dl=%0d ca=%0d, expected dl=%0d tag=%0d", head_valid, head_dl,
               head_ca, DL_W'(model[0].dl), model[0].tag);
    end
    checks++;
    if (full != (model.size() == C)) begin failures++; $display("FAIL: full flag"); end
  endtask

  function automatic void model_insert(int dl, int t);
    int i = 0;
    while (i < model.size() && model[i].dl <= dl) i++;
    if (i == 0) head_ins++;
    model.insert(i, '{dl, t});
  endfunction

  initial begin
    op = Q_NOP; new_dl = '0; new_ch = '0; new_ca = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int r, d;
      @(negedge clk);
      check_head();
      r = $urandom_range(0, 9);
      if (model.size() > 0) base = model[0].dl - 20;
      d = base + $urandom_range(0, 99);
      if (model.size() == 0 || (r < 5 && model.size() < C)) op = Q_ENQ;
      else if (r < 7) op = Q_DEQ;
      else op = Q_ENQ_DEQ;
      tag++;
      new_dl = DL_W'(d); new_ca = CA_W'(tag); new_ch = CH_W'(tag);
      if (op == Q_DEQ || op == Q_ENQ_DEQ) void'(model.pop_front());
      if (op == Q_ENQ || op == Q_ENQ_DEQ) begin
        if ((d & 255) < (base & 255) || ((d >> 8) != (base >> 8))) wraps++;
        model_insert(d, tag);
      end
    end
    @(negedge clk);
    check_head();
    // drain
    while (model.size() > 0) begin
      op = Q_DEQ;
      void'(model.pop_front());
      @(negedge clk);
      check_head();
    end
    op = Q_NOP;
    checks++;
    if (wraps == 0 || head_ins == 0) begin failures++; $display("FAIL: wrap/head insert not exercised"); end
    $display("wraps=%0d head_inserts=%0d", wraps, head_ins);
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
