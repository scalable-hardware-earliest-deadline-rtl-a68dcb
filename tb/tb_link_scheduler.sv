// tb_link_scheduler - self-checking test of one link scheduler.
//
// A small scheduler (C = 16 channels, 32-word data buffer, 12-bit folded
// deadlines) receives random cells in alternating input-heavy and
// output-heavy phases while the current time advances, so deadlines wrap
// through zero. A reference model keeps every channel's cells in FIFO order
// and predicts, cycle by cycle: in_ready (initialisation, free data-buffer
// words, the refused cycle after IQ then BQ&QO), whether the head may leave
// (earliest channel head, deadline < time + H), whether out_ack is withheld
// (input and output both need the EDF queue), and the deadline, channel and
// cell address that leave. It also counts how often each state of the state
// diagram, the same-channel case, early-cell holding and a full data buffer
// occurred, and fails if one never did. Initialisation must take NB - C
// cycles.
module tb_link_scheduler;
  import edf_pkg::*;
  localparam int C = 16, CH_W = 4, DL_W = 12, CA_W = 8, NB = 32, BA_W = 5, CNT_W = 7;
  localparam int H = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_ack;
  logic [DL_W-1:0] in_dl = '0, di, do_dl, head_dl;
  logic [CH_W-1:0] in_ch = '0, head_ch;
  logic [CA_W-1:0] in_ca = '0, out_ca;
  logic ei, eo, sel, out_req = 0, out_ack, head_valid, init_done;
  sched_state_e state;

  link_scheduler #(.C(C), .CH_W(CH_W), .DL_W(DL_W), .CA_W(CA_W), .NB(NB), .BA_W(BA_W),
                   .CNT_W(CNT_W)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int dl; int ca; } cell_t;
  cell_t lists [C][$];
  int last_dl [C];
  int checks = 0, failures = 0, t = 0, tag = 0, cyc = 0;
  int st_cnt [32];
  int same_cnt = 0, early_cnt = 0, full_cnt = 0, wrap_cnt = 0;
  logic defer_prev = 0;

  assign ei = 1'b1;
  assign di = DL_W'(t + H);

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s (state=%0d)", cyc, w, state);
    end
  endtask

  initial begin
    for (int i = 0; i < C; i++) last_dl[i] = 0;
    for (int i = 0; i < 32; i++) st_cnt[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!init_done) begin @(negedge clk); cyc++; end
    chk(cyc == NB - C, $sformatf("initialisation took %0d cycles", cyc));
    for (int n = 0; n < 6000; n++) begin
      int used, free, hch, hmin, pin, pout;
      logic exp_ready, in_acc, eligible, f, l, same, out_ok, defer_now, exp_oack;
      cyc++;
      // stimulus
      pin  = ((n / 150) % 2 == 0) ? 85 : 35;
      pout = ((n / 150) % 2 == 0) ? 30 : 90;
      in_valid = $urandom_range(0, 99) < pin;
      out_req  = $urandom_range(0, 99) < pout;
      in_ch = CH_W'($urandom_range(0, C-1));
      begin
        int b, d;
        b = (last_dl[in_ch] > t) ? last_dl[in_ch] : t;
        d = ((b + C - 1) / C) * C + int'(in_ch) + C * $urandom_range(0, 6);
        if (d < last_dl[in_ch]) d += C;
        in_dl = DL_W'(d);
        tag++;
        in_ca = CA_W'(tag);
        // model
        used = 0;
        for (int i = 0; i < C; i++) if (lists[i].size() > 1) used += lists[i].size() - 1;
        free = NB - C - used;
        hch = -1; hmin = 0;
        for (int i = 0; i < C; i++)
          if (lists[i].size() > 0 && (hch < 0 || lists[i][0].dl < hmin)) begin hch = i; hmin = lists[i][0].dl; end
        eligible  = (hch >= 0) && (hmin < t + H);
        exp_ready = !defer_prev && free > 0;
        in_acc    = in_valid && exp_ready;
        f         = lists[in_ch].size() == 0;
        l         = (hch >= 0) && lists[hch].size() == 1;
        same      = (hch == int'(in_ch));
        out_ok    = out_req && eligible;
        defer_now = !defer_prev && in_acc && out_ok && f && !l;
        exp_oack  = out_ok && !defer_now;
        #1;
        chk(in_ready == exp_ready, "in_ready");
        chk(in_ack == in_acc, "in_ack");
        chk(out_ack == exp_oack, "out_ack");
        chk(sel == eligible, "sel (head due within horizon)");
        chk(head_valid == (hch >= 0), "head_valid");
        if (hch >= 0) begin
          chk(head_ch == CH_W'(hch) && head_dl == DL_W'(hmin), $sformatf("head ch %0d dl %0d expected ch %0d dl %0d", head_ch, head_dl, hch, DL_W'(hmin)));
          if (eligible) chk(out_ca == CA_W'(lists[hch][0].ca), "cell address");
        end
        if (!eligible) chk(out_ca == '0, "address bus released");
        st_cnt[state]++;
        if (state == ST_IQ_QO && !f) same_cnt++;
        if (out_req && hch >= 0 && !eligible) early_cnt++;
        if (in_valid && free == 0) full_cnt++;
        if (in_acc && DL_W'(d) < DL_W'(t)) wrap_cnt++;
        if (hch >= 0) chk(t + H - hmin < (1 << (DL_W-1)), "stimulus keeps deadlines in the folding window");
        // update
        if (exp_oack && hch >= 0) void'(lists[hch].pop_front());
        if (in_acc) begin lists[in_ch].push_back('{d, tag % (1 << CA_W)}); last_dl[in_ch] = d; end
        defer_prev = defer_now;
      end
      @(negedge clk);
      if (n % 2 == 0) t++;
    end
    begin
      sched_state_e sts [10] = '{ST_IDLE, ST_IQ, ST_IB, ST_IQ_DEFER, ST_BQ_QO_2, ST_IQ_QO,
                                 ST_IB_BQ_QO, ST_IB_QO, ST_BQ_QO, ST_QO};
      foreach (sts[i]) begin
        $display("state %0d occurred %0d times", sts[i], st_cnt[sts[i]]);
        chk(st_cnt[sts[i]] > 0, $sformatf("state %0d never occurred", sts[i]));
      end
    end
    $display("same-channel IQ&QO %0d, early holds %0d, data buffer full %0d, wrapped inputs %0d",
             same_cnt, early_cnt, full_cnt, wrap_cnt);
    chk(same_cnt > 0, "same-channel case");
    chk(early_cnt > 0, "early-traffic hold");
    chk(full_cnt > 0, "data buffer full");
    chk(wrap_cnt > 0, "deadline wrap");
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
