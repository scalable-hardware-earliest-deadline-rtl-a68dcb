// atm_sched_checker - stimulus and reference model for edf_atm_scheduler,
// shared by the reduced-size and the full-size end-to-end testbenches.
//
// Drives real-time cells on 16 channels spread over all chained schedulers
// (deadlines made distinct modulo 16 so the expected order is unique) and
// non-real-time cells, in alternating input-heavy and output-heavy phases,
// while the current time advances and deadlines wrap. The model keeps every
// channel's cells in FIFO order, the free cell and data-buffer counts and the
// non-real-time FIFO, and predicts each cycle: in_ready, out_ack, whether a
// real-time cell leaves and which (channel, deadline), and the cell data one
// cycle later. It counts the mechanisms of the design (every state of the
// controller, the one-cycle stall, the same-channel case, early cells held
// beyond the horizon, non-real-time service, a win by every scheduler of the
// chain, full data buffers and a full cell buffer) and reports a failure for
// each that never happened (the "full" ones only when COVER_FULL is set).
// Initialisation must take max(N, NB - C) cycles. The current time starts
// at T0 and advances by one every TDIV cycles; a channel's next deadline is
// at most DSPREAD * 16 beyond its previous one or the current time.
module atm_sched_checker
  import edf_pkg::*;
#(
  parameter int SEL_W = 2, C = 4, CH_W = 2, DL_W = 12, N = 32, NB = 16,
  parameter int CELL_W = 32, NRT_DEPTH = 8, NCYC = 6000, H = 40,
  parameter bit COVER_FULL = 1'b1,
  parameter int T0 = 0, TDIV = 2, DSPREAD = 4
) (
  output logic                  clk,
  output logic                  rst_n,
  output logic [DL_W-1:0]       cur_time,
  output logic [DL_W-1:0]       horizon,
  output logic                  in_valid,
  input  logic                  in_ready,
  output logic                  in_rt,
  output logic [DL_W-1:0]       in_dl,
  output logic [SEL_W+CH_W-1:0] in_ch,
  output logic [CELL_W-1:0]     in_cell,
  output logic                  out_req,
  input  logic                  out_ack,
  input  logic                  out_is_rt,
  input  logic [SEL_W+CH_W-1:0] out_ch,
  input  logic [DL_W-1:0]       out_dl,
  input  logic                  out_valid,
  input  logic [CELL_W-1:0]     out_cell,
  input  logic                  init_done,
  input  logic [4:0]            mod_state [2**SEL_W]
);
  localparam int NMOD = 2**SEL_W, NU = 16;

  typedef struct { int dl; int tag; } cell_t;
  cell_t lists [NU][$];
  int nrt [$];
  int last_dl [NU];
  int checks = 0, failures = 0, t = T0, tag = 0, cyc = 0;
  int st_cnt [NMOD][32];
  int win_cnt [NMOD];
  int same_cnt = 0, early_cnt = 0, dfull_cnt = 0, cfull_cnt = 0, nrt_cnt = 0, stall_cnt = 0, wrap_cnt = 0;
  logic defer_prev [NMOD];
  logic exp_valid = 0;
  int   exp_tag = 0;
  bit   exp_rt = 0;

  function automatic int chan_of(int idx);
    return (idx % NMOD) * C + (idx / NMOD) * (C / 4);
  endfunction

  function automatic logic [CELL_W-1:0] mkcell(int tg, bit rt);
    logic [CELL_W-1:0] v;
    for (int i = 0; i < CELL_W; i += 32) v[i +: 32] = 32'(tg) ^ (rt ? 32'h5A5A_0000 : 32'h0);
    return v;
  endfunction

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, w);
    end
  endtask

  initial clk = 0;
  always #5 clk = ~clk;
  assign cur_time = DL_W'(t);
  assign horizon  = DL_W'(H);

  initial begin
    rst_n = 0; in_valid = 0; in_rt = 0; in_dl = '0; in_ch = '0; in_cell = '0; out_req = 0;
    for (int i = 0; i < NU; i++) last_dl[i] = 0;
    for (int m = 0; m < NMOD; m++) begin
      defer_prev[m] = 0; win_cnt[m] = 0;
      for (int s = 0; s < 32; s++) st_cnt[m][s] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while (!init_done) begin @(negedge clk); cyc++; end
    chk(cyc == ((N > NB - C) ? N : NB - C), $sformatf("initialisation took %0d cycles", cyc));
    for (int n = 0; n < NCYC; n++) begin
      int idx, b, d, cells, hidx, hmin, mi, pin, pout;
      int dused [NMOD];
      logic exp_ready, in_acc, any_el, f, l, out_ok, exp_oack, nrt_take;
      logic defer_now [NMOD];
      cyc++;
      pin  = ((n / 200) % 2 == 0) ? 85 : 35;
      pout = ((n / 200) % 2 == 0) ? 30 : 90;
      in_valid = $urandom_range(0, 99) < pin;
      in_rt    = $urandom_range(0, 99) < 85;
      out_req  = $urandom_range(0, 99) < pout;
      idx = $urandom_range(0, NU-1);
      in_ch = (SEL_W+CH_W)'(chan_of(idx));
      b = (last_dl[idx] > t) ? last_dl[idx] : t;
      d = ((b + NU - 1) / NU) * NU + idx + NU * $urandom_range(0, DSPREAD);
      in_dl = DL_W'(d);
      tag++;
      in_cell = mkcell(tag, in_rt);
      // model
      mi = idx % NMOD;
      cells = 0;
      for (int m = 0; m < NMOD; m++) dused[m] = 0;
      for (int i = 0; i < NU; i++) begin
        cells += lists[i].size();
        if (lists[i].size() > 1) dused[i % NMOD] += lists[i].size() - 1;
      end
      hidx = -1; hmin = 0;
      for (int i = 0; i < NU; i++)
        if (lists[i].size() > 0 && (hidx < 0 || lists[i][0].dl < hmin)) begin hidx = i; hmin = lists[i][0].dl; end
      any_el = (hidx >= 0) && (hmin < t + H);
      exp_ready = in_rt ? (!defer_prev[mi] && dused[mi] < NB - C && cells < N)
                        : (nrt.size() < NRT_DEPTH);
      in_acc = in_valid && exp_ready;
      f = lists[idx].size() == 0;
      l = (hidx >= 0) && lists[hidx].size() == 1;
      out_ok = out_req && any_el;
      for (int m = 0; m < NMOD; m++) defer_now[m] = 0;
      if (in_acc && in_rt && out_ok && (hidx % NMOD) == mi && !defer_prev[mi] && f && !l)
        defer_now[mi] = 1;
      exp_oack = out_ok && !(defer_now[mi] && (hidx % NMOD) == mi);
      nrt_take = out_req && !any_el && nrt.size() > 0;
      #1;
      chk(in_ready == exp_ready, "in_ready");
      chk(out_is_rt == any_el, "real-time cell eligible");
      chk(out_ack == (exp_oack || nrt_take), "out_ack");
      if (any_el) chk(out_ch == (SEL_W+CH_W)'(chan_of(hidx)) && out_dl == DL_W'(hmin),
                      $sformatf("out ch %0d dl %0d expected ch %0d dl %0d", out_ch, out_dl,
                                chan_of(hidx), DL_W'(hmin)));
      // cell data of the previous cycle's output
      chk(out_valid == exp_valid, "out_valid");
      if (exp_valid) chk(out_cell == mkcell(exp_tag, exp_rt), "out_cell");
      for (int m = 0; m < NMOD; m++) st_cnt[m][mod_state[m]]++;
      if (in_acc && in_rt && out_ok && (hidx == idx) && l) same_cnt++;
      if (out_req && hidx >= 0 && !any_el) early_cnt++;
      if (in_valid && in_rt && dused[mi] == NB - C) dfull_cnt++;
      if (in_valid && in_rt && cells == N) cfull_cnt++;
      if (nrt_take) nrt_cnt++;
      if (defer_prev[mi] && in_valid && in_rt) stall_cnt++;
      if (in_acc && in_rt && hidx >= 0 && (d >> DL_W) != (hmin >> DL_W)) wrap_cnt++;
      if (hidx >= 0) chk(t + H - hmin < (1 << (DL_W-1)), "stimulus keeps deadlines in the folding window");
      // update
      exp_valid = 0;
      if (exp_oack) begin
        cell_t c;
        c = lists[hidx].pop_front();
        win_cnt[hidx % NMOD]++;
        exp_valid = 1; exp_tag = c.tag; exp_rt = 1;
      end else if (nrt_take) begin
        exp_valid = 1; exp_tag = nrt.pop_front(); exp_rt = 0;
      end
      if (in_acc) begin
        if (in_rt) begin lists[idx].push_back('{d, tag}); last_dl[idx] = d; end
        else nrt.push_back(tag);
      end
      for (int m = 0; m < NMOD; m++) defer_prev[m] = defer_now[m];
      @(negedge clk);
      if (n % TDIV == 0) t++;
    end
    // coverage of the design's mechanisms
    begin
      sched_state_e sts [10] = '{ST_IDLE, ST_IQ, ST_IB, ST_IQ_DEFER, ST_BQ_QO_2, ST_IQ_QO,
                                 ST_IB_BQ_QO, ST_IB_QO, ST_BQ_QO, ST_QO};
      foreach (sts[i]) begin
        int tot;
        tot = 0;
        for (int m = 0; m < NMOD; m++) tot += st_cnt[m][sts[i]];
        $display("state %0d occurred %0d times", sts[i], tot);
        chk(tot > 0, $sformatf("state %0d never occurred", sts[i]));
      end
    end
    for (int m = 0; m < NMOD; m++) begin
      $display("scheduler %0d sent %0d cells", m, win_cnt[m]);
      chk(win_cnt[m] > 0, "every chained scheduler wins at least once");
    end
    $display("same-channel %0d, early holds %0d, stalls %0d, NRT sent %0d, wraps %0d, data full %0d, cell full %0d",
             same_cnt, early_cnt, stall_cnt, nrt_cnt, wrap_cnt, dfull_cnt, cfull_cnt);
    chk(same_cnt > 0, "same-channel in/out");
    chk(early_cnt > 0, "early-traffic hold");
    chk(stall_cnt > 0, "input stall after IQ then BQ&QO");
    chk(nrt_cnt > 0, "non-real-time service");
    chk(wrap_cnt > 0, "deadline wrap");
    if (COVER_FULL) begin
      chk(dfull_cnt > 0, "data buffer full");
      chk(cfull_cnt > 0, "cell buffer full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + N + NB + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
