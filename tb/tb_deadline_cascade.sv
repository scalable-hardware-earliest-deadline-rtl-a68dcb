// tb_deadline_cascade - self-checking test of the comparator/cascade stage.
//
// Random head deadlines and bounds (8-bit folded) are applied to a chain of
// four stages, the first bound playing current-time + H. The expected winner
// is computed from unfolded deadlines placed within half the range of the
// bound: the latest stage (nearest EI = 1) whose deadline is earlier than
// every stage before it and than the bound, i.e. the minimum, ties going to
// the earlier stage. Checks sel of every stage, DO of the last stage and the
// single-stage A < B output.
module tb_deadline_cascade;
  localparam int DL_W = 8, M = 4;
  logic            hv [M];
  logic [DL_W-1:0] hd [M];
  logic [DL_W-1:0] di [M];
  logic [DL_W-1:0] dout [M];
  logic            ei [M], eo [M], alb [M], sel [M];

  for (genvar k = 0; k < M; k++) begin : g
    deadline_cascade #(.DL_W(DL_W)) dut (
      .head_valid(hv[k]), .head_dl(hd[k]), .di(di[k]), .ei(ei[k]),
      .do_dl(dout[k]), .eo(eo[k]), .a_lt_b(alb[k]), .sel(sel[k]));
    if (k > 0) begin : g_di
      assign di[k] = dout[k-1];
    end else begin : g_di0
      assign di[k] = b0;
    end
    if (k < M-1) begin : g_ei
      assign ei[k] = eo[k+1];
    end else begin : g_last
      assign ei[k] = 1'b1;
    end
  end

  int checks = 0, failures = 0, none_cnt = 0, some_cnt = 0;
  logic [DL_W-1:0] b0;

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int base, bound, ud [M], best, bestv;
      base  = $urandom_range(0, 255);
      bound = base + $urandom_range(0, 60);
      for (int k = 0; k < M; k++) begin
        ud[k] = base + $urandom_range(0, 120) - 30;
        hv[k] = ($urandom_range(0, 4) != 0);
        hd[k] = DL_W'(ud[k]);
      end
      b0 = DL_W'(bound);
      #1;
      best = -1; bestv = bound;
      for (int k = 0; k < M; k++)
        if (hv[k] && ud[k] < bestv) begin best = k; bestv = ud[k]; end
      if (best < 0) none_cnt++; else some_cnt++;
      for (int k = 0; k < M; k++) begin
        checks++;
        if (sel[k] != (k == best)) begin
          failures++;
          $display("FAIL: stage %0d sel=%0d expected winner %0d", k, sel[k], best);
        end
      end
      checks++;
      if (dout[M-1] != DL_W'(bestv)) begin failures++; $display("FAIL: DO of last stage"); end
      checks++;
      if (alb[0] != (hv[0] && ud[0] < bound)) begin failures++; $display("FAIL: A<B of stage 0"); end
    end
    checks++;
    if (none_cnt == 0 || some_cnt == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
