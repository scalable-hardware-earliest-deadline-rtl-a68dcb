// chan_counter_array - Cnt_i, the number of cells of channel i held by the
// link scheduler (one in the EDF queue plus those in the data buffer).
//
// Cnt of the input channel is incremented when a cell enters (IQ or IB) and
// Cnt of the output channel is decremented when a cell leaves (QO); when both
// name the same channel in one cycle the count is unchanged. Two combinational
// read ports give the counts the controller needs: cnt_in (tested for 0,
// condition F) and cnt_out (tested for 1, condition L). Reset clears all
// counters. The counter width CNT_W is this implementation's choice (wide
// enough for every cell of the cell buffer).
module chan_counter_array #(
  parameter int C     = 256,
  parameter int CH_W  = 8,
  parameter int CNT_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CH_W-1:0]  in_ch,
  input  logic             inc,
  input  logic [CH_W-1:0]  out_ch,
  input  logic             dec,
  output logic [CNT_W-1:0] cnt_in,
  output logic [CNT_W-1:0] cnt_out
);

  logic [CNT_W-1:0] cnt [C];

  assign cnt_in  = cnt[in_ch];
  assign cnt_out = cnt[out_ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < C; i++) cnt[i] <= '0;
    end else begin
      if (inc && dec && in_ch == out_ch) begin
        // one cell in, one cell out: unchanged
      end else begin
        if (inc) cnt[in_ch]  <= cnt[in_ch] + 1'b1;
        if (dec) cnt[out_ch] <= cnt[out_ch] - 1'b1;
      end
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    dec |-> cnt_out != '0);

endmodule
