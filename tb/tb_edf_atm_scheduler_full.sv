// tb_edf_atm_scheduler_full - end-to-end test of the scheduler with every
// parameter at its default: four chained link schedulers of 256 channels,
// 4096-cell buffer, 4096-word data buffers, 15-bit folded deadlines, 424-bit
// cells. Runs the initialisation (4096 cycles) and 4000 cycles of mixed
// traffic through atm_sched_checker. The buffers are too large to fill in
// that time, so the "buffer full" cases are not required here; they are
// covered by tb_edf_atm_scheduler.
module tb_edf_atm_scheduler_full;
  localparam int SEL_W = 2, CH_W = 8, DL_W = 15, CELL_W = 424;

  logic clk, rst_n, in_valid, in_ready, in_rt, out_req, out_ack, out_is_rt, out_valid, init_done;
  logic [DL_W-1:0] cur_time, horizon, in_dl, out_dl;
  logic [SEL_W+CH_W-1:0] in_ch, out_ch;
  logic [CELL_W-1:0] in_cell, out_cell;
  logic [4:0] mod_state [2**SEL_W];

  edf_atm_scheduler dut (.*);

  atm_sched_checker #(.SEL_W(SEL_W), .C(256), .CH_W(CH_W), .DL_W(DL_W), .N(4096), .NB(4096),
                      .CELL_W(CELL_W), .NRT_DEPTH(1024), .NCYC(4000), .H(40),
                      .COVER_FULL(1'b0), .T0(32000), .TDIV(1), .DSPREAD(1)) chk (.*);
endmodule
