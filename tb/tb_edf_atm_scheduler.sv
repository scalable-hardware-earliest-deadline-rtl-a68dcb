// tb_edf_atm_scheduler - end-to-end test of the whole scheduler at reduced
// size: four chained link schedulers of 4 channels each, a 32-cell buffer,
// 16-word data buffers and an 8-cell non-real-time FIFO, so that every
// buffer fills up. Stimulus, reference model and coverage are in
// atm_sched_checker.
module tb_edf_atm_scheduler;
  localparam int SEL_W = 2, C = 4, CH_W = 2, DL_W = 12, N = 32, CA_W = 5, NB = 16, BA_W = 4;
  localparam int CELL_W = 32, NRT_DEPTH = 8;

  logic clk, rst_n, in_valid, in_ready, in_rt, out_req, out_ack, out_is_rt, out_valid, init_done;
  logic [DL_W-1:0] cur_time, horizon, in_dl, out_dl;
  logic [SEL_W+CH_W-1:0] in_ch, out_ch;
  logic [CELL_W-1:0] in_cell, out_cell;
  logic [4:0] mod_state [2**SEL_W];

  edf_atm_scheduler #(.SEL_W(SEL_W), .C(C), .CH_W(CH_W), .DL_W(DL_W), .N(N), .CA_W(CA_W),
                      .NB(NB), .BA_W(BA_W), .CELL_W(CELL_W), .NRT_DEPTH(NRT_DEPTH)) dut (.*);

  atm_sched_checker #(.SEL_W(SEL_W), .C(C), .CH_W(CH_W), .DL_W(DL_W), .N(N), .NB(NB),
                      .CELL_W(CELL_W), .NRT_DEPTH(NRT_DEPTH), .NCYC(8000), .H(40),
                      .COVER_FULL(1'b1)) chk (.*);
endmodule
