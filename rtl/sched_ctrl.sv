// sched_ctrl - controller of one link scheduler (the state diagram).
//
// Each cycle the controller looks at whether a cell is offered (in_valid) and
// whether a cell is to be sent (out_req), and at two counter conditions:
//   F : the input channel holds no cell      (Cnt_i = 0)
//   L : the head cell is its channel's last  (Cnt_j = 1)
// and picks one operation, named by the state numbers of the diagram:
//   in only  : F -> 12 IQ (cell into the EDF queue), F' -> 4 IB (into the
//              data buffer)
//   out only : L -> 3 QO (dequeue), L' -> 1 BQ&QO (dequeue the head and move
//              the channel's next cell from the data buffer into the queue)
//   both     : F L -> 15 IQ&QO, F' L -> 7 IB&QO, F' L' -> 5 IB&BQ&QO,
//              F L' -> 13 IQ now, then 29 BQ&QO in the next cycle.
// Everything takes one cycle except F L', where both halves need to insert
// into the EDF queue: the input is taken in the first cycle, out_ack is held
// back, and in the second cycle inputs are refused (in_ready = 0) while the
// output is served. State 30 is shown while the free lists initialise.
// Own choices: a cell arriving for the very channel whose last cell leaves in
// the same cycle is treated as F (IQ&QO) so that the channel keeps its cell in
// the EDF queue; the second cycle of the F L' case re-reads L, so it becomes
// QO (3) if the head has changed in between; inputs are refused while the
// data buffer's free list is empty (space_ok = 0).
// Outputs are combinational; the only register is the deferral flag.
module sched_ctrl
  import edf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init_done,
  input  logic         in_valid,
  input  logic         out_req,
  input  logic         head_valid,
  input  logic         f,
  input  logic         l,
  input  logic         same_ch,
  input  logic         space_ok,
  output logic         in_ready,
  output logic         in_ack,
  output logic         out_ack,
  output sched_state_e state,
  output queue_op_e    q_op,
  output logic         q_from_buf,
  output logic         buf_write,
  output logic         buf_read
);

  logic defer_q, defer_d;
  logic in_ok, out_ok, f_eff;

  always_comb begin
    in_ready   = init_done && !defer_q && space_ok;
    in_ok      = in_valid && in_ready;
    out_ok     = out_req && init_done && head_valid;
    f_eff      = f || (same_ch && l);
    state      = ST_IDLE;
    defer_d    = 1'b0;
    if (!init_done) state = ST_INIT;
    else if (defer_q) begin
      if (out_ok) state = l ? ST_QO : ST_BQ_QO_2;
    end else begin
      unique case ({in_ok, out_ok})
        2'b10: state = f ? ST_IQ : ST_IB;
        2'b01: state = l ? ST_QO : ST_BQ_QO;
        2'b11: begin
          if (f_eff) begin
            state   = l ? ST_IQ_QO : ST_IQ_DEFER;
            defer_d = !l;
          end else begin
            state = l ? ST_IB_QO : ST_IB_BQ_QO;
          end
        end
        default: state = ST_IDLE;
      endcase
    end

    in_ack     = 1'b0;
    out_ack    = 1'b0;
    q_op       = Q_NOP;
    q_from_buf = 1'b0;
    buf_write  = 1'b0;
    buf_read   = 1'b0;
    unique case (state)
      ST_IQ:       begin in_ack = 1'b1; q_op = Q_ENQ; end
      ST_IQ_DEFER: begin in_ack = 1'b1; q_op = Q_ENQ; end
      ST_IB:       begin in_ack = 1'b1; buf_write = 1'b1; end
      ST_QO:       begin out_ack = 1'b1; q_op = Q_DEQ; end
      ST_BQ_QO,
      ST_BQ_QO_2:  begin out_ack = 1'b1; q_op = Q_ENQ_DEQ; q_from_buf = 1'b1; buf_read = 1'b1; end
      ST_IQ_QO:    begin in_ack = 1'b1; out_ack = 1'b1; q_op = Q_ENQ_DEQ; end
      ST_IB_QO:    begin in_ack = 1'b1; out_ack = 1'b1; q_op = Q_DEQ; buf_write = 1'b1; end
      ST_IB_BQ_QO: begin in_ack = 1'b1; out_ack = 1'b1; q_op = Q_ENQ_DEQ; q_from_buf = 1'b1;
                         buf_write = 1'b1; buf_read = 1'b1; end
      default:     ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) defer_q <= 1'b0;
    else        defer_q <= defer_d;
  end

endmodule
