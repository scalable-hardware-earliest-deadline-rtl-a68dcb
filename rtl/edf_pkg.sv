// edf_pkg - shared types of the EDF link scheduler.
//
// sched_state_e numbers the link-scheduler operations with the state numbers
// of the scheduler's state diagram (0 Idle, 12 IQ, 4 IB, 13 IQ with the output
// deferred, 29 the deferred BQ&QO, 15 IQ&QO, 5 IB&BQ&QO, 7 IB&QO, 1 BQ&QO,
// 3 QO) plus 30 for the power-up initialisation of the idle-address FIFOs.
// Operation names: IQ = input to EDF queue, IB = input to data buffer,
// QO = output from EDF queue, BQ = move a cell from data buffer to EDF queue.
//
// queue_op_e is the command given to every block of the EDF queue at once.
package edf_pkg;

  typedef enum logic [4:0] {
    ST_IDLE     = 5'd0,
    ST_BQ_QO    = 5'd1,
    ST_QO       = 5'd3,
    ST_IB       = 5'd4,
    ST_IB_BQ_QO = 5'd5,
    ST_IB_QO    = 5'd7,
    ST_IQ       = 5'd12,
    ST_IQ_DEFER = 5'd13,
    ST_IQ_QO    = 5'd15,
    ST_BQ_QO_2  = 5'd29,
    ST_INIT     = 5'd30
  } sched_state_e;

  typedef enum logic [1:0] {
    Q_NOP     = 2'd0,  // every block holds
    Q_ENQ     = 2'd1,  // insert the broadcast entry in deadline order
    Q_DEQ     = 2'd2,  // drop the head, everything moves one block toward it
    Q_ENQ_DEQ = 2'd3   // drop the head and insert the broadcast entry together
  } queue_op_e;

endpackage
