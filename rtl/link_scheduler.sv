// link_scheduler - one EDF link scheduler: EDF queue, controller, per-channel
// counters and list registers, plus the data buffer holding the per-channel
// FIFO queues and its free list.
//
// Only the oldest waiting cell of each channel sits in the EDF queue (so the
// queue needs just C blocks); the later cells of a channel wait, in arrival
// order, in a linked list in the data buffer. When the head cell of a channel
// leaves the EDF queue, the next cell of that channel is moved from the data
// buffer into the EDF queue in the same cycle (BQ&QO). Cells are represented
// by their deadline (DL_W bits, folded modulo 2**DL_W) and the address of the
// cell in an external cell buffer (CA_W bits); the channel number has CH_W
// bits.
//
// Input: a cell is taken in a cycle where in_valid and in_ready are both high
// (in_ack is high in that cycle). Output: the head cell is released only when
// the deadline_cascade stage selects it (sel): its deadline is below di, no
// later stage of a chain claims the output, and out_req is high. out_ack
// marks the cycle in which the head (head_dl, head_ch and out_ca) leaves; the
// EDF queue and the data buffer are updated at the following rising edge.
// out_ca is zero while sel is low, so the outputs of several schedulers can be
// ORed together (this models a tri-state bus). in_ready is low during
// initialisation (NB - C cycles after reset), for one cycle after an input and
// output that both needed the EDF queue, and while the data buffer is full.
module link_scheduler
  import edf_pkg::*;
#(
  parameter int C     = 256,
  parameter int CH_W  = 8,
  parameter int DL_W  = 15,
  parameter int CA_W  = 12,
  parameter int NB    = 4096,
  parameter int BA_W  = 12,
  parameter int CNT_W = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  // cell input
  input  logic            in_valid,
  output logic            in_ready,
  output logic            in_ack,
  input  logic [DL_W-1:0] in_dl,
  input  logic [CH_W-1:0] in_ch,
  input  logic [CA_W-1:0] in_ca,
  // cascade / early-traffic comparator
  input  logic [DL_W-1:0] di,
  input  logic            ei,
  output logic [DL_W-1:0] do_dl,
  output logic            eo,
  output logic            sel,
  // cell output
  input  logic            out_req,
  output logic            out_ack,
  output logic            head_valid,
  output logic [DL_W-1:0] head_dl,
  output logic [CH_W-1:0] head_ch,
  output logic [CA_W-1:0] out_ca,
  // status
  output logic            init_done,
  output sched_state_e    state
);

  queue_op_e        q_op;
  logic             q_from_buf, buf_write, buf_read;
  logic [CNT_W-1:0] cnt_in, cnt_out;
  logic [BA_W-1:0]  wa_q, ra_q, free_addr;
  logic             free_empty;
  logic [DL_W-1:0]  b_dl;
  logic [CA_W-1:0]  b_ca;
  logic [BA_W-1:0]  b_na;
  logic [DL_W-1:0]  q_new_dl;
  logic [CH_W-1:0]  q_new_ch;
  logic [CA_W-1:0]  q_new_ca;
  logic [CA_W-1:0]  head_ca;
  logic             a_lt_b, q_full;

  sched_ctrl u_ctrl (
    .clk, .rst_n, .init_done,
    .in_valid, .out_req(out_req && sel), .head_valid,
    .f(cnt_in == '0), .l(cnt_out == CNT_W'(1)), .same_ch(in_ch == head_ch),
    .space_ok(!free_empty),
    .in_ready, .in_ack, .out_ack, .state,
    .q_op, .q_from_buf, .buf_write, .buf_read
  );

  chan_counter_array #(.C(C), .CH_W(CH_W), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .in_ch, .inc(in_ack), .out_ch(head_ch), .dec(out_ack),
    .cnt_in, .cnt_out
  );

  list_ptr_regs #(.C(C), .CH_W(CH_W), .AW(BA_W)) u_ptr (
    .clk, .rst_n,
    .wa_ch(in_ch),   .wa_we(buf_write), .wa_d(free_addr), .wa_q,
    .ra_ch(head_ch), .ra_we(buf_read),  .ra_d(b_na),      .ra_q
  );

  idle_addr_fifo #(.DEPTH(NB), .AW(BA_W), .FIRST(C), .COUNT(NB - C)) u_free (
    .clk, .rst_n,
    .pop(buf_write), .push(buf_read), .push_addr(ra_q),
    .head(free_addr), .empty(free_empty), .init_done
  );

  data_buffer #(.DEPTH(NB), .AW(BA_W), .DL_W(DL_W), .CA_W(CA_W)) u_dbuf (
    .clk,
    .we(buf_write), .waddr(wa_q), .wdl(in_dl), .wca(in_ca), .wna(free_addr),
    .raddr(ra_q), .rdl(b_dl), .rca(b_ca), .rna(b_na)
  );

  // input multiplexers of the EDF queue: new cell or next cell from the buffer
  always_comb begin
    if (q_from_buf) begin
      q_new_dl = b_dl; q_new_ch = head_ch; q_new_ca = b_ca;
    end else begin
      q_new_dl = in_dl; q_new_ch = in_ch; q_new_ca = in_ca;
    end
  end

  edf_queue #(.C(C), .DL_W(DL_W), .CH_W(CH_W), .CA_W(CA_W)) u_queue (
    .clk, .rst_n, .op(q_op),
    .new_dl(q_new_dl), .new_ch(q_new_ch), .new_ca(q_new_ca),
    .head_valid, .head_dl, .head_ch, .head_ca, .full(q_full)
  );

  deadline_cascade #(.DL_W(DL_W)) u_casc (
    .head_valid, .head_dl, .di, .ei, .do_dl, .eo, .a_lt_b, .sel
  );

  assign out_ca = sel ? head_ca : '0;

  a_ack_needs_head: assert property (@(posedge clk) disable iff (!rst_n)
    out_ack |-> (head_valid && a_lt_b && sel));
  a_queue_room: assert property (@(posedge clk) disable iff (!rst_n)
    (q_op == Q_ENQ) |-> !q_full);

endmodule
