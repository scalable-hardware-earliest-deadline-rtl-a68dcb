// edf_queue - shift-register earliest-deadline-first queue of C blocks.
//
// Block 0 is the head: it always holds the entry with the earliest (folded)
// deadline. Because the link scheduler keeps at most one cell per channel in
// this queue, C blocks (one per channel) are enough and the queue never
// overflows. Every block compares the broadcast deadline with its own in
// parallel (see edf_block), so Q_ENQ, Q_DEQ and Q_ENQ_DEQ each complete in one
// clock cycle. The broadcast entry (new_*) is the only bus that loads all C
// blocks.
//
// Interface: op selects the operation for this cycle; new_* is the entry to
// insert; head_* shows block 0 (head_valid = 0 when the queue is empty).
// The caller must not request Q_DEQ or Q_ENQ_DEQ on an empty queue, nor
// Q_ENQ on a full one (checked by assertions).
module edf_queue
  import edf_pkg::*;
#(
  parameter int C    = 256,
  parameter int DL_W = 15,
  parameter int CH_W = 8,
  parameter int CA_W = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  queue_op_e       op,
  input  logic [DL_W-1:0] new_dl,
  input  logic [CH_W-1:0] new_ch,
  input  logic [CA_W-1:0] new_ca,
  output logic            head_valid,
  output logic [DL_W-1:0] head_dl,
  output logic [CH_W-1:0] head_ch,
  output logic [CA_W-1:0] head_ca,
  output logic            full
);

  logic            v  [C+1];
  logic [DL_W-1:0] dl [C+1];
  logic [CH_W-1:0] ch [C+1];
  logic [CA_W-1:0] ca [C+1];
  logic            mm [C+1];

  // position C is the empty slot beyond the tail
  assign v[C]  = 1'b0;
  assign dl[C] = '0;
  assign ch[C] = '0;
  assign ca[C] = '0;
  assign mm[C] = 1'b1;

  for (genvar k = 0; k < C; k++) begin : g_blk
    logic            rv;
    logic [DL_W-1:0] rdl;
    logic [CH_W-1:0] rch;
    logic [CA_W-1:0] rca;
    logic            rm;
    if (k == 0) begin : g_head
      assign rv = 1'b0; assign rdl = '0; assign rch = '0; assign rca = '0; assign rm = 1'b0;
    end else begin : g_body
      assign rv = v[k-1]; assign rdl = dl[k-1]; assign rch = ch[k-1]; assign rca = ca[k-1];
      assign rm = mm[k-1];
    end
    edf_block #(
      .DL_W(DL_W), .CH_W(CH_W), .CA_W(CA_W), .IS_HEAD(k == 0)
    ) u_blk (
      .clk, .rst_n, .op,
      .new_dl, .new_ch, .new_ca,
      .r_valid(rv), .r_dl(rdl), .r_ch(rch), .r_ca(rca), .m_r(rm),
      .l_valid(v[k+1]), .l_dl(dl[k+1]), .l_ch(ch[k+1]), .l_ca(ca[k+1]), .m_l(mm[k+1]),
      .m(mm[k]), .q_valid(v[k]), .q_dl(dl[k]), .q_ch(ch[k]), .q_ca(ca[k])
    );
  end

  assign head_valid = v[0];
  assign head_dl    = dl[0];
  assign head_ch    = ch[0];
  assign head_ca    = ca[0];
  assign full       = v[C-1];

  a_no_deq_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (op == Q_DEQ || op == Q_ENQ_DEQ) |-> head_valid);
  a_no_enq_full: assert property (@(posedge clk) disable iff (!rst_n)
    (op == Q_ENQ) |-> !full);

endmodule
