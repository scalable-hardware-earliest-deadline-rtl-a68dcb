// edf_block - one block of the shift-register EDF queue.
//
// A block holds one entry (valid flag, deadline, channel number, cell address)
// and one subtracter that forms e - q, where e is the deadline broadcast to all
// blocks and q the resident deadline. Deadlines are folded (kept modulo
// 2**DL_W), so the block does not use the borrow of the subtraction but its
// most significant bit M: M = 1 means the broadcast entry is earlier than the
// resident one. This is valid while all live deadlines lie within half the
// deadline range of each other. An empty block always reports M = 1, so empty
// blocks gather at the tail of the queue.
//
// The queue's head is the "right" end. Each block looks at M of its right
// neighbour (M_r, toward the head) and its left neighbour (M_l):
//   Q_ENQ     : M=1,M_r=1 shift left (take right neighbour); M=1,M_r=0 load
//               the broadcast entry; M=0 hold.
//   Q_ENQ_DEQ : M=1,M_l=1 hold; M=0,M_l=1 load; M=0,M_l=0 shift right (take
//               left neighbour).
//   Q_DEQ     : shift right.
// Equal deadlines give M = 0, so a new entry goes behind older entries with
// the same deadline (FIFO order among ties).
// These rules follow the deadline-folding scheme of the design. Own choices:
// the head block (IS_HEAD) treats its M as 0 during Q_ENQ_DEQ, because its
// entry leaves in that cycle, so it always refills from its left neighbour or
// the broadcast entry; the queue ties M_r of the head to 0 and gives the tail
// block an empty left neighbour with M_l = 1.
//
// Timing: the entry register changes at the rising clock edge; M is
// combinational from the broadcast deadline. Reset empties the block.
module edf_block
  import edf_pkg::*;
#(
  parameter int  DL_W    = 15,
  parameter int  CH_W    = 8,
  parameter int  CA_W    = 12,
  parameter bit  IS_HEAD = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  queue_op_e       op,
  // broadcast entry
  input  logic [DL_W-1:0] new_dl,
  input  logic [CH_W-1:0] new_ch,
  input  logic [CA_W-1:0] new_ca,
  // right neighbour (toward the head)
  input  logic            r_valid,
  input  logic [DL_W-1:0] r_dl,
  input  logic [CH_W-1:0] r_ch,
  input  logic [CA_W-1:0] r_ca,
  input  logic            m_r,
  // left neighbour (toward the tail)
  input  logic            l_valid,
  input  logic [DL_W-1:0] l_dl,
  input  logic [CH_W-1:0] l_ch,
  input  logic [CA_W-1:0] l_ca,
  input  logic            m_l,
  // this block
  output logic            m,
  output logic            q_valid,
  output logic [DL_W-1:0] q_dl,
  output logic [CH_W-1:0] q_ch,
  output logic [CA_W-1:0] q_ca
);

  logic [DL_W-1:0] diff;
  logic            m_eff;

  typedef enum logic [1:0] {HOLD, LOAD_NEW, FROM_RIGHT, FROM_LEFT} act_e;
  act_e act;

  always_comb begin
    diff  = new_dl - q_dl;
    m     = !q_valid || diff[DL_W-1];
    m_eff = (IS_HEAD && op == Q_ENQ_DEQ) ? 1'b0 : m;
    act   = HOLD;
    unique case (op)
      Q_ENQ:     if (m_eff) act = m_r ? FROM_RIGHT : LOAD_NEW;
      Q_ENQ_DEQ: if (!m_eff) act = m_l ? LOAD_NEW : FROM_LEFT;
      Q_DEQ:     act = FROM_LEFT;
      default:   act = HOLD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_dl    <= '0;
      q_ch    <= '0;
      q_ca    <= '0;
    end else begin
      unique case (act)
        LOAD_NEW:   begin q_valid <= 1'b1;    q_dl <= new_dl; q_ch <= new_ch; q_ca <= new_ca; end
        FROM_RIGHT: begin q_valid <= r_valid; q_dl <= r_dl;   q_ch <= r_ch;   q_ca <= r_ca;   end
        FROM_LEFT:  begin q_valid <= l_valid; q_dl <= l_dl;   q_ch <= l_ch;   q_ca <= l_ca;   end
        default:    ;
      endcase
    end
  end

endmodule
