// edf_atm_scheduler - earliest-deadline-first output-link scheduler for an ATM
// switch: 2**SEL_W link schedulers chained for more channels, a shared
// real-time cell buffer with its free list, and a non-real-time FIFO.
//
// Real-time cells arrive with a channel number and a deadline assigned by an
// upstream traffic shaper. The cell itself is stored in the cell buffer at an
// address taken from the cell free list; only the deadline and that address
// travel through the link scheduler that owns the channel (selected by the
// top SEL_W bits of the channel number through a decoder). Each link
// scheduler offers its earliest cell; the deadline_cascade stages compare
// these heads along a chain whose first bound is cur_time + horizon, so the
// cell sent is the earliest of all and only if its deadline is earlier than
// cur_time + horizon (early cells wait). Deadlines are compared modulo
// 2**DL_W through the MSB of a subtraction (deadline folding): all deadlines
// live at one time, and cur_time + horizon, must lie within 2**(DL_W-1) of
// each other. Non-real-time cells (in_rt = 0) go to a plain FIFO and are sent
// only when no real-time cell is eligible.
//
// Interface and timing:
//   * Inputs are taken in a cycle with in_valid and in_ready high. in_ready
//     is low for the N cycles of initialisation after reset (init_done low).
//   * out_req asks for a cell for the link; out_ack answers in the same cycle
//     when a cell leaves (out_is_rt, out_ch, out_dl describe it, out_dl only
//     for real-time cells). The cell data appear one cycle later on out_cell
//     with out_valid high. When an input and an output both need to insert
//     into the EDF queue of the same scheduler, out_ack is withheld for one
//     cycle; keep out_req high until out_ack.
//   * cur_time and horizon share the deadlines' DL_W-bit modulo time base.
// The block structure, the cascade and the early-traffic rule follow the
// design; the handshakes, the one-cycle cell read and the NRT FIFO depth are
// this implementation's choices. The chained schedulers' tri-state address
// outputs are modelled as an OR of outputs that are zero unless selected.
module edf_atm_scheduler
  import edf_pkg::*;
#(
  parameter int SEL_W     = 2,
  parameter int C         = 256,
  parameter int CH_W      = 8,
  parameter int DL_W      = 15,
  parameter int N         = 4096,
  parameter int CA_W      = 12,
  parameter int NB        = 4096,
  parameter int BA_W      = 12,
  parameter int CELL_W    = 424,
  parameter int NRT_DEPTH = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DL_W-1:0]       cur_time,
  input  logic [DL_W-1:0]       horizon,
  // cell input
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic                  in_rt,
  input  logic [DL_W-1:0]       in_dl,
  input  logic [SEL_W+CH_W-1:0] in_ch,
  input  logic [CELL_W-1:0]     in_cell,
  // cell output
  input  logic                  out_req,
  output logic                  out_ack,
  output logic                  out_is_rt,
  output logic [SEL_W+CH_W-1:0] out_ch,
  output logic [DL_W-1:0]       out_dl,
  output logic                  out_valid,
  output logic [CELL_W-1:0]     out_cell,
  // status
  output logic                  init_done,
  output logic [4:0]            mod_state [2**SEL_W]
);

  localparam int NMOD  = 2**SEL_W;
  localparam int CNT_W = $clog2(N + 1);

  logic [NMOD-1:0] dec, m_in_valid, m_in_ready, m_in_ack, m_out_ack, m_sel, m_eo, m_init;
  logic [DL_W-1:0] m_di [NMOD];
  logic [DL_W-1:0] m_do [NMOD];
  logic [DL_W-1:0] m_head_dl [NMOD];
  logic [CH_W-1:0] m_head_ch [NMOD];
  logic [CA_W-1:0] m_out_ca [NMOD];
  logic [NMOD-1:0] m_ei;

  logic            cell_free_empty, cell_init;
  logic [CA_W-1:0] cell_free_addr, ca_bus;
  logic            rt_in_take, rt_out_take, rt_any;
  logic            nrt_empty, nrt_full, nrt_push, nrt_pop;
  logic [CELL_W-1:0] cell_rdata, nrt_rdata;
  logic            out_rt_q;
  sched_state_e    m_state [NMOD];

  channel_decoder #(.SEL_W(SEL_W)) u_dec (
    .en(in_rt), .sel_bits(in_ch[SEL_W+CH_W-1 -: SEL_W]), .sel(dec)
  );

  idle_addr_fifo #(.DEPTH(N), .AW(CA_W), .FIRST(0), .COUNT(N)) u_cell_free (
    .clk, .rst_n,
    .pop(rt_in_take), .push(rt_out_take), .push_addr(ca_bus),
    .head(cell_free_addr), .empty(cell_free_empty), .init_done(cell_init)
  );

  cell_buffer #(.DEPTH(N), .AW(CA_W), .CELL_W(CELL_W)) u_cells (
    .clk,
    .we(rt_in_take), .waddr(cell_free_addr), .wdata(in_cell),
    .re(rt_out_take), .raddr(ca_bus), .rdata(cell_rdata)
  );

  for (genvar k = 0; k < NMOD; k++) begin : g_mod
    assign m_in_valid[k] = in_valid && dec[k] && !cell_free_empty && init_done;
    assign m_di[k]       = (k == 0) ? DL_W'(cur_time + horizon) : m_do[(k == 0) ? 0 : k-1];
    assign m_ei[k]       = (k == NMOD-1) ? 1'b1 : m_eo[(k == NMOD-1) ? k : k+1];

    link_scheduler #(
      .C(C), .CH_W(CH_W), .DL_W(DL_W), .CA_W(CA_W), .NB(NB), .BA_W(BA_W), .CNT_W(CNT_W)
    ) u_ls (
      .clk, .rst_n,
      .in_valid(m_in_valid[k]), .in_ready(m_in_ready[k]), .in_ack(m_in_ack[k]),
      .in_dl, .in_ch(in_ch[CH_W-1:0]), .in_ca(cell_free_addr),
      .di(m_di[k]), .ei(m_ei[k]), .do_dl(m_do[k]), .eo(m_eo[k]), .sel(m_sel[k]),
      .out_req(out_req), .out_ack(m_out_ack[k]),
      .head_valid(), .head_dl(m_head_dl[k]), .head_ch(m_head_ch[k]),
      .out_ca(m_out_ca[k]),
      .init_done(m_init[k]), .state(m_state[k])
    );
    assign mod_state[k] = m_state[k];
  end

  assign init_done   = cell_init && (&m_init);
  assign rt_in_take  = |m_in_ack;
  assign rt_any      = |m_sel;
  assign rt_out_take = |m_out_ack;

  // selected scheduler's outputs (at most one m_sel bit is set)
  always_comb begin
    ca_bus = '0;
    out_ch = '0;
    out_dl = '0;
    for (int k = 0; k < NMOD; k++) begin
      ca_bus |= m_out_ca[k];
      if (m_sel[k]) begin
        out_ch = {SEL_W'(k), m_head_ch[k]};
        out_dl = m_head_dl[k];
      end
    end
  end

  assign in_ready = init_done && (in_rt ? ((|(dec & m_in_ready)) && !cell_free_empty)
                                        : !nrt_full);
  assign nrt_push = in_valid && !in_rt && init_done && !nrt_full;
  assign nrt_pop  = out_req && init_done && !rt_any && !nrt_empty;

  nrt_fifo #(.DEPTH(NRT_DEPTH), .CELL_W(CELL_W)) u_nrt (
    .clk, .rst_n,
    .push(nrt_push), .wdata(in_cell), .pop(nrt_pop), .rdata(nrt_rdata),
    .empty(nrt_empty), .full(nrt_full)
  );

  assign out_ack   = rt_out_take || nrt_pop;
  assign out_is_rt = rt_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rt_q  <= 1'b0;
    end else begin
      out_valid <= out_ack;
      out_rt_q  <= rt_out_take;
    end
  end

  assign out_cell = out_rt_q ? cell_rdata : nrt_rdata;

  a_one_selected: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(m_sel));

endmodule
