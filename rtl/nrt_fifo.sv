// nrt_fifo - first-in first-out cell buffer for non-real-time (best-effort)
// cells. A cell is written when push is high and full is low; pop (ignored
// when empty) reads the oldest cell, which appears on rdata one clock later.
// Push and pop may happen in the same cycle. The depth is this
// implementation's choice.
module nrt_fifo #(
  parameter int DEPTH  = 1024,
  parameter int CELL_W = 424
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [CELL_W-1:0] wdata,
  input  logic              pop,
  output logic [CELL_W-1:0] rdata,
  output logic              empty,
  output logic              full
);

  localparam int PW = $clog2(DEPTH);
  logic [CELL_W-1:0] mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic [PW:0]       count;
  logic              do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
    if (do_pop)  rdata <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
