// idle_addr_fifo - FIFO of free memory addresses (a free list).
//
// After reset the FIFO fills itself with the addresses FIRST, FIRST+1, ...,
// FIRST+COUNT-1, one per clock cycle; init_done rises when that is finished
// (COUNT cycles after reset). From then on pop takes the address at the head
// and push returns an address that is no longer used; both may happen in the
// same cycle. The head address (head) is read combinationally so that it can
// be used as a write address in the very cycle it is popped.
// The self-filling at power-up follows the design's requirement that the
// FIFO start out holding every available address; filling it one address per
// cycle from a counter is this implementation's choice.
module idle_addr_fifo #(
  parameter int DEPTH = 4096,
  parameter int AW    = 12,
  parameter int FIRST = 0,
  parameter int COUNT = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pop,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  output logic [AW-1:0] head,
  output logic          empty,
  output logic          init_done
);

  localparam int PW = $clog2(DEPTH);
  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic          do_pop, do_push;

  assign empty   = (count == '0);
  assign head    = mem[rd_ptr];
  assign do_pop  = pop && init_done && !empty;
  assign do_push = init_done ? push : (count < (PW+1)'(COUNT));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= init_done ? push_addr : AW'(FIRST + int'(count));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      init_done <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
      if (!init_done && count >= (PW+1)'(COUNT - 1) && do_push) init_done <= 1'b1;
      if (!init_done && COUNT == 0) init_done <= 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (init_done && push && !do_pop) |-> (count < (PW+1)'(DEPTH)));

endmodule
