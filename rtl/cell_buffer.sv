// cell_buffer - two-port memory holding the real-time ATM cells.
//
// Cells are written at the address handed out by the cell idle-address FIFO
// and read, one clock later on the output (rdata), at the address the
// scheduler selects for transmission. Writing and reading happen in the same
// cycle through separate ports. CELL_W defaults to one 53-byte ATM cell. The
// registered read port is this implementation's choice.
module cell_buffer #(
  parameter int DEPTH  = 4096,
  parameter int AW     = 12,
  parameter int CELL_W = 424
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [CELL_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [CELL_W-1:0] rdata
);

  logic [CELL_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
