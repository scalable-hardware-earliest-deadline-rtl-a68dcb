// data_buffer - two-port memory that holds the per-channel FIFO queues.
//
// Every word stores one waiting cell: its deadline D, its cell address A and
// the buffer address NA of the next word of the same channel, so each channel's
// queue is a linked list through this memory. One word is written (IB
// operation) and another read (BQ operation) in the same cycle. The read port
// is combinational so that a word read in a cycle can be inserted into the
// EDF queue at the end of that same cycle; the write takes effect at the
// rising edge. The two-port organisation and the D/A/NA word follow the
// design; the asynchronous read port is this implementation's choice.
module data_buffer #(
  parameter int DEPTH = 4096,
  parameter int AW    = 12,
  parameter int DL_W  = 15,
  parameter int CA_W  = 12
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [DL_W-1:0] wdl,
  input  logic [CA_W-1:0] wca,
  input  logic [AW-1:0]   wna,
  input  logic [AW-1:0]   raddr,
  output logic [DL_W-1:0] rdl,
  output logic [CA_W-1:0] rca,
  output logic [AW-1:0]   rna
);

  localparam int W = DL_W + CA_W + AW;
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wdl, wca, wna};
  end

  assign {rdl, rca, rna} = mem[raddr];

endmodule
