// list_ptr_regs - the per-channel tail (WA) and head (RA) registers of the
// linked-list FIFO queues kept in the data buffer.
//
// WA_i is the buffer address where the next cell of channel i will be written;
// RA_i is the buffer address of the oldest cell of channel i waiting in the
// data buffer. Each channel always owns one spare word at WA_i, so after
// reset WA_i = RA_i = i and the data buffer's free list starts at address C.
// An IB operation writes at WA_i and moves WA_i to a fresh address; a BQ
// operation reads at RA_j and moves RA_j to the next-address field it read.
// Both register files have one read and one write port; reads are
// combinational, writes take effect at the rising edge. The register files
// and their roles follow the design; the reset values (one reserved word per
// channel) are this implementation's choice.
module list_ptr_regs #(
  parameter int C    = 256,
  parameter int CH_W = 8,
  parameter int AW   = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CH_W-1:0] wa_ch,
  input  logic            wa_we,
  input  logic [AW-1:0]   wa_d,
  output logic [AW-1:0]   wa_q,
  input  logic [CH_W-1:0] ra_ch,
  input  logic            ra_we,
  input  logic [AW-1:0]   ra_d,
  output logic [AW-1:0]   ra_q
);

  logic [AW-1:0] wa [C];
  logic [AW-1:0] ra [C];

  assign wa_q = wa[wa_ch];
  assign ra_q = ra[ra_ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < C; i++) begin
        wa[i] <= AW'(i);
        ra[i] <= AW'(i);
      end
    end else begin
      if (wa_we) wa[wa_ch] <= wa_d;
      if (ra_we) ra[ra_ch] <= ra_d;
    end
  end

endmodule
