// channel_decoder - selects which of 2**SEL_W link schedulers a cell belongs
// to from the top channel-number bits (a 2-to-4 decoder for SEL_W = 2).
// Combinational: sel is one-hot with bit sel_bits set while en is high, and
// all zero while en is low.
module channel_decoder #(
  parameter int SEL_W = 2
) (
  input  logic                 en,
  input  logic [SEL_W-1:0]     sel_bits,
  output logic [2**SEL_W-1:0]  sel
);

  always_comb begin
    sel = '0;
    sel[sel_bits] = en;
  end

endmodule
