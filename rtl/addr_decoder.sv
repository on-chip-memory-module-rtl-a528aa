// addr_decoder: binary address to one-hot select lines.
//
// This is the decoder used throughout the memories: the row decoder and the
// per-port column decoders of the concurrent line-access array, and the
// predecoders (level-one index and level-two select) of the block-access
// memory. When en is low, or the address is N or above, no line is selected.
//
// Interface: en, addr[AW-1:0] in; sel[N-1:0] out. Purely combinational.
// The enable and the out-of-range behaviour are this design's choice.
module addr_decoder #(
  parameter int unsigned N  = 256,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  sel
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      sel[i] = en && (addr == AW'(i));
    end
  end

endmodule
