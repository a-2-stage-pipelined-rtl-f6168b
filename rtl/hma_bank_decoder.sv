// hma_bank_decoder: bank decoder of one memory port.
//
// Each of the 16 ports has its own bank decoder in the periphery of the
// memory (the read-side and write-side "bank decoders" of the floorplan). It
// turns the bank field of the port's address into one request line per bank;
// the line of the addressed bank is high when the port is enabled, all lines
// are low otherwise. The decode is purely combinational and is evaluated in
// the first half of the first pipeline cycle, ahead of conflict arbitration.
// The document names the block and its place in the pipeline; the one-hot
// form of its output is this design's choice.
//
// Interface: en (port request), bank (bank index), req (one-hot or zero).
module hma_bank_decoder #(
  parameter int unsigned N_BANKS = hma_pkg::N_BANKS,
  parameter int unsigned BANK_AW = $clog2(N_BANKS)
) (
  input  logic               en,
  input  logic [BANK_AW-1:0] bank,
  output logic [N_BANKS-1:0] req
);

  always_comb begin
    req = '0;
    for (int unsigned b = 0; b < N_BANKS; b++)
      req[b] = en && (BANK_AW'(b) == bank);
  end

endmodule
