// hma_bank_ctrl: bank enable controller, bitline-select decoder and wordline
// predecoder of one bank port (instantiated once for the read port and once
// for the write port of every bank).
//
// In the first pipeline cycle the conflict arbiters send each bank one-hot
// "bank select" lines, one per memory port. This controller picks the
// in-bank word address of the selected port, splits it into a wordline
// (row) address and a bitline-select bit, predecodes the row address into
// two one-hot groups and decodes the bitline select. At the end of the first
// cycle all of this is captured in the stage-1 pipeline register, so that
// the second cycle can start with wordline driver activation. The registered
// port-select lines drive the bank's 1-to-8 port converter (SR1..SR8 on the
// read side).
//
// The document names the block ("bank enable controller & BL dec", one for
// read and one for write) and places control-signal generation and wordline
// predecoding in the first cycle. The address split (word bit 0 selects the
// bitline, the upper bits the wordline), the predecode into a cluster group
// (upper row bits) and a row-in-cluster group (lower row bits) and the
// asynchronous active-low reset are this design's own choices.
//
// Timing: port_sel and addr are sampled at the rising clock edge that ends
// cycle 1; all outputs are registered and valid during cycle 2.
module hma_bank_ctrl #(
  parameter int unsigned N_PORTS       = hma_pkg::N_RD_PORTS,
  parameter int unsigned WL_ROWS       = hma_pkg::WL_ROWS,
  parameter int unsigned COL_MUX       = hma_pkg::COL_MUX,
  parameter int unsigned CELLS_PER_LBL = hma_pkg::CELLS_PER_LBL,
  parameter int unsigned WORD_AW       = $clog2(WL_ROWS * COL_MUX),
  parameter int unsigned N_CLUSTERS    = WL_ROWS / CELLS_PER_LBL
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_PORTS-1:0]              port_sel,   // bank select from the arbiter, one-hot or zero
  input  logic [N_PORTS-1:0][WORD_AW-1:0] addr,       // in-bank word address of every port
  output logic                            en_q,       // bank port active in cycle 2
  output logic [N_PORTS-1:0]              sel_q,      // registered port select (SR lines)
  output logic [N_CLUSTERS-1:0]           pd_hi_q,    // predecoded upper row bits (local cluster)
  output logic [CELLS_PER_LBL-1:0]        pd_lo_q,    // predecoded lower row bits (row in cluster)
  output logic [COL_MUX-1:0]              blsel_q     // decoded bitline select
);

  localparam int unsigned CM_W = (COL_MUX > 1) ? $clog2(COL_MUX) : 1;
  localparam int unsigned LO_W = $clog2(CELLS_PER_LBL);
  localparam int unsigned HI_W = (N_CLUSTERS > 1) ? $clog2(N_CLUSTERS) : 1;

  logic [WORD_AW-1:0]       word;
  logic [CM_W-1:0]          col;
  logic [WORD_AW-CM_W-1:0]  row;
  logic [LO_W-1:0]          row_lo;
  logic [HI_W-1:0]          row_hi;
  logic [N_CLUSTERS-1:0]    pd_hi_d;
  logic [CELLS_PER_LBL-1:0] pd_lo_d;
  logic [COL_MUX-1:0]       blsel_d;

  // Address of the selected port (AND-OR selection on the one-hot select).
  always_comb begin
    word = '0;
    for (int unsigned p = 0; p < N_PORTS; p++)
      if (port_sel[p]) word |= addr[p];
  end

  assign col    = CM_W'(word);
  assign row    = word[WORD_AW-1:CM_W];
  assign row_lo = LO_W'(row);
  assign row_hi = HI_W'(row >> LO_W);

  always_comb begin
    pd_hi_d = '0;
    pd_lo_d = '0;
    blsel_d = '0;
    pd_hi_d[row_hi] = 1'b1;
    pd_lo_d[row_lo] = 1'b1;
    blsel_d[col]    = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q    <= 1'b0;
      sel_q   <= '0;
      pd_hi_q <= '0;
      pd_lo_q <= '0;
      blsel_q <= '0;
    end else begin
      en_q    <= |port_sel;
      sel_q   <= port_sel;
      pd_hi_q <= pd_hi_d;
      pd_lo_q <= pd_lo_d;
      blsel_q <= blsel_d;
    end
  end

endmodule
