// hma_wl_decoder: final wordline decoder and drivers of one bank (the
// "5 bit WL Dec" shared by the read and the write side).
//
// The bank controllers deliver the row address predecoded into two one-hot
// groups: one line per local cluster of 8 rows and one line per row inside a
// cluster. In the first half of the second pipeline cycle the wordline
// drivers fire: wordline r is the AND of the enable, the cluster line r/8 and
// the in-cluster line r%8. The read wordlines (RWL) and write wordlines (WWL)
// of the 2-port cells are decoded independently from their own controllers.
// The document names the decoder and its timing; the two-group predecode is
// this design's choice.
//
// Interface: *_en, *_pd_hi, *_pd_lo from the stage-1 register; rwl and wwl are
// one-hot (or zero) and combinational.
module hma_wl_decoder #(
  parameter int unsigned WL_ROWS       = hma_pkg::WL_ROWS,
  parameter int unsigned CELLS_PER_LBL = hma_pkg::CELLS_PER_LBL,
  parameter int unsigned N_CLUSTERS    = WL_ROWS / CELLS_PER_LBL
) (
  input  logic                     rd_en,
  input  logic [N_CLUSTERS-1:0]    rd_pd_hi,
  input  logic [CELLS_PER_LBL-1:0] rd_pd_lo,
  input  logic                     wr_en,
  input  logic [N_CLUSTERS-1:0]    wr_pd_hi,
  input  logic [CELLS_PER_LBL-1:0] wr_pd_lo,
  output logic [WL_ROWS-1:0]       rwl,
  output logic [WL_ROWS-1:0]       wwl
);

  for (genvar r = 0; r < WL_ROWS; r++) begin : g_row
    assign rwl[r] = rd_en & rd_pd_hi[r / CELLS_PER_LBL] & rd_pd_lo[r % CELLS_PER_LBL];
    assign wwl[r] = wr_en & wr_pd_hi[r / CELLS_PER_LBL] & wr_pd_lo[r % CELLS_PER_LBL];
  end

endmodule
