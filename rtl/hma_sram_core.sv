// hma_sram_core: 2-Kbit 2-port SRAM core of one bank (8-transistor cells with
// a separate read port and write port).
//
// Organisation: WL_ROWS wordlines, each holding COL_MUX words of DATA_W bits
// (by default 32 rows x 2 words x 32 bits = 2 Kbit). Word m, bit i sits on
// physical column i*COL_MUX+m, so the two words of a row use neighbouring
// global bitlines and a bitline select picks one of them.
//
// Read path (hierarchical sensing): the rows are grouped into local clusters
// of CELLS_PER_LBL cells that share a local read bitline (1st sensing stage);
// the local clusters of a column share a global read bitline (2nd sensing
// stage); the bitline select (RBLSel) then chooses the word. In the circuit
// the bitlines are precharged and pulled down; here each stage is the logical
// OR of the cells or clusters it collects, which gives the selected word when
// exactly one read wordline is high and zero when none is. The read is
// combinational from the read wordlines, as in the first half of the second
// pipeline cycle.
//
// Write path: the write buffers drive the word selected by WBLSel on the row
// whose write wordline is high; the cell is updated at the rising clock edge
// that ends the second pipeline cycle. Because the read and write ports are
// independent, a read and a write in the same cycle do not disturb each
// other; a read of the very word being written returns the old content.
//
// The cluster sizes and the 2-stage sensing follow the document; the exact
// column interleaving and the read-old-data rule are this design's own
// choices. The cells are not reset, as in a real SRAM.
module hma_sram_core #(
  parameter int unsigned DATA_W        = hma_pkg::DATA_W,
  parameter int unsigned WL_ROWS       = hma_pkg::WL_ROWS,
  parameter int unsigned COL_MUX       = hma_pkg::COL_MUX,
  parameter int unsigned CELLS_PER_LBL = hma_pkg::CELLS_PER_LBL,
  parameter int unsigned N_CLUSTERS    = WL_ROWS / CELLS_PER_LBL
) (
  input  logic                     clk,
  input  logic [WL_ROWS-1:0]       rwl,      // read wordlines, one-hot or zero
  input  logic [COL_MUX-1:0]       rblsel,   // read bitline select, one-hot
  output logic [DATA_W-1:0]        rdata,    // read data after the 2nd sensing stage
  input  logic [WL_ROWS-1:0]       wwl,      // write wordlines, one-hot or zero
  input  logic [COL_MUX-1:0]       wblsel,   // write bitline select, one-hot
  input  logic [DATA_W-1:0]        wdata
);

  localparam int unsigned LO_W  = $clog2(CELLS_PER_LBL);
  localparam int unsigned ROW_W = $clog2(WL_ROWS);
  localparam int unsigned CM_W  = (COL_MUX > 1) ? $clog2(COL_MUX) : 1;

  logic [COL_MUX-1:0][DATA_W-1:0] mem [WL_ROWS];

  // 1st sensing stage: one local read bitline set per cluster.
  logic [N_CLUSTERS-1:0][COL_MUX-1:0][DATA_W-1:0] lbl;
  // 2nd sensing stage: global read bitlines.
  logic [COL_MUX-1:0][DATA_W-1:0] gbl;

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cluster
    logic [CELLS_PER_LBL-1:0] cl_wl;
    logic [LO_W-1:0]          cl_row;
    assign cl_wl = rwl[c*CELLS_PER_LBL +: CELLS_PER_LBL];
    always_comb begin
      cl_row = '0;
      for (int unsigned k = 0; k < CELLS_PER_LBL; k++)
        if (cl_wl[k]) cl_row |= LO_W'(k);
    end
    assign lbl[c] = (|cl_wl) ? mem[c*CELLS_PER_LBL + int'(cl_row)] : '0;
  end

  always_comb begin
    gbl = '0;
    for (int unsigned c = 0; c < N_CLUSTERS; c++)
      gbl |= lbl[c];
  end

  always_comb begin
    rdata = '0;
    for (int unsigned m = 0; m < COL_MUX; m++)
      if (rblsel[m]) rdata |= gbl[m];
  end

  // Write port: encode the one-hot write wordline and bitline select.
  logic [ROW_W-1:0] w_row;
  logic [CM_W-1:0]  w_col;
  always_comb begin
    w_row = '0;
    for (int unsigned r = 0; r < WL_ROWS; r++)
      if (wwl[r]) w_row |= ROW_W'(r);
    w_col = '0;
    for (int unsigned m = 0; m < COL_MUX; m++)
      if (wblsel[m]) w_col |= CM_W'(m);
  end

  always_ff @(posedge clk)
    if ((|wwl) && (|wblsel)) mem[w_row][w_col] <= wdata;

  // At most one wordline per port may fire, checked at every clock edge.
  a_rwl_onehot: assert property (@(posedge clk) $onehot0(rwl))
    else $error("more than one read wordline active");
  a_wwl_onehot: assert property (@(posedge clk) $onehot0(wwl))
    else $error("more than one write wordline active");

endmodule
