// hma_pkg: shared sizes of the hierarchical multi-port memory (HMA), a 16-port
// SRAM built from 2-port banks and a distributed crossbar.
//
// The default organisation follows the document: 8 read and 8 write ports
// (16 ports), 32-bit words, 64 Kbit in 32 banks of 2 Kbit arranged as
// 8 banks per bank column x 4 bank columns. Each bank holds 32 wordlines of
// 2 words each (5-bit wordline decoder, 2:1 bitline select), and each local
// bitline serves 8 cells. The address split (bank field above the in-bank
// word field) is this design's own choice. The modules take these values as
// defaults of their typed parameters; the package itself holds no logic.
package hma_pkg;

  localparam int unsigned N_RD_PORTS    = 8;   // read ports
  localparam int unsigned N_WR_PORTS    = 8;   // write ports
  localparam int unsigned DATA_W        = 32;  // word length
  localparam int unsigned BANKS_PER_COL = 8;   // banks in one bank column
  localparam int unsigned BANK_COLS     = 4;   // bank columns
  localparam int unsigned WL_ROWS       = 32;  // wordlines per bank
  localparam int unsigned COL_MUX       = 2;   // words per wordline (bitline select)
  localparam int unsigned CELLS_PER_LBL = 8;   // cells on one local bitline

  localparam int unsigned N_BANKS    = BANKS_PER_COL * BANK_COLS;   // 32
  localparam int unsigned BANK_WORDS = WL_ROWS * COL_MUX;           // 64
  localparam int unsigned BANK_AW    = $clog2(N_BANKS);             // 5
  localparam int unsigned WORD_AW    = $clog2(BANK_WORDS);          // 6
  localparam int unsigned ADDR_W     = BANK_AW + WORD_AW;           // 11

endpackage
