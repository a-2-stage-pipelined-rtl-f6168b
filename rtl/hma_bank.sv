// hma_bank: one 2-Kbit 2-port bank, the building block of the 1st hierarchy
// level of the hierarchical multi-port memory.
//
// A bank contains a 2-port SRAM core (one read port, one write port), a bank
// controller for each of the two ports, the shared wordline decoder, and the
// bank's slices of the distributed crossbar: a 1-to-8 read-port converter and
// a 1-to-8 write-port converter. Seen from outside, the bank takes one-hot
// bank-select lines for reads and for writes (one bit per memory port, the
// result of conflict arbitration), the in-bank word address of every port,
// and the write data of every port; it returns one read line per memory
// port, all zero except the line of the port it serves.
//
// Timing (2-stage pipeline):
//   cycle 1  rd_sel/wr_sel and the addresses arrive; the bank controllers
//            predecode the wordline and latch everything at the end of the
//            cycle.
//   cycle 2  wordlines fire, the core is read and written; the read data
//            leaves through the read-port converter on rd_line (combinational
//            in cycle 2); wr_data must hold the write data during cycle 2
//            and is written at the clock edge that ends it.
// The bank content follows the document; the interface is this design's.
module hma_bank #(
  parameter int unsigned N_RD_PORTS    = hma_pkg::N_RD_PORTS,
  parameter int unsigned N_WR_PORTS    = hma_pkg::N_WR_PORTS,
  parameter int unsigned DATA_W        = hma_pkg::DATA_W,
  parameter int unsigned WL_ROWS       = hma_pkg::WL_ROWS,
  parameter int unsigned COL_MUX       = hma_pkg::COL_MUX,
  parameter int unsigned CELLS_PER_LBL = hma_pkg::CELLS_PER_LBL,
  parameter int unsigned WORD_AW       = $clog2(WL_ROWS * COL_MUX)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // cycle 1
  input  logic [N_RD_PORTS-1:0]               rd_sel,
  input  logic [N_RD_PORTS-1:0][WORD_AW-1:0]  rd_addr,
  input  logic [N_WR_PORTS-1:0]               wr_sel,
  input  logic [N_WR_PORTS-1:0][WORD_AW-1:0]  wr_addr,
  // cycle 2
  input  logic [N_WR_PORTS-1:0][DATA_W-1:0]   wr_data,
  output logic [N_RD_PORTS-1:0][DATA_W-1:0]   rd_line
);

  localparam int unsigned N_CLUSTERS = WL_ROWS / CELLS_PER_LBL;

  logic                     r_en, w_en, w_active;
  logic [N_RD_PORTS-1:0]    r_sr;
  logic [N_WR_PORTS-1:0]    w_sw;
  logic [N_CLUSTERS-1:0]    r_pd_hi, w_pd_hi;
  logic [CELLS_PER_LBL-1:0] r_pd_lo, w_pd_lo;
  logic [COL_MUX-1:0]       r_blsel, w_blsel;
  logic [WL_ROWS-1:0]       rwl, wwl;
  logic [DATA_W-1:0]        core_rdata, core_wdata;

  hma_bank_ctrl #(
    .N_PORTS(N_RD_PORTS), .WL_ROWS(WL_ROWS), .COL_MUX(COL_MUX),
    .CELLS_PER_LBL(CELLS_PER_LBL), .WORD_AW(WORD_AW)
  ) u_rd_ctrl (
    .clk, .rst_n, .port_sel(rd_sel), .addr(rd_addr),
    .en_q(r_en), .sel_q(r_sr), .pd_hi_q(r_pd_hi), .pd_lo_q(r_pd_lo), .blsel_q(r_blsel)
  );

  hma_bank_ctrl #(
    .N_PORTS(N_WR_PORTS), .WL_ROWS(WL_ROWS), .COL_MUX(COL_MUX),
    .CELLS_PER_LBL(CELLS_PER_LBL), .WORD_AW(WORD_AW)
  ) u_wr_ctrl (
    .clk, .rst_n, .port_sel(wr_sel), .addr(wr_addr),
    .en_q(w_en), .sel_q(w_sw), .pd_hi_q(w_pd_hi), .pd_lo_q(w_pd_lo), .blsel_q(w_blsel)
  );

  hma_wl_decoder #(.WL_ROWS(WL_ROWS), .CELLS_PER_LBL(CELLS_PER_LBL)) u_wl_dec (
    .rd_en(r_en), .rd_pd_hi(r_pd_hi), .rd_pd_lo(r_pd_lo),
    .wr_en(w_en & w_active), .wr_pd_hi(w_pd_hi), .wr_pd_lo(w_pd_lo),
    .rwl, .wwl
  );

  hma_write_port_conv #(.N_PORTS(N_WR_PORTS), .DATA_W(DATA_W)) u_wr_conv (
    .sel(w_sw), .port_wdata(wr_data), .wdata(core_wdata), .active(w_active)
  );

  hma_sram_core #(
    .DATA_W(DATA_W), .WL_ROWS(WL_ROWS), .COL_MUX(COL_MUX), .CELLS_PER_LBL(CELLS_PER_LBL)
  ) u_core (
    .clk, .rwl, .rblsel(r_blsel), .rdata(core_rdata),
    .wwl, .wblsel(w_blsel), .wdata(core_wdata)
  );

  hma_read_port_conv #(.N_PORTS(N_RD_PORTS), .DATA_W(DATA_W)) u_rd_conv (
    .sr(r_sr), .rdata(core_rdata), .port_line(rd_line)
  );

endmodule
