// hma_sram16p: 16-port (8 read + 8 write), 64-Kbit, 32-bit-word SRAM built as
// a hierarchical multi-port memory: 32 single-read/single-write banks of
// 2 Kbit (8 banks per bank column x 4 bank columns) joined by a distributed
// crossbar, with a 2-cycle access pipeline.
//
// Every port can start one access per clock. An address is ADDR_W bits: the
// upper BANK_AW bits pick the bank, the lower WORD_AW bits the word in the
// bank (of those, bit 0 picks one of the two words on a wordline and the rest
// pick the wordline). Each bank serves one read and one write per cycle, so
// accesses from different ports to different banks, and a read and a write
// to the same bank, proceed in parallel. When two or more read ports (or
// write ports) address the same bank in one cycle, the lowest-numbered port
// is served and the others are rejected; they learn this from rd_conflict /
// wr_conflict and must retry.
//
// Pipeline (latency 2 clocks):
//   cycle 1  the request (rd_en/rd_addr, wr_en/wr_addr/wr_data) is presented.
//            Per-port bank decoders and per-bank conflict arbiters send bank
//            select lines to the banks; the bank controllers predecode the
//            wordline. The clock edge ending cycle 1 captures the bank
//            controls and, in the write unit, the write data of every port.
//   cycle 2  wordlines fire and the banks are read and written; read data
//            travels through the read-port converters and the 3rd and 4th
//            sensing stages. The clock edge ending cycle 2 writes the cells
//            and loads the output latches.
// After that edge rd_data/rd_valid/rd_conflict and wr_done/wr_conflict
// describe the request of cycle 1. A read of a word that is written in the
// same cycle returns the old data; a read presented one cycle after a write
// to the same word returns the new data. rd_data is zero when rd_valid is low.
//
// The bank organisation, crossbar converters, sensing stages and the work
// done in each pipeline cycle follow the document. The address map, the fixed
// port priority, the conflict/done outputs and the reset are this design's
// own choices.
module hma_sram16p #(
  parameter int unsigned N_RD_PORTS    = hma_pkg::N_RD_PORTS,
  parameter int unsigned N_WR_PORTS    = hma_pkg::N_WR_PORTS,
  parameter int unsigned DATA_W        = hma_pkg::DATA_W,
  parameter int unsigned BANKS_PER_COL = hma_pkg::BANKS_PER_COL,
  parameter int unsigned BANK_COLS     = hma_pkg::BANK_COLS,
  parameter int unsigned WL_ROWS       = hma_pkg::WL_ROWS,
  parameter int unsigned COL_MUX       = hma_pkg::COL_MUX,
  parameter int unsigned CELLS_PER_LBL = hma_pkg::CELLS_PER_LBL,
  parameter int unsigned N_BANKS       = BANKS_PER_COL * BANK_COLS,
  parameter int unsigned BANK_AW       = $clog2(N_BANKS),
  parameter int unsigned WORD_AW       = $clog2(WL_ROWS * COL_MUX),
  parameter int unsigned ADDR_W        = BANK_AW + WORD_AW
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // read ports
  input  logic [N_RD_PORTS-1:0]               rd_en,
  input  logic [N_RD_PORTS-1:0][ADDR_W-1:0]   rd_addr,
  output logic [N_RD_PORTS-1:0][DATA_W-1:0]   rd_data,
  output logic [N_RD_PORTS-1:0]               rd_valid,
  output logic [N_RD_PORTS-1:0]               rd_conflict,
  // write ports
  input  logic [N_WR_PORTS-1:0]               wr_en,
  input  logic [N_WR_PORTS-1:0][ADDR_W-1:0]   wr_addr,
  input  logic [N_WR_PORTS-1:0][DATA_W-1:0]   wr_data,
  output logic [N_WR_PORTS-1:0]               wr_done,
  output logic [N_WR_PORTS-1:0]               wr_conflict
);

  // ---------------------------------------------------------------- cycle 1
  logic [N_RD_PORTS-1:0][N_BANKS-1:0] rd_breq;   // [port][bank]
  logic [N_WR_PORTS-1:0][N_BANKS-1:0] wr_breq;
  logic [N_BANKS-1:0][N_RD_PORTS-1:0] rd_req_b;  // [bank][port]
  logic [N_BANKS-1:0][N_WR_PORTS-1:0] wr_req_b;
  logic [N_BANKS-1:0][N_RD_PORTS-1:0] rd_gnt;    // bank select lines
  logic [N_BANKS-1:0][N_WR_PORTS-1:0] wr_gnt;
  logic [N_RD_PORTS-1:0][WORD_AW-1:0] rd_waddr;  // in-bank address buses
  logic [N_WR_PORTS-1:0][WORD_AW-1:0] wr_waddr;

  for (genvar p = 0; p < N_RD_PORTS; p++) begin : g_rd_port
    hma_bank_decoder #(.N_BANKS(N_BANKS), .BANK_AW(BANK_AW)) u_dec (
      .en(rd_en[p]), .bank(rd_addr[p][ADDR_W-1:WORD_AW]), .req(rd_breq[p])
    );
    assign rd_waddr[p] = rd_addr[p][WORD_AW-1:0];
  end

  for (genvar p = 0; p < N_WR_PORTS; p++) begin : g_wr_port
    hma_bank_decoder #(.N_BANKS(N_BANKS), .BANK_AW(BANK_AW)) u_dec (
      .en(wr_en[p]), .bank(wr_addr[p][ADDR_W-1:WORD_AW]), .req(wr_breq[p])
    );
    assign wr_waddr[p] = wr_addr[p][WORD_AW-1:0];
  end

  always_comb begin
    for (int unsigned b = 0; b < N_BANKS; b++) begin
      for (int unsigned p = 0; p < N_RD_PORTS; p++) rd_req_b[b][p] = rd_breq[p][b];
      for (int unsigned p = 0; p < N_WR_PORTS; p++) wr_req_b[b][p] = wr_breq[p][b];
    end
  end

  // Port status of cycle 1: served or rejected by the arbiters.
  logic [N_RD_PORTS-1:0] rd_ok1;
  logic [N_WR_PORTS-1:0] wr_ok1;
  always_comb begin
    rd_ok1 = '0;
    wr_ok1 = '0;
    for (int unsigned b = 0; b < N_BANKS; b++) begin
      rd_ok1 |= rd_gnt[b];
      wr_ok1 |= wr_gnt[b];
    end
  end

  // ---------------------------------------------------------- stage register
  // Write unit: write data of every port, held for cycle 2.
  logic [N_WR_PORTS-1:0][DATA_W-1:0] wr_data_q;
  logic [N_RD_PORTS-1:0] rd_ok2, rd_conf2;
  logic [N_WR_PORTS-1:0] wr_ok2, wr_conf2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_data_q <= '0;
      rd_ok2    <= '0;
      rd_conf2  <= '0;
      wr_ok2    <= '0;
      wr_conf2  <= '0;
    end else begin
      wr_data_q <= wr_data;
      rd_ok2    <= rd_ok1;
      rd_conf2  <= rd_en & ~rd_ok1;
      wr_ok2    <= wr_ok1;
      wr_conf2  <= wr_en & ~wr_ok1;
    end
  end

  // ------------------------------------------------------------------ banks
  logic [N_BANKS-1:0][N_RD_PORTS-1:0][DATA_W-1:0] bank_line;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    hma_conflict_arbiter #(.N_PORTS(N_RD_PORTS)) u_rd_arb (.req(rd_req_b[b]), .grant(rd_gnt[b]));
    hma_conflict_arbiter #(.N_PORTS(N_WR_PORTS)) u_wr_arb (.req(wr_req_b[b]), .grant(wr_gnt[b]));

    hma_bank #(
      .N_RD_PORTS(N_RD_PORTS), .N_WR_PORTS(N_WR_PORTS), .DATA_W(DATA_W),
      .WL_ROWS(WL_ROWS), .COL_MUX(COL_MUX), .CELLS_PER_LBL(CELLS_PER_LBL), .WORD_AW(WORD_AW)
    ) u_bank (
      .clk, .rst_n,
      .rd_sel(rd_gnt[b]), .rd_addr(rd_waddr),
      .wr_sel(wr_gnt[b]), .wr_addr(wr_waddr),
      .wr_data(wr_data_q), .rd_line(bank_line[b])
    );
  end

  // ---------------------------------------------------------------- cycle 2
  logic [N_RD_PORTS-1:0][DATA_W-1:0] col_line [BANK_COLS];

  hma_read_network #(
    .N_PORTS(N_RD_PORTS), .DATA_W(DATA_W),
    .BANKS_PER_COL(BANKS_PER_COL), .BANK_COLS(BANK_COLS)
  ) u_rd_net (
    .clk, .rst_n, .bank_line, .col_line, .rd_data_q(rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid    <= '0;
      rd_conflict <= '0;
      wr_done     <= '0;
      wr_conflict <= '0;
    end else begin
      rd_valid    <= rd_ok2;
      rd_conflict <= rd_conf2;
      wr_done     <= wr_ok2;
      wr_conflict <= wr_conf2;
    end
  end

endmodule
