// hma_read_network: 3rd and 4th read sensing stages and the output latches
// (the 2nd hierarchy level of the read crossbar).
//
// Every bank drives one read line per memory port, non-zero only for the
// port it serves. The 3rd sensing stage has, in each bank column, one sense
// amplifier per port and bit that collects the lines of the column's banks;
// the 4th stage collects the column results of each port. Both stages are
// wired ORs of precharged lines in the circuit and logical ORs here. The
// final read data of each port is captured in its output latch at the clock
// edge that ends the second pipeline cycle. With conflict-free access at
// most one bank drives a given port, so the OR returns that bank's word.
//
// Bank index b sits in bank column b / BANKS_PER_COL. The two sensing stages
// and their grouping (8 banks per column, 4 columns) follow the document; the
// output register with asynchronous reset stands in for its output latch.
module hma_read_network #(
  parameter int unsigned N_PORTS       = hma_pkg::N_RD_PORTS,
  parameter int unsigned DATA_W        = hma_pkg::DATA_W,
  parameter int unsigned BANKS_PER_COL = hma_pkg::BANKS_PER_COL,
  parameter int unsigned BANK_COLS     = hma_pkg::BANK_COLS,
  parameter int unsigned N_BANKS       = BANKS_PER_COL * BANK_COLS
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic [N_BANKS-1:0][N_PORTS-1:0][DATA_W-1:0]    bank_line,
  output logic [N_PORTS-1:0][DATA_W-1:0]                 col_line [BANK_COLS], // 3rd stage out
  output logic [N_PORTS-1:0][DATA_W-1:0]                 rd_data_q             // output latches
);

  logic [N_PORTS-1:0][DATA_W-1:0] final_line;

  // 3rd sensing stage: one per bank column.
  always_comb begin
    for (int unsigned c = 0; c < BANK_COLS; c++) begin
      col_line[c] = '0;
      for (int unsigned k = 0; k < BANKS_PER_COL; k++)
        col_line[c] |= bank_line[c*BANKS_PER_COL + k];
    end
  end

  // 4th sensing stage: across the bank columns.
  always_comb begin
    final_line = '0;
    for (int unsigned c = 0; c < BANK_COLS; c++)
      final_line |= col_line[c];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_data_q <= '0;
    else        rd_data_q <= final_line;

endmodule
