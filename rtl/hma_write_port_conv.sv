// hma_write_port_conv: 1-to-8 write-port converter of one bank (the bank's
// part of the distributed write crossbar).
//
// The write data of all 8 write ports run past every bank. The converter
// connects the bank's single write port to the data of the one port that
// won this bank's write arbitration, selected by the registered one-hot
// write-port select of the bank controller. It is an AND-OR selector: with
// no port selected its output is 0 and 'active' is low. The document gives
// the block's function; the AND-OR form is this design's choice.
//
// Timing: combinational, second pipeline cycle (the selected word is written
// at the clock edge that ends it).
module hma_write_port_conv #(
  parameter int unsigned N_PORTS = hma_pkg::N_WR_PORTS,
  parameter int unsigned DATA_W  = hma_pkg::DATA_W
) (
  input  logic [N_PORTS-1:0]             sel,        // write-port select, one-hot or zero
  input  logic [N_PORTS-1:0][DATA_W-1:0] port_wdata, // write data of every port
  output logic [DATA_W-1:0]              wdata,      // data for the bank's write port
  output logic                           active
);

  always_comb begin
    wdata = '0;
    for (int unsigned p = 0; p < N_PORTS; p++)
      wdata |= port_wdata[p] & {DATA_W{sel[p]}};
  end

  assign active = |sel;

endmodule
