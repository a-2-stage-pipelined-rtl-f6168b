// hma_read_port_conv: 1-to-8 read-port converter of one bank (the bank's part
// of the distributed read crossbar).
//
// The bank has one read port but the memory has 8. The converter drives the
// bank's read data onto the sensing line of the memory port whose read-port
// select line SR_p is high: bit i of port line p is SR_p AND data bit i. In
// the circuit this is a domino gate per bit and port that pulls the port's
// 3rd-stage sensing line down only when the data bit is 1, so the lines of
// all banks in a bank column can be wire-ORed; the downstream read network
// models that OR. Lines of unselected ports stay 0. The AND-per-port function
// follows the document; the SR lines come from the registered read-port
// select of the bank controller.
//
// Timing: combinational, second half of the second pipeline cycle.
module hma_read_port_conv #(
  parameter int unsigned N_PORTS = hma_pkg::N_RD_PORTS,
  parameter int unsigned DATA_W  = hma_pkg::DATA_W
) (
  input  logic [N_PORTS-1:0]             sr,        // read-port select, one-hot or zero
  input  logic [DATA_W-1:0]              rdata,     // bank read data
  output logic [N_PORTS-1:0][DATA_W-1:0] port_line  // per-port line to the 3rd sensing stage
);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    assign port_line[p] = rdata & {DATA_W{sr[p]}};
  end

endmodule
