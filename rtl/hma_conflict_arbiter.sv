// hma_conflict_arbiter: access-conflict arbiter of one bank port.
//
// A bank has a single read port and a single write port, so when several of
// the 8 read (or write) ports address the same bank in one cycle only one of
// them can be served. One arbiter sits on each bank port: it takes the
// request line of every memory port for this bank and grants exactly one of
// them. Arbitration happens in the first half of the first pipeline cycle,
// together with bank decoding, as the document describes. The document does
// not give the policy; this design uses a fixed priority in which the
// lowest-numbered port wins. A rejected port is told so at the output of the
// memory and has to repeat its access.
//
// Interface: req (one bit per memory port), grant (one-hot or zero,
// combinational).
module hma_conflict_arbiter #(
  parameter int unsigned N_PORTS = hma_pkg::N_RD_PORTS
) (
  input  logic [N_PORTS-1:0] req,
  output logic [N_PORTS-1:0] grant
);

  always_comb begin
    grant = '0;
    for (int p = N_PORTS - 1; p >= 0; p--)
      if (req[p]) grant = N_PORTS'(1) << p;
  end

  always_comb begin
    assert ($onehot0(grant)) else $error("conflict arbiter grants more than one port");
    assert ((grant & ~req) == '0) else $error("conflict arbiter grants a port that did not ask");
    assert ((req == '0) || (grant != '0)) else $error("conflict arbiter leaves a requested bank idle");
  end

endmodule
