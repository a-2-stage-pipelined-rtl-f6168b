// tb_hma_conflict_arbiter: exhaustive check of the bank-port arbiter. For all
// 256 request patterns of 8 ports the grant must be the single lowest-numbered
// requesting port (fixed priority), found here by an index search.
module tb_hma_conflict_arbiter;
  localparam int unsigned N = 8;

  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;
  int conflicts = 0;

  hma_conflict_arbiter #(.N_PORTS(N)) dut (.req, .grant);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    int winner;
    for (int r = 0; r < (1 << N); r++) begin
      req = N'(r);
      #1;
      winner = -1;
      for (int p = 0; p < N; p++)
        if (winner < 0 && req[p]) winner = p;
      exp = (winner < 0) ? '0 : (N'(1) << winner);
      if ($countones(req) > 1) conflicts++;
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL req=%b grant=%b exp=%b", req, grant, exp);
      end
    end
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("FAIL no conflicting request pattern applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
