// tb_hma_bank_ctrl: checks the bank enable controller. Random one-hot (or
// empty) port selects and random per-port addresses are applied; after the
// clock edge the registered enable, port select, predecoded wordline groups
// and bitline select must match values computed from the selected port's
// address by arithmetic (row = word/2, cluster = row/8, row-in-cluster =
// row%8, bitline = word%2). Also checks the reset values and that the
// outputs change only at the clock edge.
module tb_hma_bank_ctrl;
  localparam int unsigned NP = 8;
  localparam int unsigned AW = 6;

  logic               clk = 0, rst_n = 1;
  logic [NP-1:0]      port_sel;
  logic [NP-1:0][AW-1:0] addr;
  logic               en_q;
  logic [NP-1:0]      sel_q;
  logic [3:0]         pd_hi_q;
  logic [7:0]         pd_lo_q;
  logic [1:0]         blsel_q;
  int checks = 0, failures = 0;

  hma_bank_ctrl dut (.clk, .rst_n, .port_sel, .addr, .en_q, .sel_q, .pd_hi_q, .pd_lo_q, .blsel_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int sel_p, word;
    logic [NP-1:0] prev_sel;
    port_sel = '0;
    prev_sel = '0;
    addr = '0;
    #1 rst_n = 0;
    #1;
    chk(en_q == 0 && sel_q == 0 && pd_hi_q == 0 && pd_lo_q == 0 && blsel_q == 0, "reset values");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      sel_p = $urandom_range(0, NP);          // NP means no port selected
      port_sel = (sel_p == NP) ? '0 : (NP'(1) << sel_p);
      for (int p = 0; p < NP; p++) addr[p] = AW'($urandom);
      word = (sel_p == NP) ? 0 : int'(addr[sel_p]);
      #1;
      // nothing may change before the edge
      chk(sel_q == prev_sel, $sformatf("sel_q changed before the clock edge i=%0d", i));
      prev_sel = port_sel;
      @(posedge clk);
      #1;
      chk(en_q == (sel_p != NP), $sformatf("en_q i=%0d", i));
      chk(sel_q == port_sel, $sformatf("sel_q i=%0d", i));
      chk(blsel_q == 2'(1 << (word % 2)), $sformatf("blsel i=%0d word=%0d got %b", i, word, blsel_q));
      chk(pd_hi_q == 4'(1 << ((word / 2) / 8)), $sformatf("pd_hi i=%0d word=%0d got %b", i, word, pd_hi_q));
      chk(pd_lo_q == 8'(1 << ((word / 2) % 8)), $sformatf("pd_lo i=%0d word=%0d got %b", i, word, pd_lo_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
