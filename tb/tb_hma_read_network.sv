// tb_hma_read_network: checks the 3rd/4th sensing stages and output latches.
// Each cycle every port is given at most one driving bank (random), whose
// line carries random data for that port while all other lines stay 0.
// The bank-column outputs must show the data in the driving bank's column
// only, and one clock edge later the output latch of the port must hold it
// (0 for a port with no driver).
module tb_hma_read_network;
  localparam int unsigned NP = 8, NB = 32, BPC = 8, NC = 4;

  logic clk = 0, rst_n = 1;
  logic [NB-1:0][NP-1:0][31:0] bank_line;
  logic [NP-1:0][31:0]         col_line [NC];
  logic [NP-1:0][31:0]         rd_data_q;
  int checks = 0, failures = 0;

  hma_read_network dut (.clk, .rst_n, .bank_line, .col_line, .rd_data_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    int src [NP];
    logic [31:0] val [NP];
    bank_line = '0;
    #1 rst_n = 0;
    #1;
    chk(rd_data_q == '0, "reset value");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      bank_line = '0;
      for (int p = 0; p < NP; p++) begin
        src[p] = $urandom_range(0, NB);           // NB means no bank drives p
        val[p] = $urandom;
        if (src[p] < NB) bank_line[src[p]][p] = val[p];
      end
      #1;
      for (int c = 0; c < NC; c++)
        for (int p = 0; p < NP; p++)
          chk(col_line[c][p] == ((src[p] < NB && src[p] / BPC == c) ? val[p] : 32'h0),
              $sformatf("column %0d port %0d", c, p));
      @(posedge clk);
      #1;
      for (int p = 0; p < NP; p++)
        chk(rd_data_q[p] == ((src[p] < NB) ? val[p] : 32'h0),
            $sformatf("latch port %0d got %h exp %h", p, rd_data_q[p], val[p]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
