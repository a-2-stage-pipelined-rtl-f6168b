// tb_hma_bank: checks one 2-Kbit bank through its pipeline against a 64-word
// model. Cycle 1 of an access presents the bank-select lines and addresses;
// in cycle 2 the write data is presented and the read line of the selected
// port must carry the addressed word (all other port lines 0); the write
// lands at the edge ending cycle 2. Random reads and writes from random
// ports overlap every cycle, so a read in cycle 2 must see the writes of all
// earlier accesses but not the write issued in the same cycle.
module tb_hma_bank;
  localparam int unsigned NP = 8;

  logic clk = 0, rst_n = 1;
  logic [NP-1:0]         rd_sel, wr_sel;
  logic [NP-1:0][5:0]    rd_addr, wr_addr;
  logic [NP-1:0][31:0]   wr_data, rd_line;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  int same_word = 0, reads = 0;

  hma_bank dut (.clk, .rst_n, .rd_sel, .rd_addr, .wr_sel, .wr_addr, .wr_data, .rd_line);

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
    int pr_port = NP, pr_word = 0;   // read in cycle 2 (NP = none)
    int pw_port = NP, pw_word = 0;   // write in cycle 2
    int nr_port, nr_word, nw_port, nw_word;
    logic [31:0] pw_data;
    rd_sel = '0; wr_sel = '0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // cycle 2 of the previous access: check the read line
      #1;
      for (int p = 0; p < NP; p++)
        chk(rd_line[p] == ((p == pr_port) ? model[pr_word] : 32'h0),
            $sformatf("i=%0d port %0d line %h exp %h", i, p, rd_line[p],
                      (p == pr_port) ? model[pr_word] : 32'h0));
      if (pr_port < NP) reads++;
      // cycle 2 write data
      for (int p = 0; p < NP; p++) wr_data[p] = $urandom;
      pw_data = (pw_port < NP) ? wr_data[pw_port] : 32'h0;
      // next access, cycle 1
      for (int p = 0; p < NP; p++) begin
        rd_addr[p] = 6'($urandom);
        wr_addr[p] = 6'($urandom);
      end
      if (i < 64) begin                  // fill every word first
        nr_port = NP;
        nw_port = i % NP;
        wr_addr[nw_port] = 6'(i);
      end else begin
        nr_port = $urandom_range(0, NP);
        nw_port = $urandom_range(0, NP);
        if (i % 7 == 0 && nr_port < NP && nw_port < NP) wr_addr[nw_port] = rd_addr[nr_port];
      end
      nr_word = (nr_port < NP) ? int'(rd_addr[nr_port]) : 0;
      nw_word = (nw_port < NP) ? int'(wr_addr[nw_port]) : 0;
      if (nr_port < NP && nw_port < NP && nr_word == nw_word) same_word++;
      rd_sel = (nr_port < NP) ? (NP'(1) << nr_port) : '0;
      wr_sel = (nw_port < NP) ? (NP'(1) << nw_port) : '0;
      @(posedge clk);
      if (pw_port < NP) model[pw_word] = pw_data;
      pr_port = nr_port; pr_word = nr_word;
      pw_port = nw_port; pw_word = nw_word;
    end
    chk(reads > 1000, "too few reads");
    chk(same_word > 0, "read and write of the same word never overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
