// tb_hma_sram_core: checks the 2-port SRAM core against a word-array model.
// All 64 words are first written, then each cycle applies a random read
// (one-hot read wordline and bitline select) and a random write. The read
// data, taken combinationally before the clock edge, must equal the model
// word, including the old content when the same word is written in that
// cycle; with no read wordline the data must be 0. The model takes the write
// at the clock edge.
module tb_hma_sram_core;
  localparam int unsigned ROWS = 32;

  logic        clk = 0;
  logic [31:0] rwl, wwl;
  logic [1:0]  rblsel, wblsel;
  logic [31:0] rdata, wdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;
  int same_word = 0;

  hma_sram_core dut (.clk, .rwl, .rblsel, .rdata, .wwl, .wblsel, .wdata);

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
    int rw, ww;
    logic do_rd, do_wr;
    rwl = '0; wwl = '0; rblsel = 2'b01; wblsel = 2'b01; wdata = '0;
    // fill every word
    for (int w = 0; w < 64; w++) begin
      @(negedge clk);
      rwl    = '0;
      wwl    = 32'(1) << (w / 2);
      wblsel = 2'(1 << (w % 2));
      wdata  = $urandom;
      model[w] = wdata;
      #1;
      chk(rdata == 0, "no read wordline gives zero");
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rw    = $urandom_range(0, 63);
      ww    = (i % 5 == 0) ? rw : $urandom_range(0, 63);
      do_rd = ($urandom_range(0, 7) != 0);
      do_wr = ($urandom_range(0, 3) != 0);
      rwl    = do_rd ? (32'(1) << (rw / 2)) : '0;
      rblsel = 2'(1 << (rw % 2));
      wwl    = do_wr ? (32'(1) << (ww / 2)) : '0;
      wblsel = 2'(1 << (ww % 2));
      wdata  = $urandom;
      #1;
      if (do_rd && do_wr && rw == ww) same_word++;
      chk(rdata == (do_rd ? model[rw] : 32'h0),
          $sformatf("read word %0d got %h exp %h", rw, rdata, do_rd ? model[rw] : 32'h0));
      @(posedge clk);
      if (do_wr) model[ww] = wdata;
    end
    chk(same_word > 0, "read and write of the same word in one cycle never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
