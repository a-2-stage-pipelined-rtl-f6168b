// tb_hma_wl_decoder: checks that the read and write wordlines are the
// decode of the predecoded groups: with cluster line h and row line l set
// and the side enabled, only wordline 8*h+l is high; disabled, none is.
// All 32 rows of both sides are covered, with independent read and write
// rows in each step.
module tb_hma_wl_decoder;
  logic        rd_en, wr_en;
  logic [3:0]  rd_pd_hi, wr_pd_hi;
  logic [7:0]  rd_pd_lo, wr_pd_lo;
  logic [31:0] rwl, wwl;
  int checks = 0, failures = 0;

  hma_wl_decoder dut (.rd_en, .rd_pd_hi, .rd_pd_lo, .wr_en, .wr_pd_hi, .wr_pd_lo, .rwl, .wwl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wr_row;
    for (int e = 0; e < 4; e++) begin
      for (int r = 0; r < 32; r++) begin
        wr_row   = (r * 7 + 3) % 32;
        rd_en    = e[0];
        wr_en    = e[1];
        rd_pd_hi = 4'(1 << (r / 8));
        rd_pd_lo = 8'(1 << (r % 8));
        wr_pd_hi = 4'(1 << (wr_row / 8));
        wr_pd_lo = 8'(1 << (wr_row % 8));
        #1;
        checks++;
        if (rwl !== (e[0] ? (32'(1) << r) : 32'(0))) begin
          failures++;
          $display("FAIL rwl r=%0d en=%0d got %h", r, e[0], rwl);
        end
        checks++;
        if (wwl !== (e[1] ? (32'(1) << wr_row) : 32'(0))) begin
          failures++;
          $display("FAIL wwl r=%0d en=%0d got %h", wr_row, e[1], wwl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
