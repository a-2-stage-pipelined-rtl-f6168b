// tb_hma_read_port_conv: checks the 1-to-8 read-port converter. For random
// data and each read-port select (none or one of the 8 SR lines), the
// selected port's line must carry the data and every other line must be 0.
module tb_hma_read_port_conv;
  logic [7:0]       sr;
  logic [31:0]      rdata;
  logic [7:0][31:0] port_line;
  int checks = 0, failures = 0;

  hma_read_port_conv dut (.sr, .rdata, .port_line);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int s = 0; s <= 8; s++) begin
        sr    = (s == 8) ? 8'h00 : 8'(1 << s);
        rdata = $urandom;
        #1;
        for (int p = 0; p < 8; p++) begin
          checks++;
          if (port_line[p] !== ((p == s) ? rdata : 32'h0)) begin
            failures++;
            $display("FAIL s=%0d p=%0d line=%h data=%h", s, p, port_line[p], rdata);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
