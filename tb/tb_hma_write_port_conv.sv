// tb_hma_write_port_conv: checks the 1-to-8 write-port converter. For random
// write data on all 8 ports and each select (none or one port), the output
// must be the selected port's data (0 with no selection) and 'active' must
// tell whether a port is selected.
module tb_hma_write_port_conv;
  logic [7:0]       sel;
  logic [7:0][31:0] port_wdata;
  logic [31:0]      wdata;
  logic             active;
  int checks = 0, failures = 0;

  hma_write_port_conv dut (.sel, .port_wdata, .wdata, .active);

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
        sel = (s == 8) ? 8'h00 : 8'(1 << s);
        for (int p = 0; p < 8; p++) port_wdata[p] = $urandom;
        #1;
        checks++;
        if (wdata !== ((s == 8) ? 32'h0 : port_wdata[s])) begin
          failures++;
          $display("FAIL s=%0d wdata=%h", s, wdata);
        end
        checks++;
        if (active !== (s != 8)) begin
          failures++;
          $display("FAIL s=%0d active=%b", s, active);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
