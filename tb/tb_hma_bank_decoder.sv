// tb_hma_bank_decoder: exhaustive check of the per-port bank decoder.
// Every enable/bank combination is applied and the request vector is compared
// with a one-hot value built by shifting, independently of the decoder loop.
module tb_hma_bank_decoder;
  localparam int unsigned N_BANKS = 32;
  localparam int unsigned BANK_AW = 5;

  logic               en;
  logic [BANK_AW-1:0] bank;
  logic [N_BANKS-1:0] req;
  int checks = 0, failures = 0;

  hma_bank_decoder #(.N_BANKS(N_BANKS)) dut (.en, .bank, .req);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_BANKS-1:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int b = 0; b < N_BANKS; b++) begin
        en   = e[0];
        bank = BANK_AW'(b);
        #1;
        exp = e[0] ? (N_BANKS'(1) << b) : '0;
        checks++;
        if (req !== exp) begin
          failures++;
          $display("FAIL en=%0d bank=%0d req=%h exp=%h", e, b, req, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
