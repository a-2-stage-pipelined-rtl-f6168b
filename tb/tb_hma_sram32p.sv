// tb_hma_sram32p: the end-to-end test of tb_hma_sram16p run on the same
// memory scaled to 32 ports (16 read + 16 write) over the default 32 banks,
// the port count at which the architecture is expected to pass 1 Tbit/s of
// random-access bandwidth (32 x 32 bit per cycle at about 1.16 GHz). Only
// the two port-count parameters of the top are changed; everything else is
// at its default. The checks, phases and event counts are those of the
// 16-port test: fill, isolated-read latency (2 cycles), conflict-free cycles
// with all 32 ports served, and random traffic on few banks with read and
// write conflicts and reads of words written in the same cycle.
module tb_hma_sram32p;
  import hma_pkg::*;

  localparam int unsigned NR = 16;
  localparam int unsigned NW = 16;
  localparam int unsigned NB = N_BANKS;
  localparam int unsigned NWORDS = N_BANKS * BANK_WORDS;

  typedef struct {
    logic [NR-1:0]     rd_valid;
    logic [NR-1:0]     rd_conflict;
    logic [DATA_W-1:0] rd_data [NR];
    logic [NW-1:0]     wr_done;
    logic [NW-1:0]     wr_conflict;
  } result_t;

  logic clk = 0, rst_n = 1;
  logic [NR-1:0]             rd_en;
  logic [NR-1:0][ADDR_W-1:0] rd_addr;
  logic [NR-1:0][DATA_W-1:0] rd_data;
  logic [NR-1:0]             rd_valid, rd_conflict;
  logic [NW-1:0]             wr_en;
  logic [NW-1:0][ADDR_W-1:0] wr_addr;
  logic [NW-1:0][DATA_W-1:0] wr_data;
  logic [NW-1:0]             wr_done, wr_conflict;

  hma_sram16p #(.N_RD_PORTS(NR), .N_WR_PORTS(NW)) dut (.*);

  always #5 clk = ~clk;

  logic [DATA_W-1:0] model [NWORDS];
  result_t exp1, exp2;        // predictions of the previous and the one before
  logic    exp1_ok = 0, exp2_ok = 0;
  int checks = 0, failures = 0;
  int n_rd_conflict = 0, n_wr_conflict = 0, n_same_bank_rw = 0, n_same_word_rw = 0;
  int n_full_bw = 0, n_latency_ok = 0, n_reads = 0, n_writes = 0;

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
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic int bank_of(input logic [ADDR_W-1:0] a);
    return int'(a) / BANK_WORDS;
  endfunction

  // Predict the outcome of the request now on the ports and update the model.
  function automatic result_t predict();
    result_t r;
    logic [NB-1:0] rd_taken = '0, wr_taken = '0;
    int rd_bank_srv [NB];
    r.rd_valid = '0; r.rd_conflict = '0; r.wr_done = '0; r.wr_conflict = '0;
    for (int p = 0; p < NR; p++) r.rd_data[p] = '0;
    for (int b = 0; b < NB; b++) rd_bank_srv[b] = -1;
    for (int p = 0; p < NR; p++) begin
      if (!rd_en[p]) continue;
      if (rd_taken[bank_of(rd_addr[p])]) begin
        r.rd_conflict[p] = 1;
        n_rd_conflict++;
      end else begin
        rd_taken[bank_of(rd_addr[p])] = 1;
        rd_bank_srv[bank_of(rd_addr[p])] = p;
        r.rd_valid[p] = 1;
        r.rd_data[p]  = model[rd_addr[p]];
        n_reads++;
      end
    end
    for (int p = 0; p < NW; p++) begin
      if (!wr_en[p]) continue;
      if (wr_taken[bank_of(wr_addr[p])]) begin
        r.wr_conflict[p] = 1;
        n_wr_conflict++;
      end else begin
        wr_taken[bank_of(wr_addr[p])] = 1;
        r.wr_done[p] = 1;
        n_writes++;
        if (rd_bank_srv[bank_of(wr_addr[p])] >= 0) begin
          n_same_bank_rw++;
          if (rd_addr[rd_bank_srv[bank_of(wr_addr[p])]] == wr_addr[p]) n_same_word_rw++;
        end
      end
    end
    for (int p = 0; p < NW; p++)
      if (r.wr_done[p]) model[wr_addr[p]] = wr_data[p];
    if (&r.rd_valid && &r.wr_done) n_full_bw++;
    return r;
  endfunction

  // Compare outputs with the prediction made two cycles ago.
  task automatic compare(input result_t e, input int cyc);
    chk(rd_valid == e.rd_valid, $sformatf("cyc %0d rd_valid %b exp %b", cyc, rd_valid, e.rd_valid));
    chk(rd_conflict == e.rd_conflict, $sformatf("cyc %0d rd_conflict %b exp %b", cyc, rd_conflict, e.rd_conflict));
    chk(wr_done == e.wr_done, $sformatf("cyc %0d wr_done %b exp %b", cyc, wr_done, e.wr_done));
    chk(wr_conflict == e.wr_conflict, $sformatf("cyc %0d wr_conflict %b exp %b", cyc, wr_conflict, e.wr_conflict));
    for (int p = 0; p < NR; p++)
      chk(rd_data[p] == (e.rd_valid[p] ? e.rd_data[p] : '0),
          $sformatf("cyc %0d port %0d rd_data %h exp %h", cyc, p, rd_data[p], e.rd_data[p]));
  endtask

  // One clock of traffic: check the outputs, then present the request that
  // the caller has put on the ports and record its prediction.
  int cyc = 0;
  task automatic step();
    result_t e;
    e = predict();
    @(posedge clk);
    exp2 = exp1; exp2_ok = exp1_ok;
    exp1 = e;    exp1_ok = 1;
    @(negedge clk);
    #1;
    if (exp2_ok) compare(exp2, cyc);
    cyc++;
  endtask

  task automatic idle_ports();
    rd_en = '0; wr_en = '0;
    for (int p = 0; p < NR; p++) rd_addr[p] = ADDR_W'($urandom);
    for (int p = 0; p < NW; p++) begin
      wr_addr[p] = ADDR_W'($urandom);
      wr_data[p] = $urandom;
    end
  endtask

  initial begin
    int lat;
    logic [NB-1:0] used;
    int b, w;
    idle_ports();
    #1 rst_n = 0;
    @(negedge clk) rst_n = 1;
    #1;

    // 1. fill all words, 8 writes per cycle to 8 different banks
    for (int i = 0; i < NWORDS / NW; i++) begin
      idle_ports();
      wr_en = '1;
      for (int p = 0; p < NW; p++) begin
        w = i * NW + p;
        wr_addr[p] = ADDR_W'((w % NB) * BANK_WORDS + w / NB);
      end
      step();
    end
    idle_ports();
    step();
    step();

    // 2. latency of an isolated read on port 3
    rd_en[3] = 1;
    rd_addr[3] = ADDR_W'(1234);
    step();
    idle_ports();
    lat = 1;
    while (!rd_valid[3] && lat < 10) begin
      step();
      lat++;
    end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("FAIL read latency %0d cycles, expected 2", lat);
    end else n_latency_ok++;
    step();

    // 3. conflict-free cycles: every port to its own bank, 32 accesses per cycle
    for (int i = 0; i < 200; i++) begin
      idle_ports();
      rd_en = '1; wr_en = '1;
      used = '0;
      for (int p = 0; p < NR; p++) begin
        do b = $urandom_range(0, NB - 1); while (used[b]);
        used[b] = 1;
        rd_addr[p] = ADDR_W'(b * BANK_WORDS + $urandom_range(0, BANK_WORDS - 1));
      end
      used = '0;
      for (int p = 0; p < NW; p++) begin
        do b = $urandom_range(0, NB - 1); while (used[b]);
        used[b] = 1;
        wr_addr[p] = ADDR_W'(b * BANK_WORDS + $urandom_range(0, BANK_WORDS - 1));
      end
      step();
    end

    // 4. random traffic, often on a few banks, with read/write address overlap
    for (int i = 0; i < 3000; i++) begin
      int span;
      idle_ports();
      span = (i % 3 == 0) ? 4 : NB;
      for (int p = 0; p < NR; p++) begin
        rd_en[p]   = ($urandom_range(0, 3) != 0);
        rd_addr[p] = ADDR_W'($urandom_range(0, span - 1) * BANK_WORDS + $urandom_range(0, 3));
      end
      for (int p = 0; p < NW; p++) begin
        wr_en[p]   = ($urandom_range(0, 3) != 0);
        wr_addr[p] = ADDR_W'($urandom_range(0, span - 1) * BANK_WORDS + $urandom_range(0, 3));
      end
      if (i % 5 == 0) wr_addr[$urandom_range(0, NW - 1)] = rd_addr[$urandom_range(0, NR - 1)];
      step();
    end
    idle_ports();
    step();
    step();

    $display("count: reads=%0d writes=%0d read_conflicts=%0d write_conflicts=%0d", n_reads, n_writes,
             n_rd_conflict, n_wr_conflict);
    $display("count: same_bank_read_write=%0d same_word_read_write=%0d full_32_port_cycles=%0d latency_checks=%0d",
             n_same_bank_rw, n_same_word_rw, n_full_bw, n_latency_ok);
    chk(n_rd_conflict > 0, "no read conflict happened");
    chk(n_wr_conflict > 0, "no write conflict happened");
    chk(n_same_bank_rw > 0, "no read and write in one bank in one cycle");
    chk(n_same_word_rw > 0, "no read of a word written in the same cycle");
    chk(n_full_bw > 0, "no cycle with all 32 ports served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
