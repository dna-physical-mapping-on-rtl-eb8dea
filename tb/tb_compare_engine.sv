// tb_compare_engine: self-checking test of compare_engine with two bank
// models.
//
// A random matrix (rows of 1 to 40 blocks, odd and even counts) is written
// block-interleaved straight into the two bank models. Random row pairs, and
// pairs of a row with itself, are compared in memory mode; relation and count
// are checked against values computed here, and 'done' must be high in the
// cycle 2*ceil(nblk/2)+2 cycles after the start cycle. Stream mode is checked by
// feeding block pairs through ext_* with the banks idle.
module tb_compare_engine;
  import c1p_pkg::*;
  localparam int DEPTH = 8192;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [ROW_W-1:0] row_i, row_j;
  logic [BLK_W-1:0] nblk;
  logic [2:0] rel;
  logic [CNT_W-1:0] count;
  logic ext_clear, ext_valid;
  logic [31:0] ext_d1, ext_d2, rdata0, rdata1;
  bank_req_t req0, req1;
  int checks = 0, failures = 0;

  compare_engine dut (.clk, .rst_n, .start, .row_i, .row_j, .nblk, .busy, .done, .rel, .count,
                      .ext_clear, .ext_valid, .ext_d1, .ext_d2, .req0, .req1, .rdata0, .rdata1);
  sram_bank #(.DEPTH(DEPTH)) bank0 (.clk, .req(req0), .rdata(rdata0));
  sram_bank #(.DEPTH(DEPTH)) bank1 (.clk, .req(req1), .rdata(rdata1));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NR = 64;
  logic [31:0] m [NR][128];

  function automatic void expect_pair(input int i, input int j, input int n,
                                      output logic [2:0] erel, output int ecnt);
    erel = '0; ecnt = 0;
    for (int b = 0; b < n; b++) begin
      if ((m[i][b] & m[j][b]) != 0) erel[2] = 1;
      if ((m[i][b] & ~m[j][b]) != 0) erel[1] = 1;
      if ((m[j][b] & ~m[i][b]) != 0) erel[0] = 1;
      ecnt += $countones(m[i][b] & m[j][b]);
    end
  endfunction

  task automatic load(input int n);
    int hb;
    hb = (n + 1) / 2;
    for (int r = 0; r < NR; r++)
      for (int b = 0; b < n; b++) begin
        m[r][b] = $urandom & $urandom;
        if (r % 7 == 3) m[r][b] = m[r - 1][b] & $urandom;   // subset of previous row
        if (r % 11 == 5) m[r][b] = 0;                         // empty row
        if (b % 2 == 0) bank0.mem[r * hb + b / 2] = m[r][b];
        else            bank1.mem[r * hb + b / 2] = m[r][b];
      end
  endtask

  task automatic cmp(input int i, input int j, input int n);
    logic [2:0] erel;
    int ecnt, cyc;
    expect_pair(i, j, n, erel, ecnt);
    row_i <= ROW_W'(i); row_j <= ROW_W'(j); nblk <= BLK_W'(n); start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done);
    checks++;
    if (rel !== erel || count !== CNT_W'(ecnt)) begin
      failures++;
      $display("FAIL pair %0d,%0d n=%0d: rel=%b exp %b count=%0d exp %0d", i, j, n, rel, erel, count, ecnt);
    end
    checks++;
    if (cyc != 2 * ((n + 1) / 2) + 2) begin
      failures++;
      $display("FAIL latency n=%0d: %0d cycles", n, cyc);
    end
    @(posedge clk);
  endtask

  initial begin
    int sizes [6] = '{1, 2, 7, 16, 33, 40};
    start = 0; row_i = 0; row_j = 0; nblk = 0;
    ext_clear = 0; ext_valid = 0; ext_d1 = 0; ext_d2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (sizes[s]) begin
      load(sizes[s]);
      for (int t = 0; t < 40; t++) cmp($urandom % NR, $urandom % NR, sizes[s]);
      cmp(2, 3, sizes[s]);
      cmp(9, 9, sizes[s]);
      cmp(5, 6, sizes[s]);
    end
    // stream mode: row 10 and 20 of the last matrix, blocks fed directly
    for (int p = 0; p < 2; p++) begin
      logic [2:0] erel;
      int ecnt;
      expect_pair(10 + p, 20, 40, erel, ecnt);
      @(negedge clk);
      ext_clear = 1;
      @(negedge clk);
      ext_clear = 0;
      for (int b = 0; b < 40; b++) begin
        ext_valid = 1; ext_d1 = m[10 + p][b]; ext_d2 = m[20][b];
        @(negedge clk);
        ext_valid = 0;
        if (b % 3 == 0) @(negedge clk);   // gaps in the stream
      end
      @(negedge clk);
      checks++;
      if (rel !== erel || count !== CNT_W'(ecnt)) begin
        failures++;
        $display("FAIL stream: rel=%b exp %b count=%0d exp %0d", rel, erel, count, ecnt);
      end
      checks++;
      if (bank0.reads + bank1.reads == 0) begin failures++; $display("FAIL no bank reads"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
