// tb_row_comparator: self-checking test of row_comparator.
//
// Feeds row pairs of 1 to 128 blocks, one block per cycle, and compares the
// relation bits and intersection count, one cycle after the last block, with
// values computed here from the same rows (set intersection, containment,
// popcount). Rows come from the 8 x 9 example matrix (every pair of its rows,
// with the relations of that example checked as well) and from random data of
// several densities, including empty and identical rows.
module tb_row_comparator;
  logic clk = 0, rst_n = 0;
  logic clear, valid;
  logic [31:0] d1, d2;
  logic [2:0]  rel;
  logic [23:0] count;
  int checks = 0, failures = 0;

  row_comparator dut (.clk, .rst_n, .clear, .valid, .d1, .d2, .rel, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ra [128];
  logic [31:0] rb [128];

  task automatic run_pair(input int n, input string tag);
    logic [2:0] erel;
    int ecnt;
    erel = '0; ecnt = 0;
    for (int b = 0; b < n; b++) begin
      if ((ra[b] & rb[b]) != 0) erel[2] = 1;
      if ((ra[b] & ~rb[b]) != 0) erel[1] = 1;
      if ((rb[b] & ~ra[b]) != 0) erel[0] = 1;
      ecnt += $countones(ra[b] & rb[b]);
    end
    for (int b = 0; b < n; b++) begin
      clear <= (b == 0); valid <= 1; d1 <= ra[b]; d2 <= rb[b];
      @(posedge clk);
    end
    clear <= 0; valid <= 0;
    @(posedge clk);  // result registered one cycle after the last block
    #1;
    checks++;
    if (rel !== erel || count !== 24'(ecnt)) begin
      failures++;
      $display("FAIL %s: rel=%b exp %b count=%0d exp %0d", tag, rel, erel, count, ecnt);
    end
    // results hold while idle
    @(posedge clk); #1;
    checks++;
    if (rel !== erel || count !== 24'(ecnt)) begin
      failures++;
      $display("FAIL %s hold", tag);
    end
  endtask

  // 8 x 9 example matrix: rows l1..l8, column k at bit k-1
  logic [8:0] ex [8] = '{9'b101011011, 9'b111111110, 9'b101011010, 9'b010000100,
                         9'b000100100, 9'b001001000, 9'b001000010, 9'b100011000};

  initial begin
    clear = 0; valid = 0; d1 = 0; d2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // example pairs: edges of the overlap graph are l1-l2, l4-l5, l6-l7, l6-l8
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        bit is_edge, exp_edge;
        ra[0] = 32'(ex[i]); rb[0] = 32'(ex[j]);
        run_pair(1, $sformatf("ex l%0d-l%0d", i + 1, j + 1));
        is_edge  = (rel == 3'b111);
        exp_edge = ((i == 0 && j == 1) || (i == 1 && j == 0) || (i == 3 && j == 4) ||
                    (i == 4 && j == 3) || (i == 5 && j == 6) || (i == 6 && j == 5) ||
                    (i == 5 && j == 7) || (i == 7 && j == 5));
        checks++;
        if (is_edge != exp_edge) begin
          failures++;
          $display("FAIL example edge l%0d-l%0d", i + 1, j + 1);
        end
      end
    // random rows
    for (int t = 0; t < 300; t++) begin
      int n, dens;
      n = 1 + ($urandom % 128);
      dens = $urandom % 4;
      for (int b = 0; b < n; b++) begin
        ra[b] = $urandom; rb[b] = $urandom;
        if (dens == 0) begin ra[b] &= $urandom & $urandom; rb[b] &= $urandom & $urandom; end
        if (dens == 1) rb[b] = ra[b] & $urandom;          // j inside i
        if (dens == 2) begin ra[b] = 0; end               // empty row i
      end
      if (t % 37 == 0) for (int b = 0; b < n; b++) rb[b] = ra[b];
      run_pair(n, $sformatf("random %0d", t));
    end
    // full-density row of 4096 columns: count reaches 4096
    for (int b = 0; b < 128; b++) begin ra[b] = '1; rb[b] = '1; end
    run_pair(128, "full");
    checks++;
    if (count !== 24'd4096) begin failures++; $display("FAIL full count %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
