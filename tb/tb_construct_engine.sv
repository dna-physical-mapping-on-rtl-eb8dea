// tb_construct_engine: self-checking test of construct_engine with four bank
// models.
//
// A random matrix M is written block-interleaved into banks 0/1, a random
// component (rows picked from M, up to 70 rows so several 32-row column words
// are used, random 0/1 pattern per component column) into banks 2/3. Every
// column-set word the engine emits is compared with the value computed here:
// the AND over the component rows of S_row (bit 1) or ~S_row (bit 0).
// Output back-pressure is applied at random in some runs. With the output
// always ready, the run must take ncols*(HB*(ncrows+3) + nblk) cycles from the
// start cycle to 'done' (one row block per cycle, three pipeline drain cycles and one
// cycle per output word in every pass).
module tb_construct_engine;
  import c1p_pkg::*;
  localparam int DEPTH = 16384;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, out_valid, out_ready;
  logic [ROW_W-1:0] ncrows, ncols;
  logic [BLK_W-1:0] nblk;
  logic [31:0] out_data, rdata0, rdata1, rdata2, rdata3;
  bank_req_t req0, req1, req2, req3;
  int checks = 0, failures = 0;

  construct_engine dut (.clk, .rst_n, .start, .ncrows, .ncols, .nblk, .busy, .done,
                        .out_valid, .out_data, .out_ready, .req0, .req1, .req2, .req3,
                        .rdata0, .rdata1, .rdata2, .rdata3);
  sram_bank #(.DEPTH(DEPTH)) bank0 (.clk, .req(req0), .rdata(rdata0));
  sram_bank #(.DEPTH(DEPTH)) bank1 (.clk, .req(req1), .rdata(rdata1));
  sram_bank #(.DEPTH(DEPTH)) bank2 (.clk, .req(req2), .rdata(rdata2));
  sram_bank #(.DEPTH(DEPTH)) bank3 (.clk, .req(req3), .rdata(rdata3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NR = 100;
  logic [31:0] m [NR][128];
  int          idx [128];
  logic        cbit [64][128];   // [component column][component row]

  task automatic run(input int nb, input int nr, input int nc, input bit stall);
    int hb, cw, got, cyc;
    logic [31:0] e;
    hb = (nb + 1) / 2;
    cw = (nr + 31) / 32;
    for (int r = 0; r < NR; r++)
      for (int b = 0; b < nb; b++) begin
        m[r][b] = $urandom | ($urandom & $urandom);
        if (b % 2 == 0) bank0.mem[r * hb + b / 2] = m[r][b];
        else            bank1.mem[r * hb + b / 2] = m[r][b];
      end
    for (int k = 0; k < nr; k++) begin
      idx[k] = $urandom % NR;
      bank3.mem[k] = 32'(idx[k]);
    end
    for (int c = 0; c < nc; c++) begin
      for (int k = 0; k < nr; k++) cbit[c][k] = ($urandom % 4) != 0;
      for (int w = 0; w < cw; w++) begin
        logic [31:0] word;
        word = '0;
        for (int q = 0; q < 32; q++) if (w * 32 + q < nr) word[31 - q] = cbit[c][w * 32 + q];
        bank2.mem[c * cw + w] = word;
      end
    end
    @(negedge clk);
    ncrows = ROW_W'(nr); ncols = ROW_W'(nc); nblk = BLK_W'(nb); start = 1;
    out_ready = !stall || ($urandom % 2 == 0);
    got = 0; cyc = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (out_valid && out_ready) begin
        int c, b;
        c = got / nb; b = got % nb;
        e = '1;
        for (int k = 0; k < nr; k++) e &= cbit[c][k] ? m[idx[k]][b] : ~m[idx[k]][b];
        checks++;
        if (out_data !== e) begin
          failures++;
          $display("FAIL nb=%0d nr=%0d col %0d blk %0d: %h exp %h", nb, nr, c, b, out_data, e);
        end
        got++;
      end
      @(negedge clk);
      cyc++;
      out_ready = !stall || ($urandom % 2 == 0);
    end
    checks++;
    if (got != nc * nb) begin failures++; $display("FAIL words %0d exp %0d", got, nc * nb); end
    if (!stall) begin
      checks++;
      if (cyc != nc * (hb * (nr + 3) + nb)) begin
        failures++;
        $display("FAIL cycles nb=%0d nr=%0d nc=%0d: %0d exp %0d", nb, nr, nc, cyc, nc * (hb * (nr + 3) + nb));
      end
    end
  endtask

  initial begin
    start = 0; ncrows = 0; ncols = 0; nblk = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 1, 1, 0);
    run(2, 2, 3, 0);
    run(3, 32, 5, 0);
    run(4, 33, 4, 1);
    run(7, 70, 6, 0);
    run(8, 64, 3, 1);
    run(16, 5, 10, 0);
    for (int t = 0; t < 10; t++) run(1 + $urandom % 20, 1 + $urandom % 100, 1 + $urandom % 8, t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
