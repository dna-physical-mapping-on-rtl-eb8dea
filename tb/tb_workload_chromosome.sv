// tb_workload_chromosome: the two chromosome-sized workloads, 3,285 and
// 2,881 clones x 4,096 probes, on the accelerator at its default parameters.
//
// For each data set an interval-structured random matrix of the full size is
// generated and loaded into the 2 MB bank models, a batch of demand
// comparisons is checked, and a complete comparison is run on the first 600
// rows (the full one, millions of pairs, is too long to simulate here) with
// every returned record checked. With the output always ready, the complete
// comparison must take 2*64+4 cycles per pair plus one per returned record.
// From that rate the time for the full pair count of the data set
// (n(n-1)/2) at a 50 MHz clock is projected and must lie within 5% of the
// FPGA time reported for the two-comparator hardware (13.92 s for 5,393,970
// pairs, 10.70 s for 4,148,640 pairs).
module tb_workload_chromosome;
  import c1p_pkg::*;
  localparam int DEPTH = 524288;  // 2 MB banks
  localparam int NR    = 3285;    // largest data set: clones
  localparam int NB    = 128;     // 4096 probes
  localparam int NSLICE = 600;    // rows of the timed complete comparison

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [31:0] in_data, out_data, words_sent;
  bank_req_t [NBANKS-1:0] bank_req;
  logic [NBANKS-1:0][31:0] bank_rdata;
  int checks = 0, failures = 0;

  c1p_accel dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
                 .bank_req, .bank_rdata, .busy, .words_sent);

  for (genvar g = 0; g < NBANKS; g++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH)) bank (.clk, .req(bank_req[g]), .rdata(bank_rdata[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (120000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host link ----------------
  logic [31:0] tx_q [$];
  logic [31:0] exp_q [$];
  bit stall_in = 1, stall_out = 1;
  int n_rx_stall = 0, n_tx_stall = 0, n_words_rx = 0;

  always @(negedge clk) begin
    in_valid  <= (tx_q.size() > 0) && (!stall_in || ($urandom % 4 != 0));
    in_data   <= (tx_q.size() > 0) ? tx_q[0] : '0;
    out_ready <= !stall_out || ($urandom % 3 != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(tx_q.pop_front());
    if (in_valid && !in_ready) n_rx_stall++;
    if (out_valid && !out_ready) n_tx_stall++;
    if (out_valid && out_ready) begin
      logic [31:0] e;
      n_words_rx++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", out_data);
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e) begin
          failures++;
          $display("FAIL word %h exp %h", out_data, e);
        end
      end
    end
  end

  task automatic wait_done();
    int quiet;
    quiet = 0;
    while (quiet < 8) begin
      @(posedge clk);
      if (tx_q.size() == 0 && exp_q.size() == 0 && !busy && !in_valid) quiet++;
      else quiet = 0;
    end
  endtask

  function automatic logic [31:0] hdr(input opcode_e op, input int a, input int b);
    return {op, ROW_W'(a), ROW_W'(b)};
  endfunction

  // ---------------- reference model ----------------
  logic [31:0] gm [NR][128];
  int cur_rows, cur_nb;
  int n_demand = 0, n_complete = 0, n_filtered = 0, n_stream = 0, n_setwords = 0;
  int n_edge = 0, n_subset = 0, n_disjoint = 0;

  function automatic void ref_pair(input int i, input int j, output logic [2:0] rel, output int cnt);
    rel = '0; cnt = 0;
    for (int b = 0; b < cur_nb; b++) begin
      if ((gm[i][b] & gm[j][b]) != 0) rel[2] = 1;
      if ((gm[i][b] & ~gm[j][b]) != 0) rel[1] = 1;
      if ((gm[j][b] & ~gm[i][b]) != 0) rel[0] = 1;
      cnt += $countones(gm[i][b] & gm[j][b]);
    end
  endfunction

  function automatic void count_rel(input logic [2:0] rel);
    if (!rel[2]) n_disjoint++;
    else if (rel == 3'b111) n_edge++;
    else n_subset++;
  endfunction

  task automatic load_m(input int rows, input int nb);
    cur_rows = rows; cur_nb = nb;
    tx_q.push_back(hdr(OP_LOAD_M, rows, nb));
    for (int r = 0; r < rows; r++)
      for (int b = 0; b < nb; b++) tx_q.push_back(gm[r][b]);
  endtask

  task automatic cmp_pair(input int i, input int j);
    logic [2:0] rel;
    int cnt;
    ref_pair(i, j, rel, cnt);
    count_rel(rel);
    tx_q.push_back(hdr(OP_CMP_PAIR, i, j));
    exp_q.push_back({TAG_PAIR, ROW_W'(i), ROW_W'(j)});
    exp_q.push_back({5'd0, rel, CNT_W'(cnt)});
    n_demand++;
  endtask

  // returns the number of records expected
  task automatic cmp_all(output int nrec);
    logic [2:0] rel;
    int cnt;
    nrec = 0;
    tx_q.push_back(hdr(OP_CMP_ALL, 0, 0));
    for (int i = 0; i < cur_rows; i++)
      for (int j = i + 1; j < cur_rows; j++) begin
        ref_pair(i, j, rel, cnt);
        count_rel(rel);
        n_complete++;
        if (rel[2]) begin
          exp_q.push_back({TAG_PAIR, ROW_W'(i), ROW_W'(j)});
          exp_q.push_back({5'd0, rel, CNT_W'(cnt)});
          nrec++;
        end else n_filtered++;
      end
    exp_q.push_back({TAG_DONE, 28'(nrec)});
  endtask

  // component: rows cidx[0..nr-1] of M, bits cb[c][k]
  int   cidx [128];
  logic cb [64][128];
  task automatic construct(input int nr, input int nc);
    int cw;
    logic [31:0] e;
    cw = (nr + 31) / 32;
    tx_q.push_back(hdr(OP_LOAD_COMP, nr, nc));
    for (int k = 0; k < nr; k++) tx_q.push_back(32'(cidx[k]));
    for (int c = 0; c < nc; c++)
      for (int w = 0; w < cw; w++) begin
        logic [31:0] word;
        word = '0;
        for (int q = 0; q < 32; q++) if (w * 32 + q < nr) word[31 - q] = cb[c][w * 32 + q];
        tx_q.push_back(word);
      end
    tx_q.push_back(hdr(OP_CONSTRUCT, 0, 0));
    for (int c = 0; c < nc; c++)
      for (int b = 0; b < cur_nb; b++) begin
        e = '1;
        for (int k = 0; k < nr; k++) e &= cb[c][k] ? gm[cidx[k]][b] : ~gm[cidx[k]][b];
        exp_q.push_back(e);
        n_setwords++;
      end
    exp_q.push_back({TAG_DONE, 28'(nc * cur_nb)});
  endtask

  task automatic cmp_stream(input int i, input int j);
    logic [2:0] rel;
    int cnt;
    ref_pair(i, j, rel, cnt);
    tx_q.push_back(hdr(OP_CMP_STREAM, 0, cur_nb));
    for (int b = 0; b < cur_nb; b++) begin
      tx_q.push_back(gm[i][b]);
      tx_q.push_back(gm[j][b]);
    end
    exp_q.push_back({TAG_PAIR, ROW_W'(0), ROW_W'(0)});
    exp_q.push_back({5'd0, rel, CNT_W'(cnt)});
    n_stream++;
  endtask

  task automatic run_set(input int rows, input real reported_s);
    int nrec, t0, t1, cyc, pairs, expect_cyc;
    real per_pair, projected, full_pairs;
    stall_in = 1; stall_out = 1;
    for (int r = 0; r < rows; r++) begin
      int s, l;
      for (int b = 0; b < NB; b++) gm[r][b] = '0;
      s = $urandom % (NB * 32);
      l = 1 + $urandom % 400;
      for (int p = s; p < s + l && p < NB * 32; p++) gm[r][p / 32][p % 32] = 1'b1;
    end
    load_m(rows, NB);
    wait_done();
    for (int t = 0; t < 200; t++) begin
      int i;
      i = $urandom % rows;
      cmp_pair(i, (i + $urandom % 30) % rows);
      if (t % 50 == 49) wait_done();
    end
    wait_done();
    // timed complete comparison on the first NSLICE rows
    load_m(NSLICE, NB);
    wait_done();
    stall_in = 0; stall_out = 0;
    t0 = $time;
    cmp_all(nrec);
    wait_done();
    t1 = $time;
    cyc = (t1 - t0) / 10;
    pairs = NSLICE * (NSLICE - 1) / 2;
    expect_cyc = pairs * (2 * (NB / 2) + 4) + nrec;
    checks++;
    if (cyc < expect_cyc || cyc > expect_cyc + 30) begin
      failures++;
      $display("FAIL %0d rows: complete comparison took %0d cycles, expected %0d", rows, cyc, expect_cyc);
    end
    per_pair = real'(cyc) / real'(pairs);
    full_pairs = real'(rows) * real'(rows - 1) / 2.0;
    projected = full_pairs * per_pair / 50.0e6;
    $display("%0d rows: %0d pairs in %0d cycles (%0.2f per pair), %0d records; projected %0.0f pairs: %0.2f s at 50 MHz (reported %0.2f s)",
             rows, pairs, cyc, per_pair, nrec, full_pairs, projected, reported_s);
    checks++;
    if (projected < 0.95 * reported_s || projected > 1.05 * reported_s) begin
      failures++;
      $display("FAIL projected time outside 5%% of the reported one");
    end
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    run_set(3285, 13.92);
    run_set(2881, 10.70);
    checks++; if (words_sent !== 32'(n_words_rx)) begin failures++; $display("FAIL words_sent"); end
    checks++; if (n_edge == 0 || n_subset == 0 || n_filtered == 0) begin failures++; $display("FAIL relation kinds"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
