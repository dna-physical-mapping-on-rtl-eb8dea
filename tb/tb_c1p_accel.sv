// tb_c1p_accel: end-to-end self-checking test of the accelerator with four
// SRAM bank models, acting as the host software.
//
// Sequence:
//  1. the 8-clone x 9-probe example matrix: load, complete comparison; the
//     overlap-graph edges found must be exactly l1-l2, l4-l5, l6-l7, l6-l8;
//  2. component {l1, l2} of the example with its three permuted columns:
//     column sets must be {1}, {2,4,5,7,9}, {3,6,8};
//  3. a random interval-structured matrix (40 rows, 5 blocks, an odd block
//     count): demand comparisons of random pairs, then complete comparison,
//     whose cycle count is checked against 2*HB+4 cycles per pair plus one per
//     returned record;
//  4. a 45-row component (two column words per column) of that matrix,
//     set construction;
//  5. comparisons of rows streamed in the command packet;
//  6. an unknown opcode, which must be dropped.
// Every returned word is compared with values computed here. The host link
// stalls at random in both directions. Each mechanism is counted, and one
// that never happened counts as a failure.
module tb_c1p_accel;
  import c1p_pkg::*;
  localparam int DEPTH = 65536;
  localparam int NR    = 40;
  localparam int NB    = 5;
  localparam int NCR   = 45;
  localparam int NCC   = 12;

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
    repeat (3000000) @(posedge clk);
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

  // the example matrix: clone lk, probe p at bit p-1
  logic [8:0] ex [8] = '{9'b101011011, 9'b111111110, 9'b101011010, 9'b010000100,
                         9'b000100100, 9'b001001000, 9'b001000010, 9'b100011000};

  initial begin
    int nrec, t0, t1, expect_cyc, edges_ok;
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;

    // 1. example, complete comparison
    for (int r = 0; r < 8; r++) gm[r][0] = 32'(ex[r]);
    load_m(8, 1);
    cmp_all(nrec);
    wait_done();
    edges_ok = 1;
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) begin
        logic [2:0] rel;
        int cnt;
        bit exp_edge;
        ref_pair(i, j, rel, cnt);
        exp_edge = (i == 0 && j == 1) || (i == 3 && j == 4) || (i == 5 && j == 6) || (i == 5 && j == 7);
        if ((rel == 3'b111) != exp_edge) edges_ok = 0;
      end
    checks++;
    if (!edges_ok) begin failures++; $display("FAIL example edges"); end

    // 2. component alpha = {l1, l2}: columns (1,0), (1,1), (0,1)
    cidx[0] = 0; cidx[1] = 1;
    cb[0][0] = 1; cb[0][1] = 0;
    cb[1][0] = 1; cb[1][1] = 1;
    cb[2][0] = 0; cb[2][1] = 1;
    construct(2, 3);
    checks++;
    if (exp_q[0] != 32'b0_0000_0001 || exp_q[1] != 32'b1_0101_1010 || exp_q[2] != 32'b0_1010_0100) begin
      failures++; $display("FAIL example column sets");
    end
    wait_done();

    // 3. random interval-structured matrix
    for (int r = 0; r < NR; r++) begin
      int s, l;
      for (int b = 0; b < NB; b++) gm[r][b] = '0;
      s = $urandom % (NB * 32);
      l = 1 + $urandom % 60;
      if (r % 9 == 4) l = 0;  // an empty clone
      for (int p = s; p < s + l && p < NB * 32; p++) gm[r][p / 32][p % 32] = 1'b1;
    end
    load_m(NR, NB);
    for (int t = 0; t < 30; t++) cmp_pair($urandom % NR, $urandom % NR);
    wait_done();
    // complete comparison with the output always ready, timed
    stall_out = 0;
    t0 = $time;
    cmp_all(nrec);
    wait_done();
    t1 = $time;
    expect_cyc = (NR * (NR - 1) / 2) * (2 * ((NB + 1) / 2) + 4) + nrec;
    checks++;
    if ((t1 - t0) / 10 < expect_cyc || (t1 - t0) / 10 > expect_cyc + 20) begin
      failures++;
      $display("FAIL complete comparison took %0d cycles, expected %0d + link overhead", (t1 - t0) / 10, expect_cyc);
    end
    stall_out = 1;

    // 4. component of NCR rows
    for (int k = 0; k < NCR; k++) cidx[k] = $urandom % NR;
    for (int c = 0; c < NCC; c++) for (int k = 0; k < NCR; k++) cb[c][k] = ($urandom % 5) == 0;
    construct(NCR, NCC);
    wait_done();

    // 5. streamed rows, 6. unknown opcode
    for (int t = 0; t < 6; t++) cmp_stream($urandom % NR, $urandom % NR);
    tx_q.push_back(32'hF000_0000);
    cmp_pair(1, 2);
    wait_done();

    // mechanisms
    checks++; if (n_demand == 0)   begin failures++; $display("FAIL no demand comparison"); end
    checks++; if (n_complete == 0) begin failures++; $display("FAIL no complete comparison"); end
    checks++; if (n_filtered == 0) begin failures++; $display("FAIL no filtered pair"); end
    checks++; if (n_stream == 0)   begin failures++; $display("FAIL no streamed comparison"); end
    checks++; if (n_setwords == 0) begin failures++; $display("FAIL no set construction"); end
    checks++; if (n_edge == 0 || n_subset == 0 || n_disjoint == 0) begin failures++; $display("FAIL relation kinds"); end
    checks++; if (n_rx_stall == 0) begin failures++; $display("FAIL receive FIFO never full"); end
    checks++; if (n_tx_stall == 0) begin failures++; $display("FAIL output never stalled"); end
    checks++; if (words_sent !== 32'(n_words_rx)) begin failures++; $display("FAIL words_sent"); end
    $display("mechanisms: demand=%0d complete=%0d filtered=%0d stream=%0d setwords=%0d edge=%0d subset=%0d disjoint=%0d rx_full=%0d tx_stall=%0d",
             n_demand, n_complete, n_filtered, n_stream, n_setwords, n_edge, n_subset, n_disjoint, n_rx_stall, n_tx_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
