// compare_engine: the "compare clones" unit with two row comparators working
// in parallel.
//
// Matrix M is stored block-interleaved in two banks: block b of row r is word
// r*HB + b/2 of bank (b mod 2), with HB = ceil(nblk/2). Comparator A takes the
// even blocks of a row pair from bank 0 and comparator B the odd blocks from
// bank 1, so a pair of rows is compared in about half the time one comparator
// would take. Each bank delivers one word per cycle, so every block pair
// costs two reads (row i, then row j) and the comparator steps every second
// cycle. The two partial results are merged: relations ORed, counts added.
//
// Memory mode: 'start' with row_i/row_j/nblk launches a comparison; 'done'
// pulses 2*HB+2 cycles after the start cycle and rel/count hold the result until the next
// start. Banks answer one cycle after a read request.
// Stream mode: when idle, ext_clear/ext_valid/ext_d1/ext_d2 drive comparator
// A directly with blocks arriving from the host (ext_clear also clears B), and
// rel/count follow the accumulation.
// The parallel two-comparator arrangement and interleaving of M in two banks
// follow the source; the interleave granularity (by block) and the read
// schedule are this design's choices.
module compare_engine
  import c1p_pkg::*;
#(
  parameter int unsigned CW = CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [ROW_W-1:0] row_i,
  input  logic [ROW_W-1:0] row_j,
  input  logic [BLK_W-1:0] nblk,
  output logic             busy,
  output logic             done,
  output logic [2:0]       rel,
  output logic [CW-1:0]    count,
  // stream mode
  input  logic             ext_clear,
  input  logic             ext_valid,
  input  logic [DATA_W-1:0] ext_d1,
  input  logic [DATA_W-1:0] ext_d2,
  // banks 0 (even blocks) and 1 (odd blocks)
  output bank_req_t        req0,
  output bank_req_t        req1,
  input  logic [DATA_W-1:0] rdata0,
  input  logic [DATA_W-1:0] rdata1
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [BLK_W-1:0]  hb, hb_odd;      // words per row in bank 0 / valid words in bank 1
  logic [ADDR_W-1:0] base_i, base_j;
  logic [BLK_W-1:0]  h;
  logic              ph;              // 0: read row i, 1: read row j
  logic              rsp_valid, rsp_j, rsp_last;
  logic [BLK_W-1:0]  rsp_h;
  logic [DATA_W-1:0] di0, di1;

  logic              a_clear, a_valid, b_clear, b_valid;
  logic [DATA_W-1:0] a_d1, a_d2, b_d1, b_d2;
  logic [2:0]        rel_a, rel_b;
  logic [CW-1:0]     cnt_a, cnt_b;

  wire [BLK_W-1:0] hb_start = BLK_W'((9'(nblk) + 9'd1) >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hb        <= '0;
      hb_odd    <= '0;
      base_i    <= '0;
      base_j    <= '0;
      h         <= '0;
      ph        <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_j     <= 1'b0;
      rsp_last  <= 1'b0;
      rsp_h     <= '0;
      di0       <= '0;
      di1       <= '0;
    end else begin
      rsp_valid <= (state == S_RUN);
      rsp_j     <= ph;
      rsp_h     <= h;
      rsp_last  <= (state == S_RUN) && ph && (h == hb - BLK_W'(1));
      if (rsp_valid && !rsp_j) begin
        di0 <= rdata0;
        di1 <= rdata1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          hb     <= hb_start;
          hb_odd <= nblk >> 1;
          base_i <= ADDR_W'(row_i) * ADDR_W'(hb_start);
          base_j <= ADDR_W'(row_j) * ADDR_W'(hb_start);
          h      <= '0;
          ph     <= 1'b0;
          state  <= (nblk == '0) ? S_DONE : S_RUN;
        end
        S_RUN: begin
          ph <= ~ph;
          if (ph) begin
            if (h == hb - BLK_W'(1)) state <= S_DRAIN;
            else                     h     <= h + BLK_W'(1);
          end
        end
        S_DRAIN: if (rsp_valid && rsp_j && rsp_last) state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  wire [ADDR_W-1:0] rd_addr = (ph ? base_j : base_i) + ADDR_W'(h);
  assign req0 = (state == S_RUN) ? bank_read(rd_addr) : BANK_IDLE;
  assign req1 = (state == S_RUN && h < hb_odd) ? bank_read(rd_addr) : BANK_IDLE;

  wire step = rsp_valid && rsp_j;

  always_comb begin
    if (busy) begin
      a_clear = start;
      b_clear = start;
      a_valid = step;
      b_valid = step && (rsp_h < hb_odd);
      a_d1 = di0;  a_d2 = rdata0;
      b_d1 = di1;  b_d2 = rdata1;
    end else begin
      a_clear = start | ext_clear;
      b_clear = start | ext_clear;
      a_valid = ext_valid;
      b_valid = 1'b0;
      a_d1 = ext_d1;  a_d2 = ext_d2;
      b_d1 = '0;      b_d2 = '0;
    end
  end

  row_comparator #(.W(DATA_W), .CNT_W(CW)) u_cmp_a (
    .clk, .rst_n, .clear(a_clear), .valid(a_valid), .d1(a_d1), .d2(a_d2),
    .rel(rel_a), .count(cnt_a)
  );

  row_comparator #(.W(DATA_W), .CNT_W(CW)) u_cmp_b (
    .clk, .rst_n, .clear(b_clear), .valid(b_valid), .d1(b_d1), .d2(b_d2),
    .rel(rel_b), .count(cnt_b)
  );

  assign rel   = rel_a | rel_b;
  assign count = cnt_a + cnt_b;

  // A new comparison may only be started while the engine is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
