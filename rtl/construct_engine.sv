// construct_engine: the "construct sets" unit with two set constructors
// working in parallel.
//
// The loaded component has ncrows rows (their M row numbers are in the
// row-index bank, one per word) and ncols columns (stored by columns in the
// component bank, ceil(ncrows/32) words per column, component row k at bit
// 31-(k mod 32) of word k/32). For every component column c and every pair of
// 32-bit blocks (2h, 2h+1) of the column set, the engine runs one pass over
// the component rows:
//   stage 0  read row index k from the row-index bank
//   stage 1  read block 2h of that row from bank 0 and block 2h+1 from bank 1
//            (word idx*HB + h), and, every 32 rows, the next component-column
//            word from the component bank
//   stage 2  constructor A applies the even block, constructor B the odd one
// so each constructor takes one row block per cycle and one column block every
// 32 cycles. After the pass the engine emits block 2h (A) and, if it exists,
// block 2h+1 (B) on its output, one word per accepted out_ready. The output
// order is therefore column 0 blocks 0..nblk-1, column 1, and so on.
// 'done' pulses once after the last word. A pass takes ncrows+3 cycles plus
// the output words.
// Two parallel constructors, the use of memory banks for M, the component by
// columns and the row indexes follow the source; the bank layout, pass order
// and pipeline are this design's choices.
module construct_engine
  import c1p_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ROW_W-1:0]  ncrows,
  input  logic [ROW_W-1:0]  ncols,
  input  logic [BLK_W-1:0]  nblk,
  output logic              busy,
  output logic              done,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready,
  output bank_req_t         req0,
  output bank_req_t         req1,
  output bank_req_t         req2,
  output bank_req_t         req3,
  input  logic [DATA_W-1:0] rdata0,
  input  logic [DATA_W-1:0] rdata1,
  input  logic [DATA_W-1:0] rdata2,
  input  logic [DATA_W-1:0] rdata3
);

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_WAIT, S_EMIT_A, S_EMIT_B, S_DONE} state_e;
  state_e state;

  logic [ROW_W-1:0]  nr, nc, cb, c, k;
  logic [BLK_W-1:0]  hb, hb_odd, h;
  logic [ADDR_W-1:0] col_base;   // c * cb
  logic              s1_valid, s2_valid, s1_colload, s2_colload;
  logic [ROW_W-1:0]  s1_k;
  logic              pass_start;
  logic [DATA_W-1:0] p_a, p_b;

  wire [BLK_W-1:0] hb_start = BLK_W'((9'(nblk) + 9'd1) >> 1);
  wire last_h = (h == hb - BLK_W'(1));
  wire last_c = (c == nc - ROW_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      nr         <= '0;
      nc         <= '0;
      cb         <= '0;
      hb         <= '0;
      hb_odd     <= '0;
      c          <= '0;
      h          <= '0;
      k          <= '0;
      col_base   <= '0;
      s1_valid   <= 1'b0;
      s2_valid   <= 1'b0;
      s1_colload <= 1'b0;
      s2_colload <= 1'b0;
      s1_k       <= '0;
    end else begin
      s1_valid   <= (state == S_PASS);
      s1_k       <= k;
      s1_colload <= (state == S_PASS) && (k[4:0] == 5'd0);
      s2_valid   <= s1_valid;
      s2_colload <= s1_colload;
      unique case (state)
        S_IDLE: if (start) begin
          nr       <= ncrows;
          nc       <= ncols;
          cb       <= col_words(ncrows);
          hb       <= hb_start;
          hb_odd   <= nblk >> 1;
          c        <= '0;
          h        <= '0;
          k        <= '0;
          col_base <= '0;
          state    <= (ncrows == '0 || ncols == '0 || nblk == '0) ? S_DONE : S_PASS;
        end
        S_PASS: begin
          if (k == nr - ROW_W'(1)) state <= S_WAIT;
          else                     k     <= k + ROW_W'(1);
        end
        S_WAIT: if (!s1_valid && !s2_valid) state <= S_EMIT_A;
        S_EMIT_A: if (out_ready) begin
          if (h < hb_odd) state <= S_EMIT_B;
          else begin
            k <= '0;
            if (last_h) begin
              h <= '0;
              if (last_c) state <= S_DONE;
              else begin
                c        <= c + ROW_W'(1);
                col_base <= col_base + ADDR_W'(cb);
                state    <= S_PASS;
              end
            end else begin
              h     <= h + BLK_W'(1);
              state <= S_PASS;
            end
          end
        end
        S_EMIT_B: if (out_ready) begin
          k <= '0;
          if (last_h) begin
            h <= '0;
            if (last_c) state <= S_DONE;
            else begin
              c        <= c + ROW_W'(1);
              col_base <= col_base + ADDR_W'(cb);
              state    <= S_PASS;
            end
          end else begin
            h     <= h + BLK_W'(1);
            state <= S_PASS;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A pass starts on the first stage-0 cycle (k == 0).
  assign pass_start = (state == S_PASS) && (k == '0);

  wire [ADDR_W-1:0] row_addr = ADDR_W'(rdata3[ROW_W-1:0]) * ADDR_W'(hb) + ADDR_W'(h);
  wire [ADDR_W-1:0] col_addr = col_base + ADDR_W'(s1_k >> 5);

  assign req3 = (state == S_PASS) ? bank_read(ADDR_W'(k)) : BANK_IDLE;
  assign req0 = s1_valid ? bank_read(row_addr) : BANK_IDLE;
  assign req1 = (s1_valid && h < hb_odd) ? bank_read(row_addr) : BANK_IDLE;
  assign req2 = s1_colload ? bank_read(col_addr) : BANK_IDLE;

  set_constructor #(.W(DATA_W)) u_set_a (
    .clk, .rst_n, .clear(pass_start), .col_load(s2_colload), .col_in(rdata2),
    .row_valid(s2_valid), .row_in(rdata0), .p(p_a), .index()
  );

  set_constructor #(.W(DATA_W)) u_set_b (
    .clk, .rst_n, .clear(pass_start), .col_load(s2_colload), .col_in(rdata2),
    .row_valid(s2_valid), .row_in(rdata1), .p(p_b), .index()
  );

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign out_valid = (state == S_EMIT_A) || (state == S_EMIT_B);
  assign out_data  = (state == S_EMIT_B) ? p_b : p_a;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
