// c1p_control: the controller of the accelerator, a state machine that
// coordinates every hardware operation.
//
// It takes framed command words from receive_data and runs them:
//   OP_LOAD_M      writes M block-interleaved into banks 0/1: block b of row r
//                  goes to word r*HB + b/2 of bank b%2, HB = ceil(blocks/2)
//   OP_LOAD_COMP   writes the component's row indexes to bank 3 (word k) and
//                  its columns to bank 2 (consecutive words)
//   OP_CMP_PAIR    one comparison of two stored rows ("demand" comparison);
//                  always returns a pair record
//   OP_CMP_ALL     compares every pair i<j of the stored rows ("complete"
//                  comparison); returns a pair record only for pairs that
//                  intersect, then {TAG_DONE, number of records}
//   OP_CONSTRUCT   runs the construct engine on the stored component and
//                  forwards its column-set words, then {TAG_DONE, words}
//   OP_CMP_STREAM  feeds block pairs arriving in the packet straight into the
//                  first comparator (no banks) and returns a pair record with
//                  i = j = 0
// The controller also owns the bank ports: it multiplexes its own load writes,
// the compare engine's reads (banks 0/1) and the construct engine's reads
// (banks 0-3) according to the state. Result records go to send_data; the
// controller waits while send_data is full.
// The controller's role and the set of operations follow the source; the
// command set, record format and filtering of non-intersecting pairs in the
// complete comparison are this design's choices.
module c1p_control
  import c1p_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // framed commands from receive_data
  input  logic              rx_valid,
  output logic              rx_ready,
  input  logic [DATA_W-1:0] rx_data,
  input  logic              rx_header,
  input  logic              rx_last,
  input  opcode_e           rx_op,
  // compare engine
  output logic              cmp_start,
  output logic [ROW_W-1:0]  cmp_row_i,
  output logic [ROW_W-1:0]  cmp_row_j,
  output logic [BLK_W-1:0]  cmp_nblk,
  input  logic              cmp_done,
  input  logic [2:0]        cmp_rel,
  input  logic [CNT_W-1:0]  cmp_count,
  output logic              cmp_ext_clear,
  output logic              cmp_ext_valid,
  output logic [DATA_W-1:0] cmp_ext_d1,
  output logic [DATA_W-1:0] cmp_ext_d2,
  input  bank_req_t         cmp_req0,
  input  bank_req_t         cmp_req1,
  // construct engine
  output logic              cst_start,
  output logic [ROW_W-1:0]  cst_ncrows,
  output logic [ROW_W-1:0]  cst_ncols,
  output logic [BLK_W-1:0]  cst_nblk,
  input  logic              cst_done,
  input  logic              cst_out_valid,
  input  logic [DATA_W-1:0] cst_out_data,
  output logic              cst_out_ready,
  input  bank_req_t         cst_req0,
  input  bank_req_t         cst_req1,
  input  bank_req_t         cst_req2,
  input  bank_req_t         cst_req3,
  // result records to send_data
  output logic              rec_valid,
  input  logic              rec_ready,
  output logic              rec_two,
  output logic [DATA_W-1:0] rec_w0,
  output logic [DATA_W-1:0] rec_w1,
  // memory banks
  output bank_req_t [NBANKS-1:0] bank_req,
  output logic              busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD_M, S_LOAD_IDX, S_LOAD_COL,
    S_PAIR_GO, S_PAIR_WAIT, S_PAIR_SEND, S_ALL_NEXT,
    S_CST_GO, S_CST_RUN, S_STREAM, S_SEND_DONE
  } state_e;
  state_e state;

  header_t           hdr;
  logic [ROW_W-1:0]  nrows, ncrows, ncols;
  logic [BLK_W-1:0]  nblk, hb;
  logic [BLK_W-1:0]  lb;          // block within the row being loaded
  logic [ADDR_W-1:0] row_base;    // bank word of the row being loaded
  logic [ADDR_W-1:0] laddr;       // load address in bank 2 / 3
  logic [ROW_W-1:0]  pi, pj;
  logic              all_mode;
  logic [27:0]       nrec;
  logic              sph;         // stream: next word is row j's block
  logic [DATA_W-1:0] sword;

  wire rx_fire = rx_valid && rx_ready;
  wire [BLK_W-1:0] hb_of_b = BLK_W'((9'(hdr.b[BLK_W-1:0]) + 9'd1) >> 1);

  assign hdr = header_t'(rx_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      nrows    <= '0;
      ncrows   <= '0;
      ncols    <= '0;
      nblk     <= '0;
      hb       <= '0;
      lb       <= '0;
      row_base <= '0;
      laddr    <= '0;
      pi       <= '0;
      pj       <= '0;
      all_mode <= 1'b0;
      nrec     <= '0;
      sph      <= 1'b0;
      sword    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rx_fire && rx_header) begin
          unique case (rx_op)
            OP_LOAD_M: begin
              nrows    <= hdr.a;
              nblk     <= hdr.b[BLK_W-1:0];
              hb       <= hb_of_b;
              lb       <= '0;
              row_base <= '0;
              if (!rx_last) state <= S_LOAD_M;
            end
            OP_LOAD_COMP: begin
              ncrows <= hdr.a;
              ncols  <= hdr.b;
              laddr  <= '0;
              if (!rx_last) state <= (hdr.a != '0) ? S_LOAD_IDX : S_LOAD_COL;
            end
            OP_CMP_PAIR: begin
              pi       <= hdr.a;
              pj       <= hdr.b;
              all_mode <= 1'b0;
              state    <= S_PAIR_GO;
            end
            OP_CMP_ALL: begin
              pi       <= '0;
              pj       <= ROW_W'(1);
              all_mode <= 1'b1;
              nrec     <= '0;
              state    <= (nrows < ROW_W'(2)) ? S_SEND_DONE : S_PAIR_GO;
            end
            OP_CONSTRUCT: begin
              nrec  <= '0;
              state <= S_CST_GO;
            end
            OP_CMP_STREAM: begin
              sph      <= 1'b0;
              pi       <= '0;
              pj       <= '0;
              all_mode <= 1'b0;
              state    <= rx_last ? S_PAIR_SEND : S_STREAM;
            end
            default: ;  // unknown opcodes are dropped
          endcase
        end
        S_LOAD_M: if (rx_fire) begin
          if (lb == nblk - BLK_W'(1)) begin
            lb       <= '0;
            row_base <= row_base + ADDR_W'(hb);
          end else begin
            lb <= lb + BLK_W'(1);
          end
          if (rx_last) state <= S_IDLE;
        end
        S_LOAD_IDX: if (rx_fire) begin
          if (rx_last) state <= S_IDLE;
          else if (laddr == ADDR_W'(ncrows - ROW_W'(1))) begin
            laddr <= '0;
            state <= S_LOAD_COL;
          end else laddr <= laddr + ADDR_W'(1);
        end
        S_LOAD_COL: if (rx_fire) begin
          laddr <= laddr + ADDR_W'(1);
          if (rx_last) state <= S_IDLE;
        end
        S_PAIR_GO:   state <= S_PAIR_WAIT;
        S_PAIR_WAIT: if (cmp_done) begin
          if (!all_mode || cmp_rel[REL_INTERSECT]) state <= S_PAIR_SEND;
          else                                     state <= S_ALL_NEXT;
        end
        S_PAIR_SEND: if (rec_ready) begin
          if (all_mode) begin
            nrec  <= nrec + 28'd1;
            state <= S_ALL_NEXT;
          end else state <= S_IDLE;
        end
        S_ALL_NEXT: begin
          if (pj == nrows - ROW_W'(1)) begin
            if (pi == nrows - ROW_W'(2)) state <= S_SEND_DONE;
            else begin
              pi    <= pi + ROW_W'(1);
              pj    <= pi + ROW_W'(2);
              state <= S_PAIR_GO;
            end
          end else begin
            pj    <= pj + ROW_W'(1);
            state <= S_PAIR_GO;
          end
        end
        S_CST_GO:  state <= S_CST_RUN;
        S_CST_RUN: begin
          if (cst_out_valid && rec_ready) nrec <= nrec + 28'd1;
          if (cst_done) state <= S_SEND_DONE;
        end
        S_STREAM: if (rx_fire) begin
          sph <= ~sph;
          if (!sph) sword <= rx_data;
          if (rx_last) state <= S_PAIR_SEND;
        end
        S_SEND_DONE: if (rec_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // command input
  always_comb begin
    unique case (state)
      S_IDLE, S_LOAD_M, S_LOAD_IDX, S_LOAD_COL, S_STREAM: rx_ready = 1'b1;
      default: rx_ready = 1'b0;
    endcase
  end

  // compare engine
  assign cmp_start     = (state == S_PAIR_GO);
  assign cmp_row_i     = pi;
  assign cmp_row_j     = pj;
  assign cmp_nblk      = nblk;
  assign cmp_ext_clear = (state == S_IDLE) && rx_fire && rx_header && (rx_op == OP_CMP_STREAM);
  assign cmp_ext_valid = (state == S_STREAM) && rx_fire && sph;
  assign cmp_ext_d1    = sword;
  assign cmp_ext_d2    = rx_data;

  // construct engine
  assign cst_start     = (state == S_CST_GO);
  assign cst_ncrows    = ncrows;
  assign cst_ncols     = ncols;
  assign cst_nblk      = nblk;
  assign cst_out_ready = (state == S_CST_RUN) && rec_ready;

  // result records
  always_comb begin
    rec_valid = 1'b0;
    rec_two   = 1'b0;
    rec_w0    = '0;
    rec_w1    = '0;
    unique case (state)
      S_PAIR_SEND: begin
        rec_valid = 1'b1;
        rec_two   = 1'b1;
        rec_w0    = {TAG_PAIR, pi, pj};
        rec_w1    = {5'd0, cmp_rel, cmp_count};
      end
      S_CST_RUN: begin
        rec_valid = cst_out_valid;
        rec_w0    = cst_out_data;
      end
      S_SEND_DONE: begin
        rec_valid = 1'b1;
        rec_w0    = {TAG_DONE, nrec};
      end
      default: ;
    endcase
  end

  // bank multiplexing
  always_comb begin
    bank_req = {NBANKS{BANK_IDLE}};
    unique case (state)
      S_LOAD_M: if (rx_fire)
        bank_req[lb[0]] = bank_write(row_base + ADDR_W'(lb >> 1), rx_data);
      S_LOAD_IDX: if (rx_fire)
        bank_req[BANK_IDX] = bank_write(laddr, rx_data);
      S_LOAD_COL: if (rx_fire)
        bank_req[BANK_COMP] = bank_write(laddr, rx_data);
      S_CST_GO, S_CST_RUN: begin
        bank_req[BANK_M_EVEN] = cst_req0;
        bank_req[BANK_M_ODD]  = cst_req1;
        bank_req[BANK_COMP]   = cst_req2;
        bank_req[BANK_IDX]    = cst_req3;
      end
      default: begin
        bank_req[BANK_M_EVEN] = cmp_req0;
        bank_req[BANK_M_ODD]  = cmp_req1;
      end
    endcase
  end

  assign busy = (state != S_IDLE);

  // A record must stay unchanged while send_data holds it off.
  a_rec_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rec_valid && !rec_ready && state != S_CST_RUN |=> $stable(rec_w0) && $stable(rec_w1));

endmodule
