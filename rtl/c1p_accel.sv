// c1p_accel: FPGA side of a hybrid software/hardware solver for the
// consecutive-ones problem used in DNA physical mapping.
//
// The host software forms components, permutes and joins them; the two
// operations that dominate its run time are done here: comparing clone rows
// of the binary matrix M (intersection, containment, intersection count) and
// constructing the column sets of a permuted component. The structure is the
// source's: a controller, a clone-comparison unit, a set-construction unit,
// a receive unit and a send unit, working on M and component data held in
// external memory banks of the FPGA board.
//
// This configuration is the fully parallel one: two row comparators and two
// set constructors, with M stored interleaved in two banks. Demand
// comparisons (row indexes sent per pair), complete comparisons (all pairs
// done in hardware) and rows streamed per pair are all available as commands,
// so every hybrid organisation of the source can be driven from software.
//
// Interface: a 32-bit command/data word stream from the host (in_*), a 32-bit
// result stream to the host (out_*), both valid/ready; four synchronous SRAM
// bank ports (bank 0: even blocks of M, 1: odd blocks of M, 2: component by
// columns, 3: component row indexes), each request answered on
// bank_rdata one cycle later. Command and result formats are in c1p_pkg.
module c1p_accel
  import c1p_pkg::*;
#(
  parameter int unsigned RX_DEPTH = 16,
  parameter int unsigned TX_DEPTH = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [DATA_W-1:0]              in_data,
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [DATA_W-1:0]              out_data,
  output bank_req_t [NBANKS-1:0]         bank_req,
  input  logic [NBANKS-1:0][DATA_W-1:0]  bank_rdata,
  output logic                           busy,
  output logic [31:0]                    words_sent
);

  // receive -> control
  logic              rx_valid, rx_ready, rx_header, rx_last;
  logic [DATA_W-1:0] rx_data;
  opcode_e           rx_op;
  // control <-> compare engine
  logic              cmp_start, cmp_done, cmp_busy;
  logic [ROW_W-1:0]  cmp_row_i, cmp_row_j;
  logic [BLK_W-1:0]  cmp_nblk;
  logic [2:0]        cmp_rel;
  logic [CNT_W-1:0]  cmp_count;
  logic              cmp_ext_clear, cmp_ext_valid;
  logic [DATA_W-1:0] cmp_ext_d1, cmp_ext_d2;
  bank_req_t         cmp_req0, cmp_req1;
  // control <-> construct engine
  logic              cst_start, cst_done, cst_busy;
  logic [ROW_W-1:0]  cst_ncrows, cst_ncols;
  logic [BLK_W-1:0]  cst_nblk;
  logic              cst_out_valid, cst_out_ready;
  logic [DATA_W-1:0] cst_out_data;
  bank_req_t         cst_req0, cst_req1, cst_req2, cst_req3;
  // control -> send
  logic              rec_valid, rec_ready, rec_two;
  logic [DATA_W-1:0] rec_w0, rec_w1;
  logic              ctl_busy;

  receive_data #(.DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(rx_valid), .out_ready(rx_ready), .out_data(rx_data),
    .out_header(rx_header), .out_last(rx_last), .out_op(rx_op)
  );

  c1p_control u_ctl (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_data, .rx_header, .rx_last, .rx_op,
    .cmp_start, .cmp_row_i, .cmp_row_j, .cmp_nblk, .cmp_done, .cmp_rel, .cmp_count,
    .cmp_ext_clear, .cmp_ext_valid, .cmp_ext_d1, .cmp_ext_d2, .cmp_req0, .cmp_req1,
    .cst_start, .cst_ncrows, .cst_ncols, .cst_nblk, .cst_done,
    .cst_out_valid, .cst_out_data, .cst_out_ready,
    .cst_req0, .cst_req1, .cst_req2, .cst_req3,
    .rec_valid, .rec_ready, .rec_two, .rec_w0, .rec_w1,
    .bank_req, .busy(ctl_busy)
  );

  compare_engine u_cmp (
    .clk, .rst_n, .start(cmp_start), .row_i(cmp_row_i), .row_j(cmp_row_j),
    .nblk(cmp_nblk), .busy(cmp_busy), .done(cmp_done), .rel(cmp_rel), .count(cmp_count),
    .ext_clear(cmp_ext_clear), .ext_valid(cmp_ext_valid), .ext_d1(cmp_ext_d1),
    .ext_d2(cmp_ext_d2), .req0(cmp_req0), .req1(cmp_req1),
    .rdata0(bank_rdata[BANK_M_EVEN]), .rdata1(bank_rdata[BANK_M_ODD])
  );

  construct_engine u_cst (
    .clk, .rst_n, .start(cst_start), .ncrows(cst_ncrows), .ncols(cst_ncols),
    .nblk(cst_nblk), .busy(cst_busy), .done(cst_done),
    .out_valid(cst_out_valid), .out_data(cst_out_data), .out_ready(cst_out_ready),
    .req0(cst_req0), .req1(cst_req1), .req2(cst_req2), .req3(cst_req3),
    .rdata0(bank_rdata[BANK_M_EVEN]), .rdata1(bank_rdata[BANK_M_ODD]),
    .rdata2(bank_rdata[BANK_COMP]), .rdata3(bank_rdata[BANK_IDX])
  );

  send_data #(.DEPTH(TX_DEPTH)) u_tx (
    .clk, .rst_n, .rec_valid, .rec_ready, .rec_two, .rec_w0, .rec_w1,
    .out_valid, .out_ready, .out_data, .words_sent
  );

  assign busy = ctl_busy | cmp_busy | cst_busy;

endmodule
