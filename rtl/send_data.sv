// send_data: returns operation results to the host software.
//
// The controller hands over result records of one or two 32-bit words (a
// comparison result is a pair word {TAG_PAIR, i, j} followed by
// {relation, count}; a column-set block or an end-of-operation word
// {TAG_DONE, n} is a single word). Records are queued in a FIFO and
// serialised onto the outgoing word stream, first word first. rec_ready is
// low while the FIFO is full; the outgoing stream obeys valid/ready, so the
// host side can stall it. 'words_sent' counts words delivered since reset.
// The source only names this unit and its role; record format and queueing
// are this design's.
module send_data
  import c1p_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rec_valid,
  output logic              rec_ready,
  input  logic              rec_two,
  input  logic [DATA_W-1:0] rec_w0,
  input  logic [DATA_W-1:0] rec_w1,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [31:0]       words_sent
);

  typedef struct packed {
    logic              two;
    logic [DATA_W-1:0] w0;
    logic [DATA_W-1:0] w1;
  } rec_t;

  rec_t q_rec;
  logic q_valid, q_ready;
  logic second;   // the next word to send is the record's second word

  sync_fifo #(.W($bits(rec_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(rec_valid), .in_ready(rec_ready),
    .in_data(rec_t'{two: rec_two, w0: rec_w0, w1: rec_w1}),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_rec)
  );

  assign out_valid = q_valid;
  assign out_data  = second ? q_rec.w1 : q_rec.w0;
  // The record leaves the FIFO with its last word.
  assign q_ready   = out_ready && (second || !q_rec.two);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second     <= 1'b0;
      words_sent <= '0;
    end else if (out_valid && out_ready) begin
      words_sent <= words_sent + 32'd1;
      second     <= q_rec.two && !second;
    end
  end

endmodule
