// sync_fifo: single-clock first-in first-out buffer with valid/ready on both
// sides, used to decouple the host link from the accelerator.
//
// DEPTH entries (a power of two) of W bits are held in a register array
// addressed by read and write pointers one bit wider than the address, so
// full and empty are told apart by that extra bit. in_ready is low when full;
// out_valid is high when not empty, and out_data shows the oldest entry.
// A word is written on in_valid & in_ready and removed on out_valid &
// out_ready; both can happen in the same cycle.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign in_ready  = (wp - rp) != (AW+1)'(DEPTH);
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

endmodule
