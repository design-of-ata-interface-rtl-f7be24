// fifo_read_if: FPGA side of the external FIFO (FIFO interface logic and
// data latch).
// The external FIFO is read in its standard mode: with REN- low at a rising
// RCLK edge the next word appears on Q after that edge. This module asserts
// REN- while reading is enabled (by the AVR), the FIFO is not empty (EF-
// high) and the data buffer has room for the word plus the words still in
// flight; the word on Q is captured by the data latch one clock later and
// offered to the buffer with out_valid for one clock.
// The document gives the function (read the FIFO under AVR timing and FIFO
// status, latch the data); the handshake details are this design's own.
// RCLK is this module's clock.
module fifo_read_if #(
  parameter int W    = 16,
  parameter int FREE_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,     // FIFO read enable from the AVR
  input  logic              fifo_ef_n,  // FIFO EF- (empty, active low)
  input  logic [W-1:0]      fifo_q,     // FIFO Q bus
  output logic              fifo_ren_n, // FIFO REN-
  input  logic [FREE_W-1:0] buf_free,   // words the data buffer can still take
  output logic              out_valid,
  output logic [W-1:0]      out_data,
  output logic              starved     // reading enabled but FIFO empty
);

  logic pending;   // a read was issued on the previous clock

  // room must cover this read and the two words still in flight: one issued
  // on the previous clock, one in the latch waiting to be written
  logic room;
  assign room       = (buf_free > FREE_W'(pending) + FREE_W'(out_valid));
  assign fifo_ren_n = !(enable && fifo_ef_n && room);
  assign starved    = enable && !fifo_ef_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      pending   <= !fifo_ren_n;
      out_valid <= pending;
      if (pending) out_data <= fifo_q;   // the data latch
    end
  end

endmodule
