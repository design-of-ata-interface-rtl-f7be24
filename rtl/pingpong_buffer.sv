// pingpong_buffer: the two data buffers of the FPGA's ATA data channel.
// Two banks of DEPTH words (one 512-byte sector each by default). The write
// side fills one bank; when it is full the bank is handed to the read side
// and writing moves to the other bank, if that one has been emptied. The read
// side drains a full bank word by word (first word falls through: rd_data is
// valid whenever rd_valid is high, rd_en takes it) and frees the bank after
// its last word. Filling and draining thus overlap, so the ATA side always
// sends whole sectors while the FIFO side keeps running.
// The document gives the two buffers; the sector size and the hand-over
// rule are this design's own.
// wr_free counts the words that may still be written: the rest of the
// current bank plus the other bank if it is empty.
module pingpong_buffer #(
  parameter int DEPTH = 256,
  parameter int W     = 16,
  localparam int AW     = $clog2(DEPTH),
  localparam int FREE_W = AW + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,      // drop all contents
  // write side
  input  logic              wr_en,
  input  logic [W-1:0]      wr_data,
  output logic [FREE_W-1:0] wr_free,
  // read side
  output logic              rd_valid,
  output logic [W-1:0]      rd_data,
  input  logic              rd_en,
  output logic [1:0]        full_banks
);

  logic [W-1:0] mem [2][DEPTH];
  logic         full [2];
  logic         wb, rb;                // current write / read bank
  logic [AW:0]  wptr, rptr;

  logic wr_ok;
  assign wr_ok    = wr_en && !full[wb];
  assign rd_valid = full[rb];
  assign rd_data  = mem[rb][rptr[AW-1:0]];
  assign full_banks = {full[1], full[0]};

  always_comb begin
    wr_free = '0;
    if (!full[wb])  wr_free = FREE_W'(DEPTH) - FREE_W'(wptr);
    if (!full[!wb]) wr_free = wr_free + FREE_W'(DEPTH);
  end

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wb][wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '{1'b0, 1'b0};
      wb   <= 1'b0;
      rb   <= 1'b0;
      wptr <= '0;
      rptr <= '0;
    end else if (flush) begin
      full <= '{1'b0, 1'b0};
      wb   <= 1'b0;
      rb   <= 1'b0;
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_ok) begin
        if (wptr == (AW+1)'(DEPTH - 1)) begin
          full[wb] <= 1'b1;
          wb       <= !wb;
          wptr     <= '0;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (rd_en && rd_valid) begin
        if (rptr == (AW+1)'(DEPTH - 1)) begin
          full[rb] <= 1'b0;
          rb       <= !rb;
          rptr     <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  // the write side never targets a bank the read side holds
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full[wb])
    else $error("write into a full bank");

endmodule
