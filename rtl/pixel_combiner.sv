// pixel_combiner: CPLD logic of the image data buffer.
// The camera delivers PIX_W-bit samples, one per pixel clock, while
// CAMERAGATE is high. Each sample is first latched, then shifted into a
// shift register; after WORD_W/PIX_W samples the shift register holds a full
// 16-bit word, which is copied into the 16-bit data register and written
// into the external FIFO on the next clock (FIFO WEN- low for one clock).
// Latch, 4-bit shifting and the 16-bit data register follow the document;
// the order of samples in the word (first sample in the low bits), dropping
// a partial word when the gate falls, and dropping a word (with a sticky
// overflow flag) when the FIFO reports full are this design's own choices.
// Timing: a word reaches fifo_d two clocks after its last sample is
// presented (one for the input latch, one for the data register).
// The FIFO write clock is clk itself.
module pixel_combiner #(
  parameter int PIX_W  = 4,
  parameter int WORD_W = 16
) (
  input  logic              clk,        // camera pixel clock
  input  logic              rst_n,
  input  logic              enable,     // writing allowed (from the AVR)
  input  logic              cam_gate,   // CAMERAGATE: sample valid
  input  logic [PIX_W-1:0]  cam_d,      // camera data
  output logic [WORD_W-1:0] fifo_d,     // FIFO D bus
  output logic              fifo_wen_n, // FIFO WEN-
  input  logic              fifo_ff_n,  // FIFO FF- (full, active low)
  output logic              overflow,   // sticky: a word was lost to a full FIFO
  output logic [15:0]       words_written
);

  localparam int NSAMP = WORD_W / PIX_W;

  // input latch
  logic             lat_v;
  logic [PIX_W-1:0] lat_d;
  // shift register and its fill count
  logic [WORD_W-1:0]        shreg;
  logic [$clog2(NSAMP):0]   fill;
  logic                     word_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_v <= 1'b0;
      lat_d <= '0;
    end else begin
      lat_v <= cam_gate && enable;
      lat_d <= cam_d;
    end
  end

  // shift new samples in from the top so that the first sample ends up in
  // the least significant bits
  logic [WORD_W-1:0] shifted;
  assign shifted = {lat_d, shreg[WORD_W-1:PIX_W]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      fill   <= '0;
      word_v <= 1'b0;
    end else begin
      word_v <= 1'b0;
      if (lat_v) begin
        shreg <= shifted;
        if (fill == ($bits(fill))'(NSAMP - 1)) begin
          fill   <= '0;
          word_v <= 1'b1;
        end else begin
          fill <= fill + 1'b1;
        end
      end else begin
        fill <= '0;                 // gate fell: discard a partial word
      end
    end
  end

  // 16-bit data register and FIFO write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_d        <= '0;
      fifo_wen_n    <= 1'b1;
      overflow      <= 1'b0;
      words_written <= '0;
    end else begin
      fifo_wen_n <= 1'b1;
      if (word_v) begin
        if (fifo_ff_n) begin
          fifo_d        <= shreg;
          fifo_wen_n    <= 1'b0;
          words_written <= words_written + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  initial assert (WORD_W % PIX_W == 0) else $error("WORD_W must be a multiple of PIX_W");

endmodule
