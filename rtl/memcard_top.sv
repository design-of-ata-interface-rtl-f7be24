// memcard_top: logic of the ATA hard-disk memory card for video data.
// Two programmable parts sit on either side of an external dual-clock FIFO:
//  * the CPLD (pixel_combiner), clocked by the camera pixel clock, packs
//    4-bit camera samples into 16-bit words and writes them to the FIFO;
//  * the FPGA, on its own clock, reads the FIFO (fifo_read_if, whose output
//    register is the data latch), collects the words into two sector buffers
//    (pingpong_buffer) and sends whole sectors to the ATA disk through
//    ata_bus_if by PIO or Ultra DMA, with the burst CRC (ata_crc16, inside
//    ata_bus_if). ata_ctrl sequences the disk and is commanded by the AVR
//    microcontroller through a small register port.
// The FIFO chip, the AVR and the disk are outside: their signals are ports.
// The ATA DD bus is split into dd_o / dd_oe / dd_i for the pad. The disk is
// shared with the USB bridge: while ata_ctl_oe is low (the AVR has handed the
// bus over) the pads of DA, CS0-, CS1-, DIOR-, DIOW- and DMACK- float too.
// That the two share the disk is the document's; handing it over by an AVR
// control bit is this design's own.
// The partition into blocks follows the document; see each block for which
// details are the document's and which are this design's own.
module memcard_top
  import ata_pkg::*;
#(
  parameter int PIX_W        = 4,
  parameter int SECTOR_WORDS = 256,
  parameter int RESET_CLKS   = 1250,
  parameter int PIO_T1       = 4,
  parameter int PIO_T2       = 9,
  parameter int PIO_T2I      = 17,
  parameter int UDMA_HALF    = 2
) (
  // ---- CPLD side (camera pixel clock) ----
  input  logic             cam_clk,
  input  logic             cam_rst_n,
  input  logic             cam_en,        // from the AVR (MCUCON0)
  input  logic             cam_gate,
  input  logic [PIX_W-1:0] cam_d,
  output logic [15:0]      fifo_d,
  output logic             fifo_wen_n,
  input  logic             fifo_ff_n,
  output logic             cam_overflow,
  // ---- FPGA side ----
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      fifo_q,
  output logic             fifo_ren_n,
  input  logic             fifo_ef_n,
  input  logic             fifo_hf_n,
  input  logic             fifo_pae_n,
  input  logic             fifo_paf_n,
  // AVR register port
  input  logic             avr_we,
  input  logic             avr_re,
  input  logic [3:0]       avr_addr,
  input  logic [7:0]       avr_wdata,
  output logic [7:0]       avr_rdata,
  // ATA bus
  output logic [15:0]      ata_dd_o,
  output logic             ata_dd_oe,
  input  logic [15:0]      ata_dd_i,
  output logic [2:0]       ata_da,
  output logic             ata_cs0_n,
  output logic             ata_cs1_n,
  output logic             ata_dior_n,
  output logic             ata_diow_n,
  output logic             ata_dmack_n,
  input  logic             ata_dmarq,
  input  logic             ata_iordy,
  input  logic             ata_intrq,
  output logic             ata_rst_n,
  output logic             ata_ctl_oe,    // drive the ATA control lines
  // observation
  output logic             fifo_starved,
  output logic             dma_pause,
  output logic [1:0]       full_banks,
  output logic             card_busy,
  output logic [15:0]      cam_words,
  output logic [15:0]      dma_crc
);

  localparam int FREE_W = $clog2(SECTOR_WORDS) + 2;

  // ---------------- CPLD ----------------
  pixel_combiner #(.PIX_W(PIX_W), .WORD_W(16)) u_cpld (
    .clk          (cam_clk),
    .rst_n        (cam_rst_n),
    .enable       (cam_en),
    .cam_gate     (cam_gate),
    .cam_d        (cam_d),
    .fifo_d       (fifo_d),
    .fifo_wen_n   (fifo_wen_n),
    .fifo_ff_n    (fifo_ff_n),
    .overflow     (cam_overflow),
    .words_written(cam_words)
  );

  // ---------------- FPGA ----------------
  logic              fifo_en;
  logic [FREE_W-1:0] buf_free;
  logic              lat_valid;
  logic [15:0]       lat_data;

  fifo_read_if #(.W(16), .FREE_W(FREE_W)) u_fifo_if (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (fifo_en),
    .fifo_ef_n (fifo_ef_n),
    .fifo_q    (fifo_q),
    .fifo_ren_n(fifo_ren_n),
    .buf_free  (buf_free),
    .out_valid (lat_valid),
    .out_data  (lat_data),
    .starved   (fifo_starved)
  );

  logic        src_valid, src_pop;
  logic [15:0] src_data;

  pingpong_buffer #(.DEPTH(SECTOR_WORDS), .W(16)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (1'b0),
    .wr_en     (lat_valid),
    .wr_data   (lat_data),
    .wr_free   (buf_free),
    .rd_valid  (src_valid),
    .rd_data   (src_data),
    .rd_en     (src_pop),
    .full_banks(full_banks)
  );

  logic        bus_req, bus_done;
  bus_op_t     bus_op;
  ata_addr_t   bus_addr;
  logic        bus_released;
  logic [15:0] bus_wdata, bus_rdata;
  logic [24:0] bus_dma_words;

  ata_ctrl #(.RESET_CLKS(RESET_CLKS), .SECTOR_WORDS(SECTOR_WORDS)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .avr_we       (avr_we),
    .avr_re       (avr_re),
    .avr_addr     (avr_addr),
    .avr_wdata    (avr_wdata),
    .avr_rdata    (avr_rdata),
    .fifo_en      (fifo_en),
    .fifo_hf_n    (fifo_hf_n),
    .fifo_pae_n   (fifo_pae_n),
    .fifo_paf_n   (fifo_paf_n),
    .ata_rst_n    (ata_rst_n),
    .intrq        (ata_intrq),
    .bus_req      (bus_req),
    .bus_op       (bus_op),
    .bus_addr     (bus_addr),
    .bus_wdata    (bus_wdata),
    .bus_dma_words(bus_dma_words),
    .bus_done     (bus_done),
    .bus_rdata    (bus_rdata),
    .busy         (card_busy),
    .bus_released (bus_released)
  );
  assign ata_ctl_oe = !bus_released;

  ata_bus_if #(.PIO_T1(PIO_T1), .PIO_T2(PIO_T2), .PIO_T2I(PIO_T2I), .UDMA_HALF(UDMA_HALF)) u_ata (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (bus_req),
    .op       (bus_op),
    .addr     (bus_addr),
    .wdata    (bus_wdata),
    .dma_words(bus_dma_words),
    .busy     (),
    .done     (bus_done),
    .rdata    (bus_rdata),
    .src_valid(src_valid),
    .src_data (src_data),
    .src_pop  (src_pop),
    .dd_o     (ata_dd_o),
    .dd_oe    (ata_dd_oe),
    .dd_i     (ata_dd_i),
    .da       (ata_da),
    .cs0_n    (ata_cs0_n),
    .cs1_n    (ata_cs1_n),
    .dior_n   (ata_dior_n),
    .diow_n   (ata_diow_n),
    .dmack_n  (ata_dmack_n),
    .dmarq    (ata_dmarq),
    .iordy    (ata_iordy),
    .dma_pause(dma_pause),
    .crc      (dma_crc)
  );

endmodule
