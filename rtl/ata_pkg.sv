// ata_pkg: constants shared by the ATA logic of the memory card.
// Register addresses of the ATA task file (chip-select pair and DA), the
// command codes the controller knows, Status register bits, the Ultra DMA
// CRC constants, and the operation codes between ata_ctrl and ata_bus_if.
// The numbers are those of the ATA standard; the operation codes and the
// layout of the AVR status word are this design's own.
package ata_pkg;

  // Task-file address: {cs1 selected, cs0 selected, DA[2:0]} written as a
  // 4-bit code {block, da}: block 0 = command block (CS0- low),
  // block 1 = control block (CS1- low).
  typedef struct packed {
    logic       ctl_blk;   // 1: control block (CS1-), 0: command block (CS0-)
    logic [2:0] da;        // DA2..DA0
  } ata_addr_t;

  localparam ata_addr_t REG_DATA    = '{1'b0, 3'd0};
  localparam ata_addr_t REG_FEATURE = '{1'b0, 3'd1};   // write: Features, read: Error
  localparam ata_addr_t REG_ERROR   = '{1'b0, 3'd1};
  localparam ata_addr_t REG_COUNT   = '{1'b0, 3'd2};
  localparam ata_addr_t REG_LBA_LO  = '{1'b0, 3'd3};
  localparam ata_addr_t REG_LBA_MID = '{1'b0, 3'd4};
  localparam ata_addr_t REG_LBA_HI  = '{1'b0, 3'd5};
  localparam ata_addr_t REG_DEVICE  = '{1'b0, 3'd6};
  localparam ata_addr_t REG_STATUS  = '{1'b0, 3'd7};   // write: Command
  localparam ata_addr_t REG_COMMAND = '{1'b0, 3'd7};
  localparam ata_addr_t REG_ALTSTAT = '{1'b1, 3'd6};   // write: Device Control

  // Command codes (ATA standard)
  localparam logic [7:0] CMD_WRITE_SECTORS = 8'h30;   // PIO data-out
  localparam logic [7:0] CMD_WRITE_DMA     = 8'hCA;   // Ultra DMA data-out
  localparam logic [7:0] CMD_READ_SECTORS  = 8'h20;   // PIO data-in
  localparam logic [7:0] CMD_READ_SECTORS_EXT = 8'h24;    // PIO data-in, 48-bit LBA
  localparam logic [7:0] CMD_IDENTIFY      = 8'hEC;   // PIO data-in, one sector
  localparam logic [7:0] CMD_WRITE_SECTORS_EXT = 8'h34;   // PIO data-out, 48-bit LBA
  localparam logic [7:0] CMD_WRITE_DMA_EXT     = 8'h35;   // Ultra DMA data-out, 48-bit LBA

  // Status register bits
  localparam int ST_BSY  = 7;
  localparam int ST_DRDY = 6;
  localparam int ST_DF   = 5;
  localparam int ST_DRQ  = 3;
  localparam int ST_ERR  = 0;

  // Ultra DMA CRC: x^16 + x^12 + x^5 + 1, seeded with 4ABAh
  localparam logic [15:0] UDMA_CRC_POLY = 16'h1021;
  localparam logic [15:0] UDMA_CRC_SEED = 16'h4ABA;

  // Operations ata_ctrl asks of ata_bus_if
  typedef enum logic [1:0] {
    OP_REG_WR  = 2'd0,   // PIO write of wdata to a register
    OP_REG_RD  = 2'd1,   // PIO read of a register
    OP_DATA_WR = 2'd2,   // PIO write of the next buffer word to the Data register
    OP_DMA_OUT = 2'd3    // Ultra DMA data-out burst of dma_words buffer words
  } bus_op_t;

  // AVR register port addresses (this design's own map)
  localparam logic [3:0] AVR_FEATURE = 4'd0;
  localparam logic [3:0] AVR_COUNT   = 4'd1;
  localparam logic [3:0] AVR_LBA_LO  = 4'd2;
  localparam logic [3:0] AVR_LBA_MID = 4'd3;
  localparam logic [3:0] AVR_LBA_HI  = 4'd4;
  localparam logic [3:0] AVR_DEVICE  = 4'd5;
  localparam logic [3:0] AVR_COMMAND = 4'd6;   // write starts the command
  localparam logic [3:0] AVR_STATUS  = 4'd7;   // card status word (read)
  localparam logic [3:0] AVR_DSTAT   = 4'd8;   // last disk Status register (read)
  localparam logic [3:0] AVR_DERR    = 4'd9;   // last disk Error register (read)
  localparam logic [3:0] AVR_CTRL    = 4'd10;  // bit0: FIFO read enable
  // high-order bytes of the 48-bit task file ("previous" contents)
  localparam logic [3:0] AVR_COUNT_HI = 4'd11;  // Sector Count 15:8
  localparam logic [3:0] AVR_LBA3     = 4'd12;  // LBA 31:24
  localparam logic [3:0] AVR_LBA4     = 4'd13;  // LBA 39:32
  localparam logic [3:0] AVR_LBA5     = 4'd14;  // LBA 47:40
  localparam logic [3:0] AVR_RDATA    = 4'd15;  // data-in sector, low byte then high byte

  // Card status word bits
  localparam int SW_BUSY    = 7;
  localparam int SW_DONE    = 6;
  localparam int SW_ERR     = 5;
  localparam int SW_RDRDY   = 4;   // a data-in sector waits for the AVR
  localparam int SW_INTRQ   = 3;
  localparam int SW_FIFO_HF = 2;
  localparam int SW_FIFO_AE = 1;
  localparam int SW_FIFO_AF = 0;

endpackage
