// ata_bus_if: the ATA interface block, host side of the 40-pin ATA bus.
// It carries out one operation at a time for ata_ctrl:
//  * PIO register write / read: address (CS0-/CS1-, DA) set up for PIO_T1
//    clocks, DIOW- or DIOR- low for PIO_T2 clocks (longer while the disk
//    holds IORDY low), then PIO_T2I recovery clocks with the strobes high.
//    Reads sample DD at the end of the DIOR- pulse.
//  * PIO data write: the same cycle on the Data register, carrying the next
//    word of the data buffer.
//  * Ultra DMA data-out burst of dma_words words: wait for DMARQ, assert
//    DMACK- with STOP (on DIOW-) low and HSTROBE (on DIOR-) high, wait for
//    DDMARDY- (on IORDY) low, then put one buffer word on DD every UDMA_HALF
//    clocks and toggle HSTROBE in the middle of it, so each HSTROBE edge
//    carries one word. The burst pauses (no edge) while DDMARDY- is high or
//    the buffer has no word. At the end STOP goes high; after the disk drops
//    DMARQ, HSTROBE returns high, the CRC of the burst is driven on DD and
//    DMACK- is released, at which edge the disk takes the CRC.
// DD is split into dd_o, dd_oe and dd_i; the pad joins them.
// DMARQ and IORDY come from the disk with no relation to clk and pass two
// flip-flops before any decision is taken on them (the document asks for
// the sampled bus signals to be synchronised); the FSM sees them two
// clocks late, and after the disk negates DDMARDY- at most two more words
// go out. DD is sampled at the end of a DIOR- pulse, when the disk has
// long been driving it.
// The document asks for PIO and UDMA (UDMA66) timing, a CRC check and a
// selection between buffer data and CRC on the bus; the cycle counts (ATA
// PIO mode 0 and a 40 ns UDMA word period at a 50 MHz clock) and the
// handshake details are taken from the ATA standard, not from the document.
// done pulses for one clock at the end of every operation.
module ata_bus_if
  import ata_pkg::*;
#(
  parameter int PIO_T1    = 4,    // address setup, clocks
  parameter int PIO_T2    = 9,    // DIOR-/DIOW- pulse, clocks
  parameter int PIO_T2I   = 17,   // recovery, clocks
  parameter int UDMA_HALF = 2     // clocks per UDMA word (>= 2)
) (
  input  logic        clk,
  input  logic        rst_n,
  // request port from ata_ctrl
  input  logic        req,
  input  bus_op_t     op,
  input  ata_addr_t   addr,
  input  logic [15:0] wdata,
  input  logic [24:0] dma_words,
  output logic        busy,
  output logic        done,
  output logic [15:0] rdata,
  // word stream from the data buffer
  input  logic        src_valid,
  input  logic [15:0] src_data,
  output logic        src_pop,
  // ATA pins
  output logic [15:0] dd_o,
  output logic        dd_oe,
  input  logic [15:0] dd_i,
  output logic [2:0]  da,
  output logic        cs0_n,
  output logic        cs1_n,
  output logic        dior_n,   // DIOR- / HSTROBE
  output logic        diow_n,   // DIOW- / STOP
  output logic        dmack_n,
  input  logic        dmarq,
  input  logic        iordy,    // IORDY / DDMARDY-
  // observation
  output logic        dma_pause,  // a UDMA word slot passed without a word
  output logic [15:0] crc
);

  typedef enum logic [3:0] {
    S_IDLE, S_SRC, S_SETUP, S_ACTIVE, S_REC,
    S_D_WAITRQ, S_D_WAITRDY, S_D_XFER, S_D_STOP, S_D_CRC, S_D_ACK, S_DONE
  } state_t;

  state_t      state;
  bus_op_t     op_q;
  logic [7:0]  cnt;
  logic [24:0] left;
  logic        crc_init, crc_en;
  logic [1:0]  dmarq_s, iordy_s;
  logic        dmarq_q, iordy_q;   // synchronised DMARQ and IORDY

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dmarq_s <= 2'b00;
      iordy_s <= 2'b11;
    end else begin
      dmarq_s <= {dmarq_s[0], dmarq};
      iordy_s <= {iordy_s[0], iordy};
    end
  end
  assign dmarq_q = dmarq_s[1];
  assign iordy_q = iordy_s[1];

  // the burst's CRC, folded as each word goes out on DD
  ata_crc16 u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .init (crc_init),
    .en   (crc_en),
    .data (src_data),
    .crc  (crc)
  );

  logic take_dma;   // a UDMA word leaves the buffer this clock
  assign take_dma  = (state == S_D_XFER) && (cnt == 8'd0) && (left != 25'd0)
                     && !iordy_q && src_valid;
  assign crc_init  = (state == S_IDLE) && req && (op == OP_DMA_OUT);
  assign crc_en    = take_dma;
  assign src_pop   = take_dma || ((state == S_SRC) && src_valid);
  assign dma_pause = (state == S_D_XFER) && (cnt == 8'd0) && (left != 25'd0)
                     && !(!iordy_q && src_valid);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      op_q    <= OP_REG_WR;
      cnt     <= '0;
      left    <= '0;
      done    <= 1'b0;
      rdata   <= '0;
      dd_o    <= '0;
      dd_oe   <= 1'b0;
      da      <= '0;
      cs0_n   <= 1'b1;
      cs1_n   <= 1'b1;
      dior_n  <= 1'b1;
      diow_n  <= 1'b1;
      dmack_n <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          op_q <= op;
          cnt  <= '0;
          unique case (op)
            OP_DMA_OUT: begin
              left  <= dma_words;
              state <= S_D_WAITRQ;
            end
            OP_DATA_WR: state <= S_SRC;
            default: begin
              dd_o  <= wdata;
              state <= S_SETUP;
            end
          endcase
          da    <= (op == OP_DATA_WR) ? REG_DATA.da : addr.da;
          cs0_n <= (op == OP_DATA_WR) ? 1'b0 : addr.ctl_blk;
          cs1_n <= (op == OP_DATA_WR) ? 1'b1 : !addr.ctl_blk;
          if (op == OP_DMA_OUT) begin
            cs0_n <= 1'b1;
            cs1_n <= 1'b1;
          end
        end

        // ---------------- PIO cycle ----------------
        S_SRC: if (src_valid) begin
          dd_o  <= src_data;
          state <= S_SETUP;
        end
        S_SETUP: begin
          dd_oe <= (op_q != OP_REG_RD);
          if (cnt == 8'(PIO_T1 - 1)) begin
            cnt   <= '0;
            state <= S_ACTIVE;
            if (op_q == OP_REG_RD) dior_n <= 1'b0;
            else                   diow_n <= 1'b0;
          end else cnt <= cnt + 1'b1;
        end
        S_ACTIVE: begin
          if (cnt >= 8'(PIO_T2 - 1) && iordy_q) begin
            cnt    <= '0;
            dior_n <= 1'b1;
            diow_n <= 1'b1;
            if (op_q == OP_REG_RD) rdata <= dd_i;
            state  <= S_REC;
          end else if (cnt < 8'(PIO_T2 - 1)) cnt <= cnt + 1'b1;
        end
        S_REC: begin
          if (cnt == 8'(PIO_T2I - 1)) begin
            cnt   <= '0;
            dd_oe <= 1'b0;
            cs0_n <= 1'b1;
            cs1_n <= 1'b1;
            state <= S_DONE;
          end else cnt <= cnt + 1'b1;
        end

        // ---------------- Ultra DMA data-out burst ----------------
        S_D_WAITRQ: if (dmarq_q) begin
          dmack_n <= 1'b0;
          diow_n  <= 1'b0;     // STOP negated
          dior_n  <= 1'b1;     // HSTROBE high
          dd_oe   <= 1'b1;
          state   <= S_D_WAITRDY;
        end
        S_D_WAITRDY: if (!iordy_q) begin   // DDMARDY- asserted
          cnt   <= '0;
          state <= S_D_XFER;
        end
        S_D_XFER: begin
          if (cnt == 8'd0) begin
            if (left == 25'd0) begin
              diow_n <= 1'b1;  // STOP asserted
              state  <= S_D_STOP;
            end else if (take_dma) begin
              dd_o <= src_data;
              cnt  <= (UDMA_HALF > 1) ? 8'd1 : 8'd0;
            end
          end else if (cnt == 8'(UDMA_HALF - 1)) begin
            dior_n <= !dior_n;  // the HSTROBE edge that carries the word
            left   <= left - 1'b1;
            cnt    <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_D_STOP: if (!dmarq_q) begin
          dior_n <= 1'b1;      // HSTROBE back high
          dd_o   <= crc;
          cnt    <= '0;
          state  <= S_D_CRC;
        end
        S_D_CRC: begin
          if (cnt == 8'(UDMA_HALF - 1)) begin
            dmack_n <= 1'b1;   // disk latches the CRC on this edge
            cnt     <= '0;
            state   <= S_D_ACK;
          end else cnt <= cnt + 1'b1;
        end
        S_D_ACK: begin
          dd_oe  <= 1'b0;
          diow_n <= 1'b1;
          state  <= S_DONE;
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DMACK- is only asserted while the chip selects are both negated
  a_dmack_cs: assert property (@(posedge clk) disable iff (!rst_n) !dmack_n |-> (cs0_n && cs1_n))
    else $error("DMACK- asserted with a chip select active");
  a_req_only_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> state == S_IDLE)
    else $error("request while busy");

  initial assert (UDMA_HALF >= 2) else $error("UDMA_HALF must be at least 2");

endmodule
