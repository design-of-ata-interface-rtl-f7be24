// ata_disk_model: behavioural model of an ATA hard disk, device side of the
// bus, for testbenches only (not synthesizable logic).
// It keeps the command-block registers, stores written sectors in a small
// array (addressed by LBA modulo its size), and answers:
//   WRITE DMA (CAh, 35h) Ultra DMA data-out: DMARQ, DDMARDY- with random
//                        pauses, a word per HSTROBE edge, CRC check at the
//                        release of DMACK-;
//   WRITE SECTORS (30h, 34h) PIO data-out, DRQ per sector;
//   READ SECTORS (20h, 24h), IDENTIFY DEVICE (ECh)  PIO data-in, DRQ per
//                        sector; IDENTIFY returns the words ECxxh ^ index;
// The command-block registers keep their previous contents as the high-order
// bytes, so the EXT commands (34h, 35h) see a 48-bit LBA and 16-bit count.
//   00h (NOP)            aborted: ERR with ABRT in the Error register;
//   anything else        non-data: BSY for BUSY_CLKS, then DRDY.
// RESET- low holds BSY; BSY stays RESET_BUSY_CLKS after its release.
// The pins are sampled on the testbench clock, which must be the host's.
module ata_disk_model #(
  parameter int MEM_WORDS       = 8192,
  parameter int BUSY_CLKS       = 40,
  parameter int RESET_BUSY_CLKS = 200,
  parameter int PAUSE_PCT       = 3,    // % of UDMA clocks that start a DDMARDY- pause
  parameter int IORDY_EVERY     = 97    // every Nth PIO data write waits on IORDY (0: never)
) (
  input  logic        clk,
  input  logic        rst_n,      // RESET-
  input  logic [15:0] dd_host,    // DD as driven by the host
  output logic [15:0] dd_dev,     // DD as driven by the device
  output logic        dd_dev_oe,
  input  logic [2:0]  da,
  input  logic        cs0_n,
  input  logic        cs1_n,
  input  logic        dior_n,
  input  logic        diow_n,
  input  logic        dmack_n,
  output logic        dmarq,
  output logic        iordy,
  output logic        intrq
);

  logic [15:0] mem [MEM_WORDS];
  logic [7:0]  feature, count, lba_lo, lba_mid, lba_hi, device, status, error;
  logic [7:0]  count_p, lba_lo_p, lba_mid_p, lba_hi_p;   // previous contents

  // statistics for the testbench
  int n_cmds = 0, n_dma_words = 0, n_pio_words = 0, n_crc_ok = 0, n_crc_bad = 0;
  int n_ddmardy_pauses = 0, n_iordy_waits = 0, n_resets = 0, n_aborts = 0;
  logic [15:0] last_host_crc;
  int max_words_in_pause = 0;   // most words taken while DDMARDY- was negated
  int words_in_pause = 0;
  logic paused;

  typedef enum {M_IDLE, M_BUSY, M_PIO_OUT, M_PIO_IN, M_DMA, M_DMA_END} mode_t;
  mode_t mode;
  int    n_sectors_cmd;
  int    busy_left, sectors_left, word_idx, pause_left, iordy_left, pio_writes;
  logic  after_busy_drq;
  logic  data_in, ident;
  int    n_pio_in_words = 0;   // after BSY: raise DRQ (more sectors) instead of finishing
  logic  dior_q, diow_q, dmack_q;
  logic [15:0] crc;
  logic [47:0] lba;

  function automatic logic [15:0] crc_step(input logic [15:0] c, input logic [15:0] d);
    logic [15:0] r = c;
    for (int i = 0; i < 16; i++) begin
      logic fb = r[15] ^ d[i];
      r = {r[14:0], fb};
      r[12] = r[12] ^ fb;
      r[5]  = r[5]  ^ fb;
    end
    return r;
  endfunction

  logic cmd_blk;
  assign cmd_blk = !cs0_n && cs1_n;

  // register reads
  always_comb begin
    dd_dev_oe = !dior_n && dmack_n && (cmd_blk || (!cs1_n && cs0_n));
    dd_dev    = '0;
    if (cmd_blk) begin
      unique case (da)
        3'd0: dd_dev = ident ? (16'hEC00 ^ 16'(word_idx))
                             : mem[int'((lba * 256 + 48'(word_idx)) % 48'(MEM_WORDS))];
        3'd1: dd_dev = {8'd0, error};
        3'd2: dd_dev = {8'd0, count};
        3'd3: dd_dev = {8'd0, lba_lo};
        3'd4: dd_dev = {8'd0, lba_mid};
        3'd5: dd_dev = {8'd0, lba_hi};
        3'd6: dd_dev = {8'd0, device};
        3'd7: dd_dev = {8'd0, status};
        default: dd_dev = 16'h0;
      endcase
    end else if (!cs1_n && da == 3'd6) dd_dev = {8'd0, status};
  end

  assign iordy = (mode == M_DMA || mode == M_DMA_END) && !dmack_n ? (pause_left != 0 || mode == M_DMA_END)
                                                                  : (iordy_left == 0);

  task automatic start_command(input logic [7:0] cmd);
    n_cmds++;
    error = 8'h00;
    intrq = 1'b0;
    data_in = (cmd == 8'h20 || cmd == 8'h24 || cmd == 8'hEC);
    ident   = (cmd == 8'hEC);
    if (cmd == 8'h34 || cmd == 8'h35 || cmd == 8'h24) begin
      lba = {lba_hi_p, lba_mid_p, lba_lo_p, lba_hi, lba_mid, lba_lo};
      sectors_left = ({count_p, count} == 16'd0) ? 65536 : int'({count_p, count});
    end else begin
      lba = {24'd0, lba_hi, lba_mid, lba_lo};
      sectors_left = (count == 0) ? 256 : int'(count);
    end
    if (ident) sectors_left = 1;
    n_sectors_cmd = sectors_left;
    word_idx = 0;
    unique case (cmd)
      8'hCA, 8'h35: begin
        status = 8'hD0;                 // BSY while the burst runs
        crc    = 16'h4ABA;
        mode   = M_DMA;
        dmarq  = 1'b1;
      end
      8'h30, 8'h34, 8'h20, 8'h24, 8'hEC: begin
        status = 8'h80;
        busy_left = BUSY_CLKS / 4 + 1;
        after_busy_drq = 1'b1;
        mode = M_BUSY;
      end
      8'h00: begin
        n_aborts++;
        status = 8'h80;
        error  = 8'h04;
        busy_left = BUSY_CLKS;
        after_busy_drq = 1'b0;
        mode = M_BUSY;
      end
      default: begin
        status = 8'h80;
        busy_left = BUSY_CLKS;
        after_busy_drq = 1'b0;
        mode = M_BUSY;
      end
    endcase
  endtask

  logic rst_q = 1'b1;
  always @(posedge clk) begin
    rst_q   <= rst_n;
    if (!rst_n && rst_q) n_resets++;
    dior_q  <= dior_n;
    diow_q  <= diow_n;
    dmack_q <= dmack_n;
    if (!rst_n) begin
      status = 8'h80; error = 8'h01; intrq = 1'b0; dmarq = 1'b0;
      feature = 0; count = 8'h01; lba_lo = 8'h01; lba_mid = 0; lba_hi = 0; device = 0;
      mode = M_BUSY; busy_left = RESET_BUSY_CLKS; after_busy_drq = 1'b0;
      pause_left = 0; iordy_left = 0; pio_writes = 0;
    end else begin
      if (iordy_left > 0) iordy_left--;
      unique case (mode)
        M_BUSY: begin
          if (busy_left > 0) busy_left--;
          else if (after_busy_drq) begin
            status = 8'h58; mode = data_in ? M_PIO_IN : M_PIO_OUT; word_idx = 0;
          end else begin
            status = ((error & 8'h84) != 0) ? 8'h51 : 8'h50;
            intrq  = 1'b1;
            mode   = M_IDLE;
          end
        end
        M_DMA: begin
          if (!dmack_n) begin
            // DDMARDY- as it stood on the bus over the last clock
            paused = (pause_left != 0);
            if (!paused) words_in_pause = 0;
            if (pause_left > 0) pause_left--;
            else if (PAUSE_PCT > 0 && ($urandom % 100) < PAUSE_PCT) begin
              pause_left = 1 + $urandom % 6;
              n_ddmardy_pauses++;
            end
            // one word on every HSTROBE edge while STOP is low
            if (!diow_n && (dior_n != dior_q)) begin
              mem[int'((lba * 256 + 48'(word_idx)) % 48'(MEM_WORDS))] = dd_host;
              crc = crc_step(crc, dd_host);
              word_idx++;
              n_dma_words++;
              if (paused) begin
                words_in_pause++;
                if (words_in_pause > max_words_in_pause) max_words_in_pause = words_in_pause;
              end
            end
            if (diow_n && !diow_q) begin   // host asserted STOP
              dmarq = 1'b0;
              mode  = M_DMA_END;
            end
          end
        end
        M_DMA_END: begin
          if (dmack_n && !dmack_q) begin   // DMACK- released: CRC on DD
            last_host_crc = dd_host;
            if (dd_host == crc && word_idx == n_sectors_cmd * 256) n_crc_ok++;
            else begin
              n_crc_bad++;
              error = 8'h84;               // ICRC + ABRT
            end
            busy_left = BUSY_CLKS;
            after_busy_drq = 1'b0;
            mode = M_BUSY;
          end
        end
        default: ;
      endcase

      // PIO strobe starts: optionally hold IORDY low on a data write
      if (!diow_n && diow_q && dmack_n && cmd_blk && da == 3'd0 && IORDY_EVERY > 0) begin
        pio_writes++;
        if (pio_writes % IORDY_EVERY == 0) begin
          iordy_left = 14;
          n_iordy_waits++;
        end
      end
      // PIO write completes on the rising edge of DIOW-
      if (diow_n && !diow_q && dmack_n && dmack_q && cmd_blk) begin
        unique case (da)
          3'd0: if (mode == M_PIO_OUT) begin
            mem[int'((lba * 256 + 48'(word_idx)) % 48'(MEM_WORDS))] = dd_host;
            word_idx++;
            n_pio_words++;
            if (word_idx % 256 == 0) begin
              sectors_left--;
              lba = lba + 1;
              word_idx = 0;
              status = 8'hD0;
              busy_left = BUSY_CLKS / 4 + 1;
              after_busy_drq = (sectors_left != 0);
              mode = M_BUSY;
            end
          end
          3'd1: feature = dd_host[7:0];
          3'd2: begin count_p   = count;   count   = dd_host[7:0]; end
          3'd3: begin lba_lo_p  = lba_lo;  lba_lo  = dd_host[7:0]; end
          3'd4: begin lba_mid_p = lba_mid; lba_mid = dd_host[7:0]; end
          3'd5: begin lba_hi_p  = lba_hi;  lba_hi  = dd_host[7:0]; end
          3'd6: device  = dd_host[7:0];
          3'd7: start_command(dd_host[7:0]);
          default: ;
        endcase
      end
      // PIO data-in: a word leaves on the rising edge of DIOR-
      if (dior_n && !dior_q && dmack_n && cmd_blk && da == 3'd0 && mode == M_PIO_IN) begin
        word_idx++;
        n_pio_in_words++;
        if (word_idx % 256 == 0) begin
          sectors_left--;
          lba = lba + 1;
          word_idx = 0;
          status = 8'hD0;
          busy_left = BUSY_CLKS / 4 + 1;
          after_busy_drq = (sectors_left != 0);
          mode = M_BUSY;
        end
      end
      // reading Status clears INTRQ
      if (dior_n && !dior_q && dmack_n && cmd_blk && da == 3'd7) intrq = 1'b0;
    end
  end

  initial begin
    mode = M_BUSY; status = 8'h80; dmarq = 1'b0; intrq = 1'b0;
    pause_left = 0; iordy_left = 0; busy_left = RESET_BUSY_CLKS;
    pio_writes = 0; after_busy_drq = 1'b0; error = 0; crc = 16'h4ABA;
    word_idx = 0; sectors_left = 0; lba = 0; last_host_crc = 0;
    feature = 0; count = 0; lba_lo = 0; lba_mid = 0; lba_hi = 0; device = 0;
    data_in = 0; ident = 0;
    count_p = 0; lba_lo_p = 0; lba_mid_p = 0; lba_hi_p = 0; n_sectors_cmd = 0;
    dior_q = 1'b1; diow_q = 1'b1; dmack_q = 1'b1;
    for (int i = 0; i < MEM_WORDS; i++) mem[i] = 16'h0;
  end

endmodule
