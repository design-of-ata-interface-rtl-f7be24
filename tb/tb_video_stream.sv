// tb_video_stream: the card at its default parameters recording a VGA
// stream (640 x 480 pixels, one byte each, 30 frames/s = 9,216,000 B/s)
// without a break. The camera model delivers two 4-bit samples per pixel
// on an 18.432 MHz sample clock, gate always high, so the CPLD produces
// 4.608 M words/s. The AVR tasks record the stream with four WRITE DMA EXT
// commands of 64 sectors each, issued back to back, at the last 256 sectors
// of a 2160 GB disk (30 days of one 720P channel at 3 GB per hour), so
// the 48-bit LBA is above 2^32. The FPGA clock is 50 MHz.
// Checks: the FIFO never fills and the CPLD never drops a word; every word
// reaches the disk in order at the right LBA with a good burst CRC; the
// LBA and sector count arrive intact at the disk for each command; the
// average rate the card writes is at least the camera rate. The peak FIFO
// fill and the rates are printed.
module tb_video_stream;
  import ata_pkg::*;
  localparam int  SECS_PER_CMD = 64;
  localparam int  NCMDS        = 4;
  localparam int  NWORDS       = SECS_PER_CMD * 256 * NCMDS;
  localparam longint DISK_SECTORS = 64'd2160_000_000_000 / 512;
  localparam longint LBA0      = DISK_SECTORS - SECS_PER_CMD * NCMDS;
  localparam int  MEMW         = 65536;

  logic clk = 0, cam_clk = 0, rst_n = 1, cam_rst_n = 1;
  logic cam_en = 0, cam_gate = 0;
  logic [3:0] cam_d = 0;
  logic [15:0] fifo_d, fifo_q;
  logic fifo_wen_n, fifo_ff_n, fifo_ren_n, fifo_ef_n, fifo_hf_n, fifo_pae_n, fifo_paf_n;
  logic cam_overflow, fifo_starved, dma_pause, card_busy, ctl_oe;
  logic [1:0] full_banks;
  logic [15:0] cam_words, dma_crc;
  logic avr_we = 0, avr_re = 0;
  logic [3:0] avr_addr = 0;
  logic [7:0] avr_wdata = 0, avr_rdata;
  logic [15:0] dd_o, dd_dev, dd_i;
  logic dd_oe, dd_dev_oe, cs0_n, cs1_n, dior_n, diow_n, dmack_n, dmarq, iordy, intrq, ata_rst_n;
  logic [2:0] da;
  int checks = 0, failures = 0;

  memcard_top dut (
    .cam_clk(cam_clk), .cam_rst_n(cam_rst_n), .cam_en(cam_en), .cam_gate(cam_gate), .cam_d(cam_d),
    .fifo_d(fifo_d), .fifo_wen_n(fifo_wen_n), .fifo_ff_n(fifo_ff_n), .cam_overflow(cam_overflow),
    .clk(clk), .rst_n(rst_n), .fifo_q(fifo_q), .fifo_ren_n(fifo_ren_n), .fifo_ef_n(fifo_ef_n),
    .fifo_hf_n(fifo_hf_n), .fifo_pae_n(fifo_pae_n), .fifo_paf_n(fifo_paf_n),
    .avr_we(avr_we), .avr_re(avr_re), .avr_addr(avr_addr), .avr_wdata(avr_wdata), .avr_rdata(avr_rdata),
    .ata_dd_o(dd_o), .ata_dd_oe(dd_oe), .ata_dd_i(dd_i), .ata_da(da), .ata_cs0_n(cs0_n),
    .ata_cs1_n(cs1_n), .ata_dior_n(dior_n), .ata_diow_n(diow_n), .ata_dmack_n(dmack_n),
    .ata_dmarq(dmarq), .ata_iordy(iordy), .ata_intrq(intrq), .ata_rst_n(ata_rst_n),
    .ata_ctl_oe(ctl_oe), .fifo_starved(fifo_starved), .dma_pause(dma_pause),
    .full_banks(full_banks), .card_busy(card_busy), .cam_words(cam_words), .dma_crc(dma_crc));

  ext_fifo_model #(.DEPTH(4096)) fifo (
    .wclk(cam_clk), .wen_n(fifo_wen_n), .d(fifo_d), .ff_n(fifo_ff_n),
    .rclk(clk), .ren_n(fifo_ren_n), .q(fifo_q), .ef_n(fifo_ef_n),
    .hf_n(fifo_hf_n), .pae_n(fifo_pae_n), .paf_n(fifo_paf_n));

  ata_disk_model #(.MEM_WORDS(MEMW)) disk (
    .clk(clk), .rst_n(ata_rst_n), .dd_host(dd_oe ? dd_o : 16'h0), .dd_dev(dd_dev),
    .dd_dev_oe(dd_dev_oe), .da(da), .cs0_n(cs0_n), .cs1_n(cs1_n), .dior_n(dior_n),
    .diow_n(diow_n), .dmack_n(dmack_n), .dmarq(dmarq), .iordy(iordy), .intrq(intrq));

  assign dd_i = dd_dev_oe ? dd_dev : dd_o;

  always #10 clk = !clk;                // 50 MHz FPGA clock
  always #27.127 cam_clk = !cam_clk;    // 18.432 MHz sample clock, two per pixel

  function automatic logic [15:0] word_k(input int k);
    return 16'(k * 31421 + 7);
  endfunction

  // ---------------- camera: a gapless stream ----------------
  int cam_sent = 0;
  realtime t_first = 0, t_cam = 0, t_last = 0;
  initial begin
    int nib = 0;
    forever begin
      @(negedge cam_clk);
      if (cam_en && cam_sent < NWORDS) begin
        if (cam_sent == 0 && nib == 0) t_first = $realtime;
        cam_gate = 1;
        cam_d = 4'(word_k(cam_sent) >> (4 * nib));
        nib++;
        if (nib == 4) begin nib = 0; cam_sent++; end
        if (cam_sent == NWORDS) t_cam = $realtime;
      end else cam_gate = 0;
    end
  end

  int peak = 0, n_full = 0;
  always @(negedge cam_clk or negedge clk) begin
    if (fifo.wp - fifo.rp > peak) peak = fifo.wp - fifo.rp;
    if (!fifo_ff_n) n_full++;
  end

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic avr_write(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk);
    avr_we = 1; avr_addr = a; avr_wdata = d;
    @(negedge clk);
    avr_we = 0;
  endtask

  task automatic avr_read(input logic [3:0] a, output logic [7:0] d);
    @(negedge clk);
    avr_addr = a;
    #1 d = avr_rdata;
  endtask

  initial begin
    logic [7:0] sw;
    longint lba;
    int n_bad;
    real cam_rate, card_rate;
    #1 rst_n = 0; cam_rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; cam_rst_n = 1;
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
    avr_write(AVR_CTRL, 8'h01);
    cam_en = 1;

    for (int c = 0; c < NCMDS; c++) begin
      lba = LBA0 + longint'(c * SECS_PER_CMD);
      avr_write(AVR_COUNT_HI, 8'(SECS_PER_CMD >> 8));
      avr_write(AVR_COUNT,    8'(SECS_PER_CMD));
      avr_write(AVR_LBA_LO,   lba[7:0]);
      avr_write(AVR_LBA_MID,  lba[15:8]);
      avr_write(AVR_LBA_HI,   lba[23:16]);
      avr_write(AVR_LBA3,     lba[31:24]);
      avr_write(AVR_LBA4,     lba[39:32]);
      avr_write(AVR_LBA5,     lba[47:40]);
      avr_write(AVR_DEVICE,   8'h40);
      avr_write(AVR_COMMAND,  CMD_WRITE_DMA_EXT);
      do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
      expect_eq(sw & 8'hE0, 8'h40, "WRITE DMA EXT status");
      expect_eq(disk.n_sectors_cmd, SECS_PER_CMD, "sector count at the disk");
      expect_eq(longint'(disk.lba), lba, "48-bit LBA at the disk");
    end
    t_last = $realtime;

    expect_eq(cam_sent, NWORDS, "camera words sent");
    expect_eq(int'(cam_words), NWORDS % 65536, "words written by the CPLD");
    expect_eq(int'(cam_overflow), 0, "CPLD overflow");
    expect_eq(n_full, 0, "clocks with the FIFO full");
    expect_eq(fifo.n_lost, 0, "words lost at the FIFO");
    expect_eq(disk.n_crc_ok, NCMDS, "bursts with a good CRC");
    expect_eq(disk.n_crc_bad, 0, "bursts with a bad CRC");
    expect_eq(disk.n_dma_words, NWORDS, "words moved by Ultra DMA");
    n_bad = 0;
    for (int k = 0; k < NWORDS; k++) begin
      int idx;
      idx = int'((LBA0 * 256 + longint'(k)) % MEMW);
      checks++;
      if (disk.mem[idx] !== word_k(k)) begin
        failures++;
        if (n_bad++ < 4) $display("FAIL disk word %0d = %h expected %h", k, disk.mem[idx], word_k(k));
      end
    end
    cam_rate  = 2.0 * NWORDS / ((t_cam - t_first) * 1.0e-9) / 1.0e6;
    card_rate = 2.0 * disk.n_dma_words / ((t_last - t_first) * 1.0e-9) / 1.0e6;
    $display("camera sent at %0.3f MB/s; card wrote %0d bytes in %0.3f ms = %0.3f MB/s; FIFO peak %0d of 4096 words",
             cam_rate, 2 * NWORDS, (t_last - t_first) * 1.0e-6, card_rate, peak);
    checks++;
    if (card_rate < 9.0) begin
      failures++;
      $display("FAIL card rate %0.3f MB/s below the camera rate", card_rate);
    end
    checks++;
    if (cam_rate < 9.0) begin
      failures++;
      $display("FAIL camera rate %0.3f MB/s, expected 9.216", cam_rate);
    end

    // the recipient of an Ultra DMA burst must take up to three more words
    // after it negates DDMARDY-; the host must not send more than that
    $display("most words sent after DDMARDY- negated: %0d", disk.max_words_in_pause);
    checks++;
    if (disk.max_words_in_pause > 3) begin
      failures++;
      $display("FAIL %0d words sent after DDMARDY- negated", disk.max_words_in_pause);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
