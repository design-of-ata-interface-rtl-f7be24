// tb_memcard_top: the whole card end to end, at its default parameters.
// A camera model streams 4-bit samples on its own 37 MHz pixel clock, in
// lines of 64 words separated by gaps; the behavioural FIFO chip sits
// between the CPLD and FPGA halves; the behavioural disk hangs on the ATA
// bus; AVR tasks drive the register port. Sequence: power-on and disk
// reset, WRITE DMA (4 sectors), WRITE SECTORS by PIO (2 sectors), WRITE DMA
// (2 sectors), IDENTIFY DEVICE read by the AVR, a non-data command, an
// aborted command, the bus handed to the USB bridge (played here by a
// task that reads the disk Status register while the card's control pads
// float) and taken back, then FIFO reading is switched off so the FIFO
// fills and the CPLD reports overflow.
// Checks: the 2048 words on the disk are the camera words in order, the
// disk accepted every CRC, the status word reports each outcome, and each
// mechanism of the design happened at least once (counted below).
module tb_memcard_top;
  import ata_pkg::*;
  localparam int NWORDS = 2048;
  logic clk = 0, cam_clk = 0, rst_n = 1, cam_rst_n = 1;
  logic cam_en = 0, cam_gate = 0;
  logic [3:0] cam_d = 0;
  logic [15:0] fifo_d, fifo_q;
  logic fifo_wen_n, fifo_ff_n, fifo_ren_n, fifo_ef_n, fifo_hf_n, fifo_pae_n, fifo_paf_n;
  logic cam_overflow, fifo_starved, dma_pause, card_busy;
  logic [1:0] full_banks;
  logic [15:0] cam_words, dma_crc;
  logic avr_we = 0, avr_re = 0;
  logic [3:0] avr_addr = 0;
  logic [7:0] avr_wdata = 0, avr_rdata;
  logic [15:0] dd_o, dd_dev, dd_i;
  logic dd_oe, dd_dev_oe, cs0_n, cs1_n, dior_n, diow_n, dmack_n, dmarq, iordy, intrq, ata_rst_n;
  logic [2:0] da;
  logic ctl_oe;
  // the USB bridge's side of the shared ATA bus
  logic br_cs0_n = 1, br_dior_n = 1;
  logic [2:0] br_da = 0;
  logic [2:0] d_da;
  logic d_cs0_n, d_cs1_n, d_dior_n, d_diow_n, d_dmack_n;
  int checks = 0, failures = 0;

  memcard_top dut (
    .cam_clk(cam_clk), .cam_rst_n(cam_rst_n), .cam_en(cam_en), .cam_gate(cam_gate), .cam_d(cam_d),
    .fifo_d(fifo_d), .fifo_wen_n(fifo_wen_n), .fifo_ff_n(fifo_ff_n), .cam_overflow(cam_overflow),
    .clk(clk), .rst_n(rst_n), .fifo_q(fifo_q), .fifo_ren_n(fifo_ren_n), .fifo_ef_n(fifo_ef_n),
    .fifo_hf_n(fifo_hf_n), .fifo_pae_n(fifo_pae_n), .fifo_paf_n(fifo_paf_n),
    .avr_we(avr_we), .avr_re(avr_re), .avr_addr(avr_addr), .avr_wdata(avr_wdata), .avr_rdata(avr_rdata),
    .ata_dd_o(dd_o), .ata_dd_oe(dd_oe), .ata_dd_i(dd_i), .ata_da(da), .ata_cs0_n(cs0_n),
    .ata_cs1_n(cs1_n), .ata_dior_n(dior_n), .ata_diow_n(diow_n), .ata_dmack_n(dmack_n),
    .ata_dmarq(dmarq), .ata_iordy(iordy), .ata_intrq(intrq), .ata_rst_n(ata_rst_n), .ata_ctl_oe(ctl_oe),
    .fifo_starved(fifo_starved), .dma_pause(dma_pause), .full_banks(full_banks),
    .card_busy(card_busy), .cam_words(cam_words), .dma_crc(dma_crc));

  ext_fifo_model #(.DEPTH(4096)) fifo (
    .wclk(cam_clk), .wen_n(fifo_wen_n), .d(fifo_d), .ff_n(fifo_ff_n),
    .rclk(clk), .ren_n(fifo_ren_n), .q(fifo_q), .ef_n(fifo_ef_n),
    .hf_n(fifo_hf_n), .pae_n(fifo_pae_n), .paf_n(fifo_paf_n));

  ata_disk_model #(.MEM_WORDS(4096)) disk (
    .clk(clk), .rst_n(ata_rst_n), .dd_host(dd_oe ? dd_o : 16'h0), .dd_dev(dd_dev),
    .dd_dev_oe(dd_dev_oe), .da(d_da), .cs0_n(d_cs0_n), .cs1_n(d_cs1_n), .dior_n(d_dior_n),
    .diow_n(d_diow_n), .dmack_n(d_dmack_n), .dmarq(dmarq), .iordy(iordy), .intrq(intrq));

  assign dd_i = dd_dev_oe ? dd_dev : dd_o;
  // control lines at the disk: the card's pads when driven, else the bridge
  assign d_da      = ctl_oe ? da      : br_da;
  assign d_cs0_n   = ctl_oe ? cs0_n   : br_cs0_n;
  assign d_cs1_n   = ctl_oe ? cs1_n   : 1'b1;
  assign d_dior_n  = ctl_oe ? dior_n  : br_dior_n;
  assign d_diow_n  = ctl_oe ? diow_n  : 1'b1;
  assign d_dmack_n = ctl_oe ? dmack_n : 1'b1;

  always #10   clk = !clk;       // 50 MHz FPGA clock
  always #13.5 cam_clk = !cam_clk; // 37 MHz pixel clock

  function automatic logic [15:0] word_k(input int k);
    return 16'(k * 40503 + 17);
  endfunction

  // ---------------- camera ----------------
  int cam_target = 0, cam_sent = 0, n_gaps = 0;
  initial begin
    int nib = 0;
    forever begin
      @(negedge cam_clk);
      if (cam_sent < cam_target) begin
        if (nib == 0 && cam_sent % 64 == 0 && cam_gate) begin
          cam_gate = 0;                          // line gap
          n_gaps++;
          repeat (5) @(negedge cam_clk);
        end
        cam_gate = 1;
        cam_d = 4'(word_k(cam_sent) >> (4 * nib));
        nib++;
        if (nib == 4) begin nib = 0; cam_sent++; end
      end else cam_gate = 0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_released = 0, n_bridge_reads = 0;
  int n_rst = 0, n_starve = 0, n_bothfull = 0, n_pause_dev = 0, n_pause_buf = 0;
  logic rst_q = 1;
  always @(posedge clk) if (rst_n) begin
    rst_q <= ata_rst_n;
    if (!ata_rst_n && rst_q) n_rst++;
    if (fifo_starved) n_starve++;
    if (!ctl_oe) n_released++;
    if (full_banks == 2'b11) n_bothfull++;
    if (dma_pause && iordy) n_pause_dev++;
    if (dma_pause && !iordy) n_pause_buf++;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic mech(input int n, input string what);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
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

  task automatic run_cmd(input logic [7:0] cmd, input logic [7:0] cnt, input logic [7:0] lba,
                         output logic [7:0] sw);
    avr_write(AVR_COUNT, cnt);
    avr_write(AVR_LBA_LO, lba);
    avr_write(AVR_LBA_MID, 8'h00);
    avr_write(AVR_LBA_HI, 8'h00);
    avr_write(AVR_DEVICE, 8'h40);
    avr_write(AVR_COMMAND, cmd);
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
  endtask

  initial begin
    logic [7:0] sw, v;
    int n_bad, n_cmds0;
    #1 rst_n = 0; cam_rst_n = 0;     // asynchronous reset before the first clock edge
    repeat (3) @(posedge clk);
    rst_n = 1; cam_rst_n = 1;
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
    cam_en = 1;
    cam_target = NWORDS;
    avr_write(AVR_CTRL, 8'h01);

    run_cmd(CMD_WRITE_DMA, 8'd4, 8'd0, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE DMA 1 status");
    run_cmd(CMD_WRITE_SECTORS, 8'd2, 8'd4, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE SECTORS status");
    run_cmd(CMD_WRITE_DMA, 8'd2, 8'd6, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE DMA 2 status");
    // IDENTIFY DEVICE: one sector of PIO data-in, emptied by the AVR
    avr_write(AVR_COMMAND, CMD_IDENTIFY);
    do avr_read(AVR_STATUS, sw); while (!sw[SW_RDRDY]);
    for (int i = 0; i < 256; i++) begin
      logic [7:0] lo, hi;
      @(negedge clk); avr_addr = AVR_RDATA; avr_re = 1; #1 lo = avr_rdata;
      @(negedge clk); avr_addr = AVR_RDATA; avr_re = 1; #1 hi = avr_rdata;
      expect_eq({hi, lo}, 16'hEC00 ^ i, "IDENTIFY word");
    end
    @(negedge clk); avr_re = 0;
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
    expect_eq(sw & 8'hF0, 8'h40, "IDENTIFY status");
    run_cmd(8'hE7, 8'd0, 8'd0, sw);
    expect_eq(sw & 8'hE0, 8'h40, "non-data status");
    run_cmd(8'h00, 8'd0, 8'd0, sw);
    expect_eq(sw & 8'hE0, 8'h60, "aborted command status");
    avr_read(AVR_DERR, v);
    expect_eq(v, 8'h04, "Error register");

    // hand the disk to the USB bridge, which reads its Status register
    n_cmds0 = disk.n_cmds;
    avr_write(AVR_CTRL, 8'h03);
    do avr_read(AVR_CTRL, v); while (!v[2]);
    expect_eq(ctl_oe, 0, "control pads float while released");
    avr_write(AVR_COMMAND, 8'hE7);   // ignored while released
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); br_da = REG_STATUS.da; br_cs0_n = 0;
      repeat (4) @(negedge clk); br_dior_n = 0;
      repeat (10) @(negedge clk);
      expect_eq(dd_dev_oe, 1, "disk answers the bridge");
      expect_eq(dd_dev[7:0], 8'h51, "Status seen by the bridge");
      n_bridge_reads++;
      br_dior_n = 1;
      repeat (4) @(negedge clk); br_cs0_n = 1;
      repeat (10) @(negedge clk);
    end
    expect_eq(int'(disk.n_cmds), n_cmds0, "no command from the card while released");
    avr_write(AVR_CTRL, 8'h01);
    do avr_read(AVR_CTRL, v); while (v[2]);
    expect_eq(ctl_oe, 1, "control pads driven again");

    n_bad = 0;
    for (int k = 0; k < NWORDS; k++) begin
      checks++;
      if (disk.mem[k] !== word_k(k)) begin
        failures++;
        if (n_bad++ < 4 || k < 4) $display("FAIL disk word %0d = %h expected %h", k, disk.mem[k], word_k(k));
      end
    end
    expect_eq(disk.n_crc_ok, 2, "bursts with a good CRC");
    expect_eq(disk.n_crc_bad, 0, "bursts with a bad CRC");
    expect_eq(int'(cam_words), NWORDS, "words written by the CPLD");
    expect_eq(int'(cam_overflow), 0, "no overflow while reading");

    // stop reading: the FIFO fills and the CPLD drops words
    avr_write(AVR_CTRL, 8'h00);
    cam_target = NWORDS + 4200;
    wait (cam_overflow);
    repeat (20) @(negedge clk);
    avr_read(AVR_STATUS, sw);
    expect_eq(sw & 8'h05, 8'h05, "FIFO half-full and almost-full flags");

    $display("mechanisms:");
    mech(n_rst, "disk reset");
    mech(disk.n_cmds - disk.n_aborts - 4, "non-data command");
    mech(disk.n_pio_in_words, "PIO data-in words (IDENTIFY)");
    mech(disk.n_aborts, "aborted command (ERR)");
    mech(disk.n_pio_words, "PIO data-out words");
    mech(disk.n_dma_words, "UDMA data-out words");
    mech(n_pause_dev, "UDMA pause by DDMARDY-");
    mech(n_pause_buf, "UDMA pause on empty buffer");
    mech(disk.n_iordy_waits, "PIO cycle stretched by IORDY");
    mech(n_bothfull, "both buffers full");
    mech(n_starve, "FIFO empty while reading");
    mech(n_gaps, "camera gate gaps");
    mech(int'(cam_overflow), "FIFO full, word dropped");
    mech(n_released, "bus handed to the USB bridge");
    mech(n_bridge_reads, "bridge read while released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
