// tb_ata_ctrl: the controller with the bus interface and the behavioural
// disk; the AVR is played by tasks on the register port and the data
// buffer by a counting word source. Checks: RESET- held for RESET_CLKS
// clocks and BUSY until the disk is ready; task-file read-back; BUSY set
// the clock after a Command write and task-file writes ignored while busy;
// the task file forwarded to the disk; a non-data command; an aborted
// command (ERR bit and Error register); WRITE SECTORS over two sectors and
// WRITE DMA over three sectors with the data landing at the right LBA;
// 48-bit commands: WRITE DMA EXT of 257 sectors (16-bit count) and WRITE
// SECTORS EXT at LBAs above 2^24, with the 48-bit LBA and count arriving at
// the disk; IDENTIFY DEVICE and a two-sector READ SECTORS read back
// // through the AVR byte port (RDRDY, low byte first); the FIFO enable bit
// and the FIFO flags in the status word; handing the bus to the USB bridge
// (acknowledge, no disk access and Command writes ignored while released,
// normal commands again after it is taken back).
module tb_ata_ctrl;
  import ata_pkg::*;
  localparam int RST = 1250;
  logic clk = 0, rst_n = 0;
  logic avr_we = 0, avr_re = 0;
  logic [3:0] avr_addr = 0;
  logic [7:0] avr_wdata = 0, avr_rdata;
  logic released;
  logic fifo_en, hf_n = 1, pae_n = 1, paf_n = 1, ata_rst_n, intrq, busy;
  logic bus_req, bus_done;
  bus_op_t bus_op;
  ata_addr_t bus_addr;
  logic [15:0] bus_wdata, bus_rdata, crc;
  logic [24:0] bus_dma_words;
  logic src_valid, src_pop, dma_pause;
  logic [15:0] src_data, dd_o, dd_dev, dd_i;
  logic dd_oe, dd_dev_oe, cs0_n, cs1_n, dior_n, diow_n, dmack_n, dmarq, iordy;
  logic [2:0] da;
  int checks = 0, failures = 0;

  ata_ctrl #(.RESET_CLKS(RST), .SECTOR_WORDS(256)) dut (
    .clk(clk), .rst_n(rst_n), .avr_we(avr_we), .avr_re(avr_re), .avr_addr(avr_addr), .avr_wdata(avr_wdata),
    .avr_rdata(avr_rdata), .fifo_en(fifo_en), .fifo_hf_n(hf_n), .fifo_pae_n(pae_n),
    .fifo_paf_n(paf_n), .ata_rst_n(ata_rst_n), .intrq(intrq), .bus_req(bus_req), .bus_op(bus_op),
    .bus_addr(bus_addr), .bus_wdata(bus_wdata), .bus_dma_words(bus_dma_words),
    .bus_done(bus_done), .bus_rdata(bus_rdata), .busy(busy),
    .bus_released(released));

  ata_bus_if u_bus (
    .clk(clk), .rst_n(rst_n), .req(bus_req), .op(bus_op), .addr(bus_addr), .wdata(bus_wdata),
    .dma_words(bus_dma_words), .busy(), .done(bus_done), .rdata(bus_rdata),
    .src_valid(src_valid), .src_data(src_data), .src_pop(src_pop), .dd_o(dd_o), .dd_oe(dd_oe),
    .dd_i(dd_i), .da(da), .cs0_n(cs0_n), .cs1_n(cs1_n), .dior_n(dior_n), .diow_n(diow_n),
    .dmack_n(dmack_n), .dmarq(dmarq), .iordy(iordy), .dma_pause(dma_pause), .crc(crc));

  ata_disk_model #(.MEM_WORDS(4096)) disk (
    .clk(clk), .rst_n(ata_rst_n), .dd_host(dd_oe ? dd_o : 16'h0), .dd_dev(dd_dev),
    .dd_dev_oe(dd_dev_oe), .da(da), .cs0_n(cs0_n), .cs1_n(cs1_n), .dior_n(dior_n),
    .diow_n(diow_n), .dmack_n(dmack_n), .dmarq(dmarq), .iordy(iordy), .intrq(intrq));

  assign dd_i = dd_dev_oe ? dd_dev : dd_o;
  always #5 clk = !clk;

  int src_n = 0;
  assign src_valid = 1'b1;
  assign src_data  = 16'(src_n ^ 16'h5A00);
  always @(posedge clk) if (src_pop) src_n <= src_n + 1;

  int cyc = 0, rst_low = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !ata_rst_n) rst_low++;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
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

  // read one data-in sector through AVR_RDATA
  task automatic avr_sector(output logic [15:0] w [256]);
    logic [7:0] sw, lo, hi;
    do avr_read(AVR_STATUS, sw); while (!sw[SW_RDRDY] && sw[SW_BUSY]);
    expect_eq(sw[SW_RDRDY], 1, "RDRDY");
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); avr_addr = AVR_RDATA; avr_re = 1; #1 lo = avr_rdata;
      @(negedge clk); avr_addr = AVR_RDATA; avr_re = 1; #1 hi = avr_rdata;
      w[i] = {hi, lo};
    end
    @(negedge clk); avr_re = 0;
  endtask

  task automatic run_cmd_in(input logic [7:0] cmd, input logic [7:0] cnt, input logic [7:0] lba,
                            input int nsec, output logic [7:0] sw);
    logic [15:0] w [256];
    avr_write(AVR_COUNT, cnt);
    avr_write(AVR_LBA_LO, lba);
    avr_write(AVR_COMMAND, cmd);
    for (int s = 0; s < nsec; s++) begin
      avr_sector(w);
      for (int i = 0; i < 256; i++) begin
        if (cmd == CMD_IDENTIFY) expect_eq(w[i], 16'hEC00 ^ i, "IDENTIFY word");
        else expect_eq(w[i], disk.mem[(int'(lba) + s) * 256 + i], "READ SECTORS word");
      end
    end
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
  endtask

  task automatic run_cmd(input logic [7:0] cmd, input logic [7:0] cnt, input logic [7:0] lba,
                         output logic [7:0] sw);
    avr_write(AVR_COUNT, cnt);
    avr_write(AVR_LBA_LO, lba);
    avr_write(AVR_LBA_MID, 8'h00);
    avr_write(AVR_LBA_HI, 8'h00);
    avr_write(AVR_DEVICE, 8'h40);
    avr_write(AVR_COMMAND, cmd);
    avr_read(AVR_STATUS, sw);
    expect_eq(sw[SW_BUSY], 1, "BUSY after command write");
    avr_write(AVR_LBA_LO, 8'hEE);         // ignored while busy
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
    avr_read(AVR_LBA_LO, sw);
    expect_eq(sw, lba, "task file kept while busy");
    avr_read(AVR_STATUS, sw);
  endtask

  initial begin
    logic [7:0] sw, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do avr_read(AVR_STATUS, sw); while (sw[SW_BUSY]);
    expect_eq(rst_low, RST, "RESET- low clocks");
    expect_eq(disk.n_resets, 1, "disk reset");

    for (int a = 0; a < 15; a++) begin
      if (a == 6 || (a >= 7 && a <= 10)) continue;
      v = 8'($urandom);
      avr_write(4'(a), v);
      avr_read(4'(a), sw);
      expect_eq(sw, v, "task-file read-back");
    end

    // non-data command with a Features value
    avr_write(AVR_FEATURE, 8'h03);
    run_cmd(8'hEF, 8'h44, 8'h12, sw);
    expect_eq(sw & 8'hE0, 8'h40, "non-data: DONE, no error");
    expect_eq(disk.feature, 8'h03, "Features forwarded");
    expect_eq(disk.count, 8'h44, "Count forwarded");
    expect_eq(disk.lba_lo, 8'h12, "LBA forwarded");
    expect_eq(disk.device, 8'h40, "Device forwarded");
    avr_read(AVR_DSTAT, v);
    expect_eq(v, 8'h50, "disk status");

    // aborted command
    run_cmd(8'h00, 8'h01, 8'h00, sw);
    expect_eq(sw & 8'hE0, 8'h60, "abort: DONE and ERR");
    avr_read(AVR_DERR, v);
    expect_eq(v, 8'h04, "Error register ABRT");

    // PIO data-out, two sectors at LBA 3
    src_n = 0;
    run_cmd(CMD_WRITE_SECTORS, 8'd2, 8'd3, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE SECTORS done");
    expect_eq(disk.n_pio_words, 512, "PIO words");
    for (int i = 0; i < 512; i++) expect_eq(disk.mem[3 * 256 + i], i ^ 16'h5A00, "PIO data");

    // PIO data-in: IDENTIFY DEVICE, then READ SECTORS of the two sectors above
    run_cmd_in(CMD_IDENTIFY, 8'd0, 8'd0, 1, sw);
    expect_eq(sw & 8'hF0, 8'h40, "IDENTIFY done");
    run_cmd_in(CMD_READ_SECTORS, 8'd2, 8'd3, 2, sw);
    expect_eq(sw & 8'hF0, 8'h40, "READ SECTORS done");
    expect_eq(disk.n_pio_in_words, 768, "PIO data-in words");

    // Ultra DMA data-out, three sectors at LBA 7
    src_n = 0;
    run_cmd(CMD_WRITE_DMA, 8'd3, 8'd7, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE DMA done");
    expect_eq(disk.n_dma_words, 768, "DMA words");
    expect_eq(disk.n_crc_ok, 1, "DMA CRC");
    for (int i = 0; i < 768; i++) expect_eq(disk.mem[7 * 256 + i], i ^ 16'h5A00, "DMA data");

    // 48-bit: WRITE DMA EXT, 257 sectors at LBA 8000_0100_0002h
    src_n = 0;
    avr_write(AVR_COUNT_HI, 8'h01);
    avr_write(AVR_LBA3, 8'h01);
    avr_write(AVR_LBA4, 8'h00);
    avr_write(AVR_LBA5, 8'h80);
    run_cmd(CMD_WRITE_DMA_EXT, 8'd1, 8'd2, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE DMA EXT done");
    expect_eq(disk.n_sectors_cmd, 257, "EXT sector count at the disk");
    checks++;
    if (disk.lba !== 48'h8000_0100_0002) begin
      failures++;
      $display("FAIL EXT LBA at the disk: %h", disk.lba);
    end
    expect_eq(disk.n_dma_words, 768 + 257 * 256, "EXT DMA words");
    expect_eq(disk.n_crc_ok, 2, "EXT DMA CRC");
    begin
      logic [15:0] expv [4096];
      for (int i = 0; i < 4096; i++) expv[i] = disk.mem[i];
      for (int i = 0; i < 257 * 256; i++) expv[(2 * 256 + i) % 4096] = 16'(i ^ 16'h5A00);
      for (int i = 0; i < 4096; i++) expect_eq(disk.mem[i], expv[i], "EXT DMA data");
    end
    // 48-bit PIO: WRITE SECTORS EXT, one sector at LBA 0000_2300_000Bh
    src_n = 0;
    avr_write(AVR_COUNT_HI, 8'h00);
    avr_write(AVR_LBA3, 8'h23);
    avr_write(AVR_LBA5, 8'h00);
    run_cmd(CMD_WRITE_SECTORS_EXT, 8'd1, 8'd11, sw);
    expect_eq(sw & 8'hE0, 8'h40, "WRITE SECTORS EXT done");
    expect_eq(disk.n_sectors_cmd, 1, "EXT PIO sector count");
    checks++;
    if (disk.lba !== 48'h0000_2300_000C) begin   // the model advances LBA per sector
      failures++;
      $display("FAIL EXT PIO LBA at the disk: %h", disk.lba);
    end
    for (int i = 0; i < 256; i++) expect_eq(disk.mem[11 * 256 + i], i ^ 16'h5A00, "EXT PIO data");

    // FIFO enable and flags
    avr_write(AVR_CTRL, 8'h01);
    expect_eq(fifo_en, 1, "FIFO enable");
    hf_n = 0; pae_n = 1; paf_n = 0;
    avr_read(AVR_STATUS, sw);
    expect_eq(sw & 8'h07, 8'h05, "FIFO flags");
    avr_write(AVR_CTRL, 8'h00);
    expect_eq(fifo_en, 0, "FIFO disable");

    // bus hand-over to the USB bridge
    begin
      int cmds0, reqs;
      cmds0 = disk.n_cmds;
      avr_write(AVR_CTRL, 8'h02);
      avr_read(AVR_CTRL, v);
      expect_eq(v, 8'h06, "release acknowledged");
      expect_eq(released, 1, "bus released");
      avr_read(AVR_STATUS, sw);
      expect_eq(sw[SW_BUSY], 1, "BUSY while released");
      avr_write(AVR_LBA_LO, 8'h77);
      avr_write(AVR_COMMAND, 8'hEF);
      reqs = 0;
      repeat (500) begin
        @(posedge clk);
        if (bus_req || !cs0_n || !cs1_n || !dmack_n) reqs++;
      end
      expect_eq(reqs, 0, "no disk access while released");
      expect_eq(disk.n_cmds, cmds0, "Command ignored while released");
      avr_read(AVR_LBA_LO, v);
      expect_eq(v, 8'd11, "task file frozen while released");
      avr_write(AVR_CTRL, 8'h00);
      avr_read(AVR_CTRL, v);
      expect_eq(v, 8'h00, "bus taken back");
      run_cmd(8'hEF, 8'h01, 8'h05, sw);
      expect_eq(sw & 8'hE0, 8'h40, "command after taking the bus back");
      expect_eq(disk.n_cmds, cmds0 + 1, "one command after taking the bus back");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
