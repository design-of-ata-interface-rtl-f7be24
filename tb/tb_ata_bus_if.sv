// tb_ata_bus_if: the ATA bus interface against the behavioural disk.
// Checks PIO register writes and read-back, the PIO cycle length
// (T1 + T2 + T2I clocks plus one clock each to start and finish) and the
// DIOW- pulse width, IORDY stretching, a WRITE DMA burst of two sectors fed
// from a source that stalls at random (words stored in order, the CRC
// accepted by the disk, a word on every HSTROBE edge, UDMA_HALF clocks
// between edges when nothing pauses, pauses by DDMARDY- and by the empty
// source, no more than three words sent after DDMARDY- is negated), and a
// WRITE SECTORS PIO data-out sector.
module tb_ata_bus_if;
  import ata_pkg::*;
  localparam int T1 = 4, T2 = 9, T2I = 17, UH = 2;
  logic clk = 0, rst_n = 0, disk_rst_n = 0;
  logic req = 0;
  bus_op_t op = OP_REG_RD;
  ata_addr_t addr = REG_STATUS;
  logic [15:0] wdata = 0, rdata, crc;
  logic [24:0] dma_words = 0;
  logic busy, done, src_pop, dma_pause;
  logic src_valid;
  logic [15:0] src_data;
  logic [15:0] dd_o, dd_dev, dd_i;
  logic dd_oe, dd_dev_oe;
  logic [2:0] da;
  logic cs0_n, cs1_n, dior_n, diow_n, dmack_n, dmarq, iordy, intrq;
  int checks = 0, failures = 0;

  ata_bus_if #(.PIO_T1(T1), .PIO_T2(T2), .PIO_T2I(T2I), .UDMA_HALF(UH)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .op(op), .addr(addr), .wdata(wdata), .dma_words(dma_words),
    .busy(busy), .done(done), .rdata(rdata), .src_valid(src_valid), .src_data(src_data),
    .src_pop(src_pop), .dd_o(dd_o), .dd_oe(dd_oe), .dd_i(dd_i), .da(da), .cs0_n(cs0_n),
    .cs1_n(cs1_n), .dior_n(dior_n), .diow_n(diow_n), .dmack_n(dmack_n), .dmarq(dmarq),
    .iordy(iordy), .dma_pause(dma_pause), .crc(crc));

  ata_disk_model #(.MEM_WORDS(4096), .IORDY_EVERY(97)) disk (
    .clk(clk), .rst_n(disk_rst_n), .dd_host(dd_oe ? dd_o : 16'h0), .dd_dev(dd_dev),
    .dd_dev_oe(dd_dev_oe), .da(da), .cs0_n(cs0_n), .cs1_n(cs1_n), .dior_n(dior_n),
    .diow_n(diow_n), .dmack_n(dmack_n), .dmarq(dmarq), .iordy(iordy), .intrq(intrq));

  assign dd_i = dd_dev_oe ? dd_dev : dd_o;

  always #5 clk = !clk;

  // word source with random stalls
  int src_n = 0, src_limit = 0, stall_pct = 0;
  logic src_ok;
  always @(negedge clk) src_ok = (($urandom % 100) >= stall_pct);
  assign src_valid = (src_n < src_limit) && src_ok;
  assign src_data  = 16'(src_n * 7 + 3);
  always @(posedge clk) if (src_pop) src_n <= src_n + 1;

  // bus observers
  int cyc = 0, last_edge = 0, min_gap = 1000, n_edges = 0, n_pause_src = 0, n_pause_dev = 0;
  int diow_low = 0, diow_w = 0;
  logic dior_q = 1;
  always @(posedge clk) begin
    cyc++;
    dior_q <= dior_n;
    if (rst_n && !dmack_n && !diow_n && dior_n != dior_q) begin
      n_edges++;
      if (cyc - last_edge < min_gap) min_gap = cyc - last_edge;
      last_edge = cyc;
    end
    if (dma_pause && !iordy) n_pause_src++;
    if (dma_pause && iordy) n_pause_dev++;
    if (!diow_n && dmack_n) diow_low++;
    else if (diow_low != 0) begin diow_w = diow_low; diow_low = 0; end
  end

  task automatic bus(input bus_op_t o, input ata_addr_t a, input logic [15:0] d, output int clocks);
    int c0;
    @(negedge clk);
    op = o; addr = a; wdata = d; req = 1;
    c0 = cyc;
    @(negedge clk);
    req = 0;
    while (!done) @(negedge clk);
    clocks = cyc - c0;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  task automatic wait_not_busy(output logic [7:0] st);
    int clocks;
    do bus(OP_REG_RD, REG_STATUS, 0, clocks); while (rdata[ST_BSY]);
    st = rdata[7:0];
  endtask

  initial begin
    int clocks;
    logic [7:0] st, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    disk_rst_n = 1;
    wait_not_busy(st);
    expect_eq(st, 8'h50, "status after reset");

    // register write / read-back and cycle timing
    for (int i = 0; i < 12; i++) begin
      ata_addr_t a;
      a = '{1'b0, 3'(3 + i % 3)};
      v = 8'($urandom);
      bus(OP_REG_WR, a, {8'h00, v}, clocks);
      expect_eq(clocks, T1 + T2 + T2I + 2, "PIO write cycle length");
      expect_eq(diow_w, T2, "DIOW- pulse width");
      bus(OP_REG_RD, a, 0, clocks);
      expect_eq(clocks, T1 + T2 + T2I + 2, "PIO read cycle length");
      expect_eq(rdata[7:0], v, "register read-back");
    end

    // WRITE DMA, two sectors at LBA 5
    bus(OP_REG_WR, REG_COUNT, 16'd2, clocks);
    bus(OP_REG_WR, REG_LBA_LO, 16'd5, clocks);
    bus(OP_REG_WR, REG_LBA_MID, 16'd0, clocks);
    bus(OP_REG_WR, REG_LBA_HI, 16'd0, clocks);
    bus(OP_REG_WR, REG_COMMAND, {8'h00, CMD_WRITE_DMA}, clocks);
    src_n = 0; src_limit = 512; stall_pct = 10; dma_words = 25'd512;
    bus(OP_DMA_OUT, REG_DATA, 0, clocks);
    expect_eq(n_edges, 512, "HSTROBE edges");
    expect_eq(min_gap, UH, "clocks between HSTROBE edges");
    expect_eq(disk.n_dma_words, 512, "words taken by the disk");
    expect_eq(disk.n_crc_ok, 1, "CRC accepted");
    expect_eq(disk.n_crc_bad, 0, "CRC rejected");
    expect_eq(int'(disk.last_host_crc), int'(crc), "CRC on DD");
    checks++;
    if (n_pause_src == 0 || n_pause_dev == 0) begin
      failures++;
      $display("FAIL pauses: source %0d, DDMARDY- %0d", n_pause_src, n_pause_dev);
    end
    for (int i = 0; i < 512; i++) expect_eq(disk.mem[5 * 256 + i], (i * 7 + 3) & 16'hFFFF, "DMA word");
    wait_not_busy(st);
    expect_eq(st, 8'h50, "status after DMA");

    // a second burst: the CRC must start again from its seed
    bus(OP_REG_WR, REG_COUNT, 16'd1, clocks);
    bus(OP_REG_WR, REG_LBA_LO, 16'd12, clocks);
    bus(OP_REG_WR, REG_COMMAND, {8'h00, CMD_WRITE_DMA}, clocks);
    src_n = 0; src_limit = 256; stall_pct = 0; dma_words = 25'd256;
    bus(OP_DMA_OUT, REG_DATA, 0, clocks);
    expect_eq(disk.n_crc_ok, 2, "second burst CRC accepted");
    for (int i = 0; i < 256; i++) expect_eq(disk.mem[12 * 256 + i], (i * 7 + 3) & 16'hFFFF, "DMA word, burst 2");
    wait_not_busy(st);
    expect_eq(st, 8'h50, "status after second DMA");

    // WRITE SECTORS, one sector at LBA 9, PIO
    bus(OP_REG_WR, REG_COUNT, 16'd1, clocks);
    bus(OP_REG_WR, REG_LBA_LO, 16'd9, clocks);
    bus(OP_REG_WR, REG_COMMAND, {8'h00, CMD_WRITE_SECTORS}, clocks);
    wait_not_busy(st);
    expect_eq(st & 8'h08, 8'h08, "DRQ for PIO data");
    src_n = 0; src_limit = 256; stall_pct = 0;
    for (int i = 0; i < 256; i++) begin
      bus(OP_DATA_WR, REG_DATA, 0, clocks);
      checks++;
      if (clocks < T1 + T2 + T2I + 2) begin
        failures++;
        $display("FAIL short PIO data cycle %0d", clocks);
      end
    end
    wait_not_busy(st);
    expect_eq(st, 8'h50, "status after PIO write");
    expect_eq(disk.n_pio_words, 256, "PIO words");
    checks++;
    if (disk.n_iordy_waits == 0) begin failures++; $display("FAIL no IORDY wait"); end
    for (int i = 0; i < 256; i++) expect_eq(disk.mem[9 * 256 + i], (i * 7 + 3) & 16'hFFFF, "PIO word");

    $display("pauses: source %0d, DDMARDY- %0d; IORDY waits %0d", n_pause_src, n_pause_dev, disk.n_iordy_waits);
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
