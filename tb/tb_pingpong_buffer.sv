// tb_pingpong_buffer: random writes (only while wr_free says there is
// room) and random reads. Checks against a word-count reference: the words
// come out in order; rd_valid is high exactly when a whole bank has been
// written and not yet read; wr_free equals two banks minus the words held,
// where a bank under read is held until its last word leaves. Both banks
// full (writer stalled) and both empty (reader starved) must occur.
module tb_pingpong_buffer;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [9:0]  wr_free;
  logic        rd_valid;
  logic [1:0]  full_banks;
  int checks = 0, failures = 0;

  pingpong_buffer #(.DEPTH(DEPTH), .W(16)) dut (
    .clk(clk), .rst_n(rst_n), .flush(1'b0), .wr_en(wr_en), .wr_data(wr_data), .wr_free(wr_free),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_en(rd_en), .full_banks(full_banks));

  always #5 clk = !clk;

  int written = 0, rd_cnt = 0, n_both_full = 0, n_empty = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d (written %0d read %0d)", what, got, exp, written, rd_cnt);
    end
  endtask

  initial begin
    int wr_pct;
    int rd_pct;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      wr_pct = (n / 2500) % 2 ? 30 : 90;
      rd_pct = (n / 2500) % 2 ? 90 : 30;
      @(negedge clk);
      // reference checks of the state after the last edge
      expect_eq(int'(wr_free), 2 * DEPTH - (written - (rd_cnt / DEPTH) * DEPTH), "wr_free");
      expect_eq(int'(rd_valid), int'((written / DEPTH) > (rd_cnt / DEPTH)), "rd_valid");
      if (rd_valid) expect_eq(int'(rd_data), rd_cnt & 16'hFFFF, "rd_data");
      if (full_banks == 2'b11) n_both_full++;
      if (full_banks == 2'b00 && wr_free == 10'(2 * DEPTH)) n_empty++;
      wr_en   = (wr_free != 0) && (($urandom % 100) < wr_pct);
      wr_data = 16'(written);
      rd_en   = ($urandom % 100) < rd_pct;
      @(posedge clk);
      if (wr_en) written++;
      if (rd_en && rd_valid) rd_cnt++;
    end
    checks++;
    if (n_both_full == 0 || n_empty == 0 || rd_cnt < 5 * DEPTH) begin
      failures++;
      $display("FAIL coverage: both full %0d, empty %0d, read %0d", n_both_full, n_empty, rd_cnt);
    end
    $display("read %0d words, both full %0d clocks, empty %0d clocks", rd_cnt, n_both_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
