// tb_fifo_read_if: a standard-mode FIFO (word on Q one clock after REN-)
// filled at random, a buffer whose free space is granted at random, and a
// random AVR enable. Checks: the words come out in order and complete; REN-
// is never asserted while EF- is low or reading is disabled; no word is
// delivered when the buffer has no room left; the FIFO-to-latch latency is
// two clocks (REN- edge, then latch edge).
module tb_fifo_read_if;
  logic clk = 0, rst_n = 0, enable = 0;
  logic ef_n, ren_n, out_valid, starved;
  logic [15:0] q = 0, out_data;
  logic [9:0]  buf_free;
  int checks = 0, failures = 0;

  fifo_read_if #(.W(16), .FREE_W(10)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .fifo_ef_n(ef_n), .fifo_q(q),
    .fifo_ren_n(ren_n), .buf_free(buf_free), .out_valid(out_valid), .out_data(out_data),
    .starved(starved));

  always #5 clk = !clk;

  logic [15:0] fifo [$];
  int pushed = 0, received = 0, free_words = 0, n_starved = 0, n_full = 0;
  int ren_cyc [$];
  int cyc = 0;

  assign ef_n = (fifo.size() != 0);
  assign buf_free = 10'(free_words);

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // checks on the inputs the DUT saw at this edge
      checks++;
      if (!ren_n && (!ef_n || !enable)) begin
        failures++;
        $display("FAIL REN- with EF-=%b enable=%b", ef_n, enable);
      end
      if (starved) n_starved++;
      if (enable && ef_n && ren_n) n_full++;
      if (out_valid) begin
        checks += 2;
        if (free_words <= 0) begin
          failures++;
          $display("FAIL word delivered with no room");
        end
        if (out_data !== 16'(received)) begin
          failures++;
          $display("FAIL word %0d = %h", received, out_data);
        end
        if (ren_cyc.size() == 0 || ren_cyc.pop_front() != cyc - 2) begin
          failures++;
          $display("FAIL latency at cycle %0d", cyc);
        end
        received++;
        free_words--;
      end
      if (!ren_n && ef_n) begin
        q <= fifo.pop_front();
        ren_cyc.push_back(cyc);
      end
    end
  end

  initial begin
    free_words = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (($urandom % 3) == 0 && pushed < 3000) begin
        fifo.push_back(16'(pushed));
        pushed++;
      end
      if (($urandom % 4) == 0 && free_words < 512) free_words += (n < 3000) ? 1 : 3;
      if (n % 500 == 0) enable = (n / 500) % 4 != 1;
    end
    enable = 1;
    free_words = 600;
    repeat (200) @(negedge clk);
    free_words = 600;
    repeat (3200) @(negedge clk) free_words = 600;
    checks++;
    if (received != pushed || n_starved == 0 || n_full == 0) begin
      failures++;
      $display("FAIL received %0d of %0d, starved %0d, no-room %0d", received, pushed, n_starved, n_full);
    end
    $display("received %0d, starved %0d, no-room %0d", received, n_starved, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
