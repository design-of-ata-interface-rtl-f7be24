// tb_pixel_combiner: drives random 4-bit camera samples with a gate that
// drops at random (also in the middle of a word) and a FIFO-full flag that
// rises at random. A reference built from the samples predicts each 16-bit
// word (first sample in the low nibble), the clock edge at which it must be
// written (two clocks after the edge that takes its last sample), and
// whether it must be dropped because FF- is low at that edge.
module tb_pixel_combiner;
  logic clk = 0, rst_n = 0, enable = 0, gate = 0, ff_n = 1;
  logic [3:0]  cam_d = 0;
  logic [15:0] fifo_d, words_written;
  logic        wen_n, overflow;
  int checks = 0, failures = 0;
  int cyc = 0;

  pixel_combiner dut (.clk(clk), .rst_n(rst_n), .enable(enable), .cam_gate(gate), .cam_d(cam_d),
                      .fifo_d(fifo_d), .fifo_wen_n(wen_n), .fifo_ff_n(ff_n),
                      .overflow(overflow), .words_written(words_written));

  always #5 clk = !clk;

  // reference: words due at a given edge
  logic [15:0] due_word [int];
  logic        ff_at [int];
  int run = 0;
  logic [15:0] acc;
  int n_written = 0, n_dropped = 0, n_partial = 0;
  logic exp_over = 0;

  always @(posedge clk) begin
    cyc++;
    ff_at[cyc] = ff_n;
    if (rst_n) begin
      if (gate && enable) begin
        acc = {cam_d, acc[15:4]};
        run++;
        if (run == 4) begin
          due_word[cyc + 2] = acc;
          run = 0;
        end
      end else begin
        if (run != 0) n_partial++;
        run = 0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (due_word.exists(cyc)) begin
      checks++;
      if (ff_at[cyc]) begin
        if (wen_n || fifo_d !== due_word[cyc]) begin
          failures++;
          $display("FAIL cyc %0d: wen_n=%b d=%h expected write of %h", cyc, wen_n, fifo_d, due_word[cyc]);
        end
        n_written++;
      end else begin
        exp_over = 1;
        if (!wen_n || !overflow) begin
          failures++;
          $display("FAIL cyc %0d: word %h should be dropped (FIFO full)", cyc, due_word[cyc]);
        end
        n_dropped++;
      end
    end else begin
      checks++;
      if (!wen_n) begin
        failures++;
        $display("FAIL cyc %0d: unexpected FIFO write %h", cyc, fifo_d);
      end
    end
    checks++;
    if (overflow !== exp_over) begin
      failures++;
      $display("FAIL cyc %0d: overflow=%b expected %b", cyc, overflow, exp_over);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cam_d = 4'($urandom);
      if (n < 1500) gate = ($urandom % 40) != 0;
      else gate = ($urandom % 8) != 0;
      if (n > 2000) ff_n = ($urandom % 5) != 0;
      if (n == 2800) enable = 0;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (words_written != 16'(n_written)) begin
      failures++;
      $display("FAIL count %0d expected %0d", words_written, n_written);
    end
    checks++;
    if (n_dropped == 0 || n_partial == 0 || n_written < 300) begin
      failures++;
      $display("FAIL coverage: written %0d dropped %0d partial %0d", n_written, n_dropped, n_partial);
    end
    $display("written %0d dropped %0d partial words %0d", n_written, n_dropped, n_partial);
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
