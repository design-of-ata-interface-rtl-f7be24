// ext_fifo_model: behavioural model of the external dual-clock FIFO chip in
// standard (not first-word-fall-through) mode, 16 of its 18 bits used, for
// testbenches only. WEN- writes D on a rising WCLK; REN- at a rising RCLK
// puts the next word on Q. EF- is updated on RCLK and FF- on WCLK, so each
// flag lags the other side by a clock, as on the real part. HF-, PAE- and
// PAF- follow the fill level.
module ext_fifo_model #(
  parameter int DEPTH  = 4096,
  parameter int AE_LVL = 7,
  parameter int AF_LVL = 7
) (
  input  logic        wclk,
  input  logic        wen_n,
  input  logic [15:0] d,
  output logic        ff_n,
  input  logic        rclk,
  input  logic        ren_n,
  output logic [15:0] q,
  output logic        ef_n,
  output logic        hf_n,
  output logic        pae_n,
  output logic        paf_n
);
  logic [15:0] mem [DEPTH];
  int wp = 0, rp = 0;
  int n_writes = 0, n_reads = 0, n_lost = 0;

  always @(posedge wclk) begin
    int wn;
    wn = wp;
    if (!wen_n) begin
      if (wp - rp < DEPTH) begin
        mem[wp % DEPTH] = d;
        wn = wp + 1;
        n_writes++;
      end else n_lost++;
    end
    wp   <= wn;
    ff_n <= (wn - rp) < DEPTH;
  end

  always @(posedge rclk) begin
    int rn;
    rn = rp;
    if (!ren_n && ef_n) begin
      q  <= mem[rp % DEPTH];
      rn = rp + 1;
      n_reads++;
    end
    rp   <= rn;
    ef_n <= (wp - rn) > 0;
  end

  always_comb begin
    hf_n  = !((wp - rp) > DEPTH / 2);
    pae_n = !((wp - rp) <= AE_LVL);
    paf_n = !((wp - rp) >= DEPTH - AF_LVL);
  end

  initial begin
    ff_n = 1'b1; ef_n = 1'b0; q = '0;
  end
endmodule
