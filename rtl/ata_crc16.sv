// ata_crc16: CRC of an Ultra DMA burst.
// The host folds every 16-bit word it sends in a burst into this CRC and puts
// the result on the DD bus when it ends the burst, so the disk can check the
// transfer. The generator is x^16 + x^12 + x^5 + 1 seeded with 4ABAh, as the
// ATA standard fixes (the document only names a CRC check in the ATA data
// channel). The data bits enter the shift register DD0 first, as in the
// standard's parallel equations (f1 = DD0 xor CRCIN15, ...); one whole word
// is folded per clock.
// Interface: init loads the seed, en folds data into crc on the same clock
// edge; crc is registered. init wins over en.
module ata_crc16
  import ata_pkg::*;
#(
  parameter logic [15:0] SEED = UDMA_CRC_SEED,
  parameter logic [15:0] POLY = UDMA_CRC_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [15:0] data,
  output logic [15:0] crc
);

  function automatic logic [15:0] fold(input logic [15:0] c, input logic [15:0] d);
    logic [15:0] r;
    logic        fb;
    r = c;
    for (int i = 0; i < 16; i++) begin
      fb = r[15] ^ d[i];
      r  = {r[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= SEED;
    else if (init) crc <= SEED;
    else if (en)   crc <= fold(crc, data);
  end

endmodule
