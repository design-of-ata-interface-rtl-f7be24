// ata_ctrl: the ATA interface logic, the controller of the FPGA.
// It holds the register group the AVR writes (a shadow of the ATA-6 task
// file with 48-bit addressing: Features, Sector Count 15:0, LBA 47:0,
// Device, Command) and the status word the AVR reads, and it sequences the
// disk through ata_bus_if:
//  * after reset the register group is cleared, RESET- is held low for
//    RESET_CLKS clocks, and the disk Status register is polled until BSY
//    clears; then the controller is idle;
//  * an AVR write to the Command register sets BUSY in the status word; the
//    task file is forwarded to the disk by PIO register writes: each of
//    Features, Sector Count and LBA low/mid/high twice, high-order byte
//    first (the ATA-6 48-bit form; a 28-bit command uses only the second
//    write), then Device, then Command. The command is then classed:
//      - WRITE DMA (CAh) / WRITE DMA EXT (35h): one Ultra DMA data-out
//        burst of all its sectors;
//      - WRITE SECTORS (30h) / WRITE SECTORS EXT (34h): per sector, poll
//        until DRQ, then SECTOR_WORDS PIO writes of the Data register;
//      - READ SECTORS (20h) / READ SECTORS EXT (24h) / IDENTIFY DEVICE
//        (ECh): per sector, poll until DRQ, then SECTOR_WORDS PIO reads of
//        the Data register into a one-sector buffer, which the AVR empties
//        byte by byte (low byte first) through AVR_RDATA while the status
//        word shows RDRDY; the next sector is fetched when it is empty;
//      - any other code: a non-data command;
//    and the Status register is polled until BSY clears. If ERR or DF is
//    set the Error register is read too. BUSY then clears and DONE sets.
// The sequence power-on init, disk reset, idle, command write, BSY, data or
// non-data process follows the document; the command codes and status bits
// are the ATA standard's; polling instead of waiting on INTRQ, the AVR
// register map, the status word layout and the single burst per command are
// this design's own. A 28-bit command with count 0 moves 256 sectors, an
// EXT command with count 0 moves 65536.
// The disk is shared with the USB bridge, which reads it back to the host:
// AVR_CTRL bit 1 asks the controller to hand the bus over. Once it is idle
// it stops driving the disk (bus_released, acknowledged in AVR_CTRL bit 2)
// and ignores task-file and Command writes until bit 1 is cleared; BUSY
// stays set meanwhile.
// The AVR port is synchronous to clk: avr_we writes avr_wdata to avr_addr;
// avr_rdata shows the register at avr_addr in the same clock; avr_re marks
// the clock in which the AVR takes it (only AVR_RDATA cares).
module ata_ctrl
  import ata_pkg::*;
#(
  parameter int RESET_CLKS   = 1250,  // RESET- low time (25 us at 50 MHz)
  parameter int SECTOR_WORDS = 256    // 16-bit words per sector
) (
  input  logic        clk,
  input  logic        rst_n,
  // AVR register port
  input  logic        avr_we,
  input  logic        avr_re,       // AVR read strobe (advances AVR_RDATA)
  input  logic [3:0]  avr_addr,
  input  logic [7:0]  avr_wdata,
  output logic [7:0]  avr_rdata,
  output logic        fifo_en,      // FIFO read enable for fifo_read_if
  // FIFO flags for the status word (active low, as on the FIFO chip)
  input  logic        fifo_hf_n,
  input  logic        fifo_pae_n,
  input  logic        fifo_paf_n,
  // disk
  output logic        ata_rst_n,    // RESET-
  input  logic        intrq,
  // request port to ata_bus_if
  output logic        bus_req,
  output bus_op_t     bus_op,
  output ata_addr_t   bus_addr,
  output logic [15:0] bus_wdata,
  output logic [24:0] bus_dma_words,
  input  logic        bus_done,
  input  logic [15:0] bus_rdata,
  output logic        busy,
  output logic        bus_released  // ATA control lines to be left floating
);

  typedef enum logic [4:0] {
    S_RST, S_POLL_REQ, S_POLL_WAIT, S_IDLE, S_TF_REQ, S_TF_WAIT,
    S_DATA_REQ, S_DATA_WAIT, S_DMA_REQ, S_DMA_WAIT, S_ERR_REQ, S_ERR_WAIT,
    S_RD_REQ, S_RD_WAIT, S_RD_AVR, S_FINISH, S_REL
  } state_t;

  typedef enum logic [1:0] {PG_RESET, PG_DRQ, PG_DONE} poll_goal_t;

  typedef struct packed {
    logic [7:0] feature;
    logic [7:0] count_hi;
    logic [7:0] lba3;
    logic [7:0] lba4;
    logic [7:0] lba5;
    logic [7:0] count;
    logic [7:0] lba_lo;
    logic [7:0] lba_mid;
    logic [7:0] lba_hi;
    logic [7:0] device;
    logic [7:0] command;
  } taskfile_t;

  state_t      state;
  poll_goal_t  goal;
  taskfile_t   tf;
  logic [7:0]  dstat, derr;
  logic        done_f, err_f;
  logic [1:0]  intrq_s;   // INTRQ through two flip-flops (asynchronous to clk)
  logic        rel_req;   // AVR asks for the bus to be handed over
  logic [3:0]  tf_idx;
  logic [16:0] sec_left;
  logic [$clog2(SECTOR_WORDS+1)-1:0] wcnt;
  logic [$clog2(RESET_CLKS+1)-1:0]   rcnt;

  logic        din;    // data-in command
  logic [15:0] rbuf [SECTOR_WORDS];   // data-in sector for the AVR
  logic [$clog2(SECTOR_WORDS)-1:0] rptr;
  logic        rbyte;  // next AVR_RDATA read returns the high byte
  assign din = (tf.command == CMD_READ_SECTORS) || (tf.command == CMD_READ_SECTORS_EXT)
            || (tf.command == CMD_IDENTIFY);
  logic        ext;    // 48-bit command
  logic [16:0] nsec;   // sectors to move; a count of 0 means 256 (65536 for EXT)
  assign ext  = (tf.command == CMD_WRITE_DMA_EXT) || (tf.command == CMD_WRITE_SECTORS_EXT)
             || (tf.command == CMD_READ_SECTORS_EXT);
  always_comb begin
    if (tf.command == CMD_IDENTIFY) nsec = 17'd1;
    else if (ext) nsec = ({tf.count_hi, tf.count} == 16'd0) ? 17'd65536 : {1'b0, tf.count_hi, tf.count};
    else     nsec = (tf.count == 8'd0) ? 17'd256 : {9'd0, tf.count};
  end

  // ---------------- AVR register port ----------------
  always_comb begin
    unique case (avr_addr)
      AVR_FEATURE: avr_rdata = tf.feature;
      AVR_COUNT:   avr_rdata = tf.count;
      AVR_LBA_LO:  avr_rdata = tf.lba_lo;
      AVR_LBA_MID: avr_rdata = tf.lba_mid;
      AVR_LBA_HI:  avr_rdata = tf.lba_hi;
      AVR_DEVICE:  avr_rdata = tf.device;
      AVR_COMMAND: avr_rdata = tf.command;
      AVR_STATUS: begin
        avr_rdata = '0;
        avr_rdata[SW_BUSY]    = busy;
        avr_rdata[SW_DONE]    = done_f;
        avr_rdata[SW_ERR]     = err_f;
        avr_rdata[SW_INTRQ]   = intrq_s[1];
        avr_rdata[SW_RDRDY]   = (state == S_RD_AVR);
        avr_rdata[SW_FIFO_HF] = !fifo_hf_n;
        avr_rdata[SW_FIFO_AE] = !fifo_pae_n;
        avr_rdata[SW_FIFO_AF] = !fifo_paf_n;
      end
      AVR_DSTAT:   avr_rdata = dstat;
      AVR_DERR:    avr_rdata = derr;
      AVR_CTRL:    avr_rdata = {5'd0, bus_released, rel_req, fifo_en};
      AVR_COUNT_HI: avr_rdata = tf.count_hi;
      AVR_LBA3:    avr_rdata = tf.lba3;
      AVR_LBA4:    avr_rdata = tf.lba4;
      AVR_LBA5:    avr_rdata = tf.lba5;
      AVR_RDATA:   avr_rdata = rbyte ? rbuf[rptr][15:8] : rbuf[rptr][7:0];
      default:     avr_rdata = '0;
    endcase
  end

  // task-file value and address for step tf_idx of the forwarding sequence
  always_comb begin
    bus_wdata = '0;
    bus_addr  = REG_STATUS;
    unique case (state)
      S_TF_REQ, S_TF_WAIT: begin
        unique case (tf_idx)
          4'd0:  begin bus_addr = REG_FEATURE; bus_wdata = 16'd0;                end
          4'd1:  begin bus_addr = REG_FEATURE; bus_wdata = {8'd0, tf.feature};  end
          4'd2:  begin bus_addr = REG_COUNT;   bus_wdata = {8'd0, tf.count_hi}; end
          4'd3:  begin bus_addr = REG_COUNT;   bus_wdata = {8'd0, tf.count};    end
          4'd4:  begin bus_addr = REG_LBA_LO;  bus_wdata = {8'd0, tf.lba3};     end
          4'd5:  begin bus_addr = REG_LBA_LO;  bus_wdata = {8'd0, tf.lba_lo};   end
          4'd6:  begin bus_addr = REG_LBA_MID; bus_wdata = {8'd0, tf.lba4};     end
          4'd7:  begin bus_addr = REG_LBA_MID; bus_wdata = {8'd0, tf.lba_mid};  end
          4'd8:  begin bus_addr = REG_LBA_HI;  bus_wdata = {8'd0, tf.lba5};     end
          4'd9:  begin bus_addr = REG_LBA_HI;  bus_wdata = {8'd0, tf.lba_hi};   end
          4'd10: begin bus_addr = REG_DEVICE;  bus_wdata = {8'd0, tf.device};   end
          default: begin bus_addr = REG_COMMAND; bus_wdata = {8'd0, tf.command}; end
        endcase
      end
      S_ERR_REQ, S_ERR_WAIT: bus_addr = REG_ERROR;
      S_DATA_REQ, S_DATA_WAIT, S_RD_REQ, S_RD_WAIT: bus_addr = REG_DATA;
      default: bus_addr = REG_STATUS;
    endcase
  end

  always_comb begin
    unique case (state)
      S_TF_REQ:   bus_op = OP_REG_WR;
      S_DATA_REQ: bus_op = OP_DATA_WR;
      S_DMA_REQ:  bus_op = OP_DMA_OUT;
      default:    bus_op = OP_REG_RD;
    endcase
  end

  assign bus_req = (state == S_POLL_REQ) || (state == S_TF_REQ) || (state == S_DATA_REQ)
                || (state == S_DMA_REQ) || (state == S_ERR_REQ) || (state == S_RD_REQ);
  assign bus_dma_words = 25'(nsec) * 25'(SECTOR_WORDS);
  assign busy = (state != S_IDLE);
  assign bus_released = (state == S_REL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) intrq_s <= 2'b00;
    else        intrq_s <= {intrq_s[0], intrq};
  end

  // data-in sector buffer, filled from the Data register
  always_ff @(posedge clk) begin
    if (state == S_RD_WAIT && bus_done) rbuf[wcnt[$clog2(SECTOR_WORDS)-1:0]] <= bus_rdata;
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RST;
      goal      <= PG_RESET;
      tf        <= '0;
      dstat     <= '0;
      derr      <= '0;
      done_f    <= 1'b0;
      err_f     <= 1'b0;
      fifo_en   <= 1'b0;
      rel_req   <= 1'b0;
      tf_idx    <= '0;
      sec_left  <= '0;
      wcnt      <= '0;
      rcnt      <= '0;
      rptr      <= '0;
      rbyte     <= 1'b0;
      ata_rst_n <= 1'b0;
    end else begin
      // AVR writes: task file only while idle, control at any time
      if (avr_we) begin
        if (avr_addr == AVR_CTRL) begin
          fifo_en <= avr_wdata[0];
          rel_req <= avr_wdata[1];
        end
        if (state == S_IDLE) begin
          unique case (avr_addr)
            AVR_FEATURE: tf.feature <= avr_wdata;
            AVR_COUNT:   tf.count   <= avr_wdata;
            AVR_LBA_LO:  tf.lba_lo  <= avr_wdata;
            AVR_LBA_MID: tf.lba_mid <= avr_wdata;
            AVR_LBA_HI:  tf.lba_hi  <= avr_wdata;
            AVR_DEVICE:  tf.device  <= avr_wdata;
            AVR_COUNT_HI: tf.count_hi <= avr_wdata;
            AVR_LBA3:    tf.lba3    <= avr_wdata;
            AVR_LBA4:    tf.lba4    <= avr_wdata;
            AVR_LBA5:    tf.lba5    <= avr_wdata;
            default: ;
          endcase
        end
      end

      unique case (state)
        S_RST: begin
          if (rcnt == ($bits(rcnt))'(RESET_CLKS - 1)) begin
            ata_rst_n <= 1'b1;
            goal      <= PG_RESET;
            state     <= S_POLL_REQ;
          end else rcnt <= rcnt + 1'b1;
        end

        S_IDLE: if (avr_we && avr_addr == AVR_COMMAND) begin
          tf.command <= avr_wdata;
          done_f     <= 1'b0;
          err_f      <= 1'b0;
          tf_idx     <= '0;
          state      <= S_TF_REQ;
        end else if (rel_req) state <= S_REL;

        S_REL: if (!rel_req) state <= S_IDLE;

        S_TF_REQ:  state <= S_TF_WAIT;
        S_TF_WAIT: if (bus_done) begin
          if (tf_idx != 4'd11) begin
            tf_idx <= tf_idx + 1'b1;
            state  <= S_TF_REQ;
          end else begin
            sec_left <= nsec;
            unique case (tf.command)
              CMD_WRITE_DMA, CMD_WRITE_DMA_EXT: state <= S_DMA_REQ;
              CMD_WRITE_SECTORS, CMD_WRITE_SECTORS_EXT,
              CMD_READ_SECTORS, CMD_READ_SECTORS_EXT, CMD_IDENTIFY: begin
                goal  <= PG_DRQ;
                state <= S_POLL_REQ;
              end
              default:           begin goal <= PG_DONE; state <= S_POLL_REQ; end
            endcase
          end
        end

        S_POLL_REQ:  state <= S_POLL_WAIT;
        S_POLL_WAIT: if (bus_done) begin
          dstat <= bus_rdata[7:0];
          if (bus_rdata[ST_BSY]) state <= S_POLL_REQ;
          else begin
            unique case (goal)
              PG_RESET: state <= S_IDLE;
              PG_DRQ: begin
                if (bus_rdata[ST_ERR] || bus_rdata[ST_DF]) state <= S_ERR_REQ;
                else if (bus_rdata[ST_DRQ]) begin
                  wcnt  <= '0;
                  state <= din ? S_RD_REQ : S_DATA_REQ;
                end else begin
                  err_f <= 1'b1;   // disk neither wants data nor reports an error
                  state <= S_FINISH;
                end
              end
              default: begin
                if (bus_rdata[ST_ERR] || bus_rdata[ST_DF]) state <= S_ERR_REQ;
                else state <= S_FINISH;
              end
            endcase
          end
        end

        S_DATA_REQ:  state <= S_DATA_WAIT;
        S_DATA_WAIT: if (bus_done) begin
          if (wcnt == ($bits(wcnt))'(SECTOR_WORDS - 1)) begin
            sec_left <= sec_left - 1'b1;
            goal     <= (sec_left == 17'd1) ? PG_DONE : PG_DRQ;
            state    <= S_POLL_REQ;
          end else begin
            wcnt  <= wcnt + 1'b1;
            state <= S_DATA_REQ;
          end
        end

        S_RD_REQ:  state <= S_RD_WAIT;
        S_RD_WAIT: if (bus_done) begin
          if (wcnt == ($bits(wcnt))'(SECTOR_WORDS - 1)) begin
            rptr  <= '0;
            rbyte <= 1'b0;
            state <= S_RD_AVR;
          end else begin
            wcnt  <= wcnt + 1'b1;
            state <= S_RD_REQ;
          end
        end
        S_RD_AVR: if (avr_re && avr_addr == AVR_RDATA) begin
          rbyte <= !rbyte;
          if (rbyte) begin
            rptr <= rptr + 1'b1;
            if (rptr == ($bits(rptr))'(SECTOR_WORDS - 1)) begin
              sec_left <= sec_left - 1'b1;
              goal     <= (sec_left == 17'd1) ? PG_DONE : PG_DRQ;
              state    <= S_POLL_REQ;
            end
          end
        end

        S_DMA_REQ:  state <= S_DMA_WAIT;
        S_DMA_WAIT: if (bus_done) begin
          goal  <= PG_DONE;
          state <= S_POLL_REQ;
        end

        S_ERR_REQ:  state <= S_ERR_WAIT;
        S_ERR_WAIT: if (bus_done) begin
          derr  <= bus_rdata[7:0];
          err_f <= 1'b1;
          state <= S_FINISH;
        end

        S_FINISH: begin
          done_f <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
