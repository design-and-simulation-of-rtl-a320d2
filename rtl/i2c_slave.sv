// i2c_slave: I2C slave with a register file as its data storage.
//
// The slave oversamples SCL and SDA with the system clock (two-flop
// synchronizers) and works from the edges it sees:
//   START (SDA falls while SCL is high) -> receive the address byte
//   STOP  (SDA rises while SCL is high) -> idle
//   SCL rising edge  -> sample SDA
//   SCL falling edge -> change what the slave drives on SDA
// After the address byte it compares the 7 address bits with SLAVE_ADDR.
// On a match it acknowledges (pulls SDA low for the ninth clock); otherwise it
// stays silent until the next START. The next byte is the register address
// (its low REG_AW bits select one of 2**REG_AW byte registers); it is
// acknowledged too. Then
//   write (R/W = 0): every further byte is stored at the register pointer,
//                    acknowledged, and the pointer steps on; once the last
//                    register has been written the slave can accept no
//                    more, so it leaves SDA high (NACK) on the next byte,
//                    drops it and waits for STOP;
//   read  (R/W = 1): the slave shifts out the register at the pointer, MSB
//                    first, and keeps sending the following registers while
//                    the master acknowledges; after a NACK it waits for STOP.
// Address compare, ACK by pulling SDA low, the register address sent by the
// master before the data, the NACK on the byte after the last one it can
// accept, the 7-bit register field and the clock-disable path on SCL follow
// the source design. The register file with an auto-incrementing
// pointer, the single preset register and the `stretch` request input are
// this design's own choices.
//
// Clock stretching: while `stretch` is high, an addressed slave holds SCL low
// from the next SCL falling edge until `stretch` drops.
//
// Reset clears every register and then loads PRESET_DATA at PRESET_REG.
// Timing: SDA is changed 3 clock cycles after each SCL falling edge on the
// bus (2 synchronizer stages + 1 output register), so the SCL low time must
// be longer than that.
module i2c_slave
  import i2c_pkg::*;
#(
  parameter logic [ADDR_W-1:0] SLAVE_ADDR  = 7'b1001001,
  parameter int unsigned       REG_AW      = 7,
  parameter logic [REG_AW-1:0] PRESET_REG  = 7'b1001010,
  parameter logic [DATA_W-1:0] PRESET_DATA = 8'b00011101
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     scl_i,
  input  logic     sda_i,
  input  logic     stretch,       // request to hold SCL low (clock disable)
  output logic     scl_pull_low,
  output logic     sda_pull_low,
  output logic     selected,      // addressed since the last START
  output s_state_e state
);

  // ---------------------------------------------------------------- inputs
  logic [2:0] scl_sync, sda_sync;   // [2] is the previous synchronized value
  logic       scl_s, sda_s, scl_p, sda_p;
  logic       scl_rise, scl_fall, start_c, stop_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 3'b111;
      sda_sync <= 3'b111;
    end else begin
      scl_sync <= {scl_sync[1:0], scl_i};
      sda_sync <= {sda_sync[1:0], sda_i};
    end
  end

  assign scl_s    = scl_sync[1];
  assign sda_s    = sda_sync[1];
  assign scl_p    = scl_sync[2];
  assign sda_p    = sda_sync[2];
  assign scl_rise = scl_s && !scl_p;
  assign scl_fall = !scl_s && scl_p;
  assign start_c  = scl_s && scl_p && sda_p && !sda_s;
  assign stop_c   = scl_s && scl_p && !sda_p && sda_s;

  // -------------------------------------------------------------- storage
  localparam int unsigned NREG = 2 ** REG_AW;

  logic [DATA_W-1:0] regs [NREG];
  logic [REG_AW-1:0] ptr;

  // ------------------------------------------------------------ core logic
  logic [DATA_W-1:0] shreg;
  logic [3:0]        bit_cnt;
  logic              rw_r;
  logic              mack;       // master acknowledged the byte we sent
  s_state_e          after_ack;  // state that follows the ACK we drive
  logic              wr_en;
  logic              wr_full;    // last register written in this transfer

  assign wr_en = (state == S_WDATA) && scl_fall && (bit_cnt == 4'd8) && !wr_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      after_ack    <= S_IDLE;
      shreg        <= '0;
      bit_cnt      <= '0;
      rw_r         <= RW_WRITE;
      mack         <= 1'b0;
      ptr          <= '0;
      wr_full      <= 1'b0;
      selected     <= 1'b0;
      sda_pull_low <= 1'b0;
    end else if (start_c) begin
      state        <= S_ADDR;
      wr_full      <= 1'b0;
      bit_cnt      <= '0;
      selected     <= 1'b0;
      sda_pull_low <= 1'b0;
    end else if (stop_c) begin
      state        <= S_IDLE;
      selected     <= 1'b0;
      sda_pull_low <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;

        S_ADDR, S_REG, S_WDATA: begin
          if (scl_rise && bit_cnt != 4'd8) begin
            shreg   <= {shreg[DATA_W-2:0], sda_s};
            bit_cnt <= bit_cnt + 4'd1;
          end else if (scl_fall && bit_cnt == 4'd8) begin
            bit_cnt <= '0;
            if (state == S_ADDR) begin
              if (shreg[DATA_W-1:1] == SLAVE_ADDR) begin
                rw_r         <= shreg[0];
                selected     <= 1'b1;
                sda_pull_low <= 1'b1;        // ACK
                state        <= S_ACK_OUT;
                after_ack    <= S_REG;
              end else begin
                state <= S_IDLE;
              end
            end else if (state == S_REG) begin
              ptr          <= shreg[REG_AW-1:0];
              sda_pull_low <= 1'b1;
              state        <= S_ACK_OUT;
              after_ack    <= (rw_r == RW_READ) ? S_RDATA : S_WDATA;
            end else if (wr_full) begin
              state <= S_IDLE;               // NACK: no room, wait for STOP
            end else begin
              ptr          <= ptr + 1'b1;    // regs[ptr] written below
              wr_full      <= (ptr == REG_AW'(NREG - 1));
              sda_pull_low <= 1'b1;
              state        <= S_ACK_OUT;
              after_ack    <= S_WDATA;
            end
          end
        end

        S_ACK_OUT: begin
          if (scl_fall) begin
            bit_cnt <= '0;
            state   <= after_ack;
            if (after_ack == S_RDATA) begin
              shreg        <= regs[ptr];
              sda_pull_low <= !regs[ptr][DATA_W-1];
            end else begin
              sda_pull_low <= 1'b0;
            end
          end
        end

        S_RDATA: begin
          if (scl_rise) begin
            bit_cnt <= bit_cnt + 4'd1;
          end else if (scl_fall) begin
            if (bit_cnt == 4'd8) begin
              sda_pull_low <= 1'b0;          // release for the master's ACK
              ptr          <= ptr + 1'b1;
              state        <= S_ACK_IN;
            end else begin
              shreg        <= {shreg[DATA_W-2:0], 1'b0};
              sda_pull_low <= !shreg[DATA_W-2];
            end
          end
        end

        S_ACK_IN: begin
          if (scl_rise) begin
            mack <= (sda_s == SDA_ACK);
          end else if (scl_fall) begin
            bit_cnt <= '0;
            if (mack) begin
              state        <= S_RDATA;
              shreg        <= regs[ptr];
              sda_pull_low <= !regs[ptr][DATA_W-1];
            end else begin
              state <= S_IDLE;               // wait for STOP or a new START
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
      regs[PRESET_REG] <= PRESET_DATA;
    end else if (wr_en && !start_c && !stop_c) begin
      regs[ptr] <= shreg;
    end
  end

  // --------------------------------------------------------- clock disable
  logic scl_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      scl_hold <= 1'b0;
    else if (!stretch)
      scl_hold <= 1'b0;
    else if (scl_fall && selected)
      scl_hold <= 1'b1;
  end

  assign scl_pull_low = scl_hold;

  // ------------------------------------------------------------ assertions
  // The slave changes SDA only while SCL is low (it never makes START/STOP).
  assert property (@(posedge clk) disable iff (!rst_n)
      $changed(sda_pull_low) |-> (!$past(scl_s) || $past(start_c) || $past(stop_c)))
    else $error("i2c_slave: SDA changed while SCL high");

endmodule
