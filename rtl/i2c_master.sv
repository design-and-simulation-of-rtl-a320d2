// i2c_master: single I2C bus master (core logic, clock generator and data
// registers).
//
// One transfer is started by pulsing `ena` in the Ready state. The master
// then walks the states of its state diagram:
//   Ready  -> Start   on ena
//   Start  -> Sl_sel  after the START condition (SDA falls while SCL is high)
//   Sl_sel            sends the 7-bit slave address and the R/W bit, MSB
//                     first, then samples the acknowledge slot;
//                     no ACK -> Ready (ack_err set), ACK -> Rw_c
//   Rw_c   -> WR / RD on the R/W bit (0 = write, 1 = read)
//   WR                sends the register address, then every byte waiting in
//                     the transmit FIFO; each byte must be acknowledged;
//                     a NACK or an empty FIFO ends the transfer -> Stop
//   RD                sends the register address, then receives rd_len bytes
//                     from the slave into the receive FIFO, acknowledging
//                     every byte but the last, which it leaves unacknowledged
//                     -> Stop
//   Stop   -> Ready   after the STOP condition (SDA rises while SCL is high)
// The states, the 7-bit address, the 8-bit data, the R/W coding, the
// register-address byte sent before the data of a read, and the master's
// NACK after the last byte read follow the source design. It shows no
// repeated START, so the register address travels in the read transfer itself
// (this differs from the usual I2C register read). The multi-byte read
// length, the address NACK flag, the FIFO depth and the handshake of the user
// side are this design's own choices.
//
// Bus side: the master never drives a line high. `scl_pull_low` and
// `sda_pull_low` go to open-drain drivers; `scl_i` and `sda_i` read the
// resolved lines back through two-flop synchronizers. A slave may stretch
// SCL low; the clock generator then waits (see i2c_clk_gen).
//
// Timing: each bit takes 4*QUARTER clock cycles (QUARTER = CLK_HZ/(4*SCL_HZ))
// plus any stretching. A write of N data bytes takes 1 + 9*(2+N) + 1 bit
// periods from START to the end of STOP; a read of N bytes the same. The
// pull-low outputs are registered. `done` pulses for one cycle when the
// master returns to Ready.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SCL_HZ     = 100_000,
  parameter int unsigned QUARTER    = CLK_HZ / (4 * SCL_HZ),
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // transfer request (sampled in Ready when ena is high)
  input  logic              ena,
  input  logic              rw,          // 0 write, 1 read
  input  logic [ADDR_W-1:0] address,     // 7-bit slave address
  input  logic [DATA_W-1:0] reg_addr,    // register address byte
  input  logic [3:0]        rd_len,      // bytes to read (0 is taken as 1)
  // transmit data register
  input  logic              tx_push,
  input  logic [DATA_W-1:0] data,
  output logic              tx_full,
  // receive data register
  input  logic              rx_pop,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_empty,
  // status
  output logic              busy,
  output logic              done,        // one-cycle pulse at the end of a transfer
  output logic              ack_err,     // last transfer saw a NACK where an ACK was due
  output m_state_e          state,
  // open-drain bus
  input  logic              scl_i,
  input  logic              sda_i,
  output logic              scl_pull_low,
  output logic              sda_pull_low
);

  // ---------------------------------------------------------------- inputs
  logic [1:0] scl_sync, sda_sync;
  logic       scl_s, sda_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
    end
  end
  assign scl_s = scl_sync[1];
  assign sda_s = sda_sync[1];

  // ------------------------------------------------------- clock generator
  logic     run, tick, hold;
  quarter_e q;

  assign run  = (state != M_READY);
  // SCL released by us but still low: a slave is stretching the clock.
  assign hold = !scl_pull_low && !scl_s;

  i2c_clk_gen #(
    .CLK_HZ (CLK_HZ),
    .SCL_HZ (SCL_HZ),
    .QUARTER(QUARTER)
  ) u_clk_gen (
    .clk  (clk),
    .rst_n(rst_n),
    .run  (run),
    .hold (hold),
    .tick (tick),
    .q    (q)
  );

  // -------------------------------------------------------- data registers
  logic              tx_pop, tx_empty;
  logic [DATA_W-1:0] tx_dout;
  logic              rx_push;
  logic [DATA_W-1:0] rx_shift;

  i2c_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (tx_push),
    .din  (data),
    .pop  (tx_pop),
    .dout (tx_dout),
    .empty(tx_empty),
    .full (tx_full),
    .count()
  );

  i2c_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (rx_push),
    .din  (rx_shift),
    .pop  (rx_pop),
    .dout (rx_data),
    .empty(rx_empty),
    .full (),
    .count()
  );

  // ------------------------------------------------------------ core logic
  logic              rw_r;
  logic [DATA_W-1:0] shreg;      // byte being transmitted, MSB first
  logic [3:0]        bit_cnt;    // 0..7 data bits, 8 = acknowledge slot
  logic              reg_phase;  // RD/WR: still sending the register address
  logic [3:0]        rd_left;    // bytes still to read, including the current one
  logic              awk;        // acknowledge seen in the last slot

  logic master_tx;  // the master owns SDA for the data bits of this byte
  logic last_rd;    // the byte being received is the last one requested
  logic byte_end;   // end of Q3 of the acknowledge slot

  assign master_tx = (state == M_SL_SEL) || (state == M_WR) ||
                     (state == M_RD && reg_phase);
  assign last_rd   = (rd_left <= 4'd1);
  assign byte_end  = tick && (q == Q3) && (bit_cnt == 4'd8);
  assign busy      = (state != M_READY);

  // Pop the transmit FIFO when its head is loaded into the shift register.
  assign tx_pop  = (state == M_WR) && byte_end && awk && !tx_empty;
  // Push a received byte once its acknowledge slot is over.
  assign rx_push = (state == M_RD) && !reg_phase && byte_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_READY;
      rw_r      <= RW_WRITE;
      shreg     <= '0;
      bit_cnt   <= '0;
      reg_phase <= 1'b0;
      rd_left   <= '0;
      awk       <= 1'b0;
      rx_shift  <= '0;
      ack_err   <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_READY: begin
          if (ena) begin
            state   <= M_START;
            rw_r    <= rw;
            shreg   <= {address, rw};
            rd_left <= (rd_len == 4'd0) ? 4'd1 : rd_len;
            ack_err <= 1'b0;
          end
        end

        M_START: begin
          if (tick && q == Q3) begin
            state   <= M_SL_SEL;
            bit_cnt <= '0;
          end
        end

        M_RW_C: begin
          // Lasts one clock cycle at the start of Q0 of the next bit.
          state     <= (rw_r == RW_READ) ? M_RD : M_WR;
          shreg     <= reg_addr;
          reg_phase <= 1'b1;
          bit_cnt   <= '0;
        end

        M_SL_SEL, M_WR, M_RD: begin
          if (tick) begin
            // Sample SDA at the middle of the SCL high time.
            if (q == Q1) begin
              if (bit_cnt == 4'd8) begin
                if (master_tx) awk <= (sda_s == SDA_ACK);
              end else if (!master_tx) begin
                rx_shift <= {rx_shift[DATA_W-2:0], sda_s};
              end
            end
            if (q == Q3) begin
              if (bit_cnt != 4'd8) begin
                bit_cnt <= bit_cnt + 4'd1;
                if (master_tx) shreg <= {shreg[DATA_W-2:0], 1'b0};
              end else begin
                bit_cnt <= '0;
                unique case (state)
                  M_SL_SEL: begin
                    if (awk) begin
                      state <= M_RW_C;
                    end else begin
                      state   <= M_READY;
                      ack_err <= 1'b1;
                      done    <= 1'b1;
                    end
                  end
                  M_WR: begin
                    reg_phase <= 1'b0;
                    if (!awk) begin
                      state   <= M_STOP;
                      ack_err <= 1'b1;
                    end else if (!tx_empty) begin
                      shreg <= tx_dout;
                    end else begin
                      state <= M_STOP;
                    end
                  end
                  default: begin  // M_RD
                    if (reg_phase) begin
                      reg_phase <= 1'b0;
                      if (!awk) begin
                        state   <= M_STOP;
                        ack_err <= 1'b1;
                      end
                    end else if (last_rd) begin
                      state <= M_STOP;
                    end else begin
                      rd_left <= rd_left - 4'd1;
                    end
                  end
                endcase
              end
            end
          end
        end

        M_STOP: begin
          if (tick && q == Q3) begin
            state <= M_READY;
            done  <= 1'b1;
          end
        end

        default: state <= M_READY;
      endcase
    end
  end

  // --------------------------------------------------------------- outputs
  logic scl_low_c, sda_low_c;

  always_comb begin
    scl_low_c = 1'b0;
    sda_low_c = 1'b0;
    unique case (state)
      M_READY: ;
      M_START: begin
        // SDA falls in Q1 while SCL is high, SCL falls in Q3.
        sda_low_c = (q != Q0);
        scl_low_c = (q == Q3);
      end
      M_RW_C: begin
        scl_low_c = 1'b1;
      end
      M_SL_SEL, M_WR, M_RD: begin
        scl_low_c = (q == Q0) || (q == Q3);
        if (bit_cnt == 4'd8)
          sda_low_c = !master_tx && !last_rd;      // master ACKs all but the last read byte
        else
          sda_low_c = master_tx && !shreg[DATA_W-1];
      end
      M_STOP: begin
        // SDA low while SCL rises in Q1, SDA rises in Q2 while SCL is high.
        scl_low_c = (q == Q0);
        sda_low_c = (q == Q0) || (q == Q1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_pull_low <= 1'b0;
      sda_pull_low <= 1'b0;
    end else begin
      scl_pull_low <= scl_low_c;
      sda_pull_low <= sda_low_c;
    end
  end

  // ------------------------------------------------------------ assertions
  // SDA may only change while SCL is low, except for START and STOP.
  assert property (@(posedge clk) disable iff (!rst_n)
      (state inside {M_SL_SEL, M_WR, M_RD} && q inside {Q1, Q2} && $stable(state))
      |-> $stable(sda_low_c))
    else $error("i2c_master: SDA changed while SCL high");

endmodule
