// tb_i2c_master: test of the I2C master against a behavioural slave.
//
// The slave is written directly in the testbench, working on the bus wires
// with event controls (it answers on SCL edges, with no synchronizer). For
// each transfer the test tells it how to answer: ACK or NACK the address,
// which data byte to NACK when written to, the bytes to return when read,
// and whether to stretch SCL. The test checks
//   - the byte stream the master puts on the bus (address + R/W, register
//     address, write data in FIFO order) and START / STOP counts
//   - the master's ACK after every byte read but the last, NACK after it
//   - the data delivered through the receive FIFO
//   - ack_err and the path Sl_sel -> Ready on an address NACK, and
//     WR -> Stop on a data NACK (remaining FIFO bytes are not sent)
//   - the bit rate: a transfer takes 4*QUARTER*(2 + 9*bytes) + 1 cycles,
//     longer when the slave stretches SCL
// QUARTER is reduced to 16 cycles to keep the run short.
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned QUARTER = 16;
  localparam int unsigned BIT_CYC = 4 * QUARTER;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       ena = 1'b0, rw = 1'b0;
  logic [6:0] address = '0;
  logic [7:0] reg_addr = '0;
  logic [3:0] rd_len = '0;
  logic       tx_push = 1'b0;
  logic [7:0] data = '0;
  logic       tx_full;
  logic       rx_pop = 1'b0;
  logic [7:0] rx_data;
  logic       rx_empty, busy, done, ack_err;
  m_state_e   state;
  logic       scl_pull_low, sda_pull_low;
  logic       s_scl_low = 1'b0, s_sda_low = 1'b0;
  logic       scl, sda;

  assign scl = !(scl_pull_low || s_scl_low);
  assign sda = !(sda_pull_low || s_sda_low);

  i2c_master #(.QUARTER(QUARTER), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .ena, .rw, .address, .reg_addr, .rd_len,
    .tx_push, .data, .tx_full, .rx_pop, .rx_data, .rx_empty,
    .busy, .done, .ack_err, .state,
    .scl_i(scl), .sda_i(sda), .scl_pull_low, .sda_pull_low
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ START / STOP count
  int n_start = 0, n_stop = 0;
  always @(negedge sda) if (rst_n && scl) n_start++;
  always @(posedge sda) if (rst_n && scl) n_stop++;

  // --------------------------------------------------- behavioural slave
  // Answer plan for the next transfer.
  bit         sl_ack_addr;
  int         sl_nack_wr_at;        // data byte index to NACK (-1: none)
  logic [7:0] sl_rd_bytes [$];
  bit         sl_stretch;
  // What it saw.
  logic [7:0] sl_got [$];           // bytes received from the master
  logic       sl_mack [$];          // master's ACK after each byte read

  task automatic sl_drive_after_fall(input logic low);
    #1 s_sda_low = low;
  endtask

  task automatic sl_recv(output logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      @(posedge scl);
      b[i] = sda;
      @(negedge scl);
    end
  endtask

  // Runs one transfer from START to STOP (or to the address NACK).
  task automatic sl_serve();
    logic [7:0] b;
    bit         rd;
    int         k;
    @(negedge sda iff scl);
    @(negedge scl);
    sl_recv(b);
    sl_got.push_back(b);
    rd = b[0];
    sl_drive_after_fall(sl_ack_addr);
    @(negedge scl);
    sl_drive_after_fall(1'b0);
    if (!sl_ack_addr) return;
    if (sl_stretch) begin
      #1 s_scl_low = 1'b1;
      repeat (3 * BIT_CYC) @(posedge clk);
      s_scl_low = 1'b0;
    end
    sl_recv(b);                       // register address
    sl_got.push_back(b);
    sl_drive_after_fall(1'b1);
    @(negedge scl);
    if (!rd) begin
      k = 0;
      forever begin
        sl_drive_after_fall(1'b0);
        fork : wr_or_stop
          begin
            sl_recv(b);
          end
          begin
            @(posedge sda iff scl);
          end
        join_any
        disable wr_or_stop;
        if (scl) return;              // STOP seen
        sl_got.push_back(b);
        sl_drive_after_fall(k != sl_nack_wr_at);
        @(negedge scl);
        if (k == sl_nack_wr_at) begin
          sl_drive_after_fall(1'b0);
          return;
        end
        k++;
      end
    end else begin
      sl_drive_after_fall(1'b0);
      foreach (sl_rd_bytes[j]) begin
        for (int i = 7; i >= 0; i--) begin
          sl_drive_after_fall(!sl_rd_bytes[j][i]);
          @(negedge scl);
        end
        sl_drive_after_fall(1'b0);
        @(posedge scl);
        sl_mack.push_back(!sda);
        @(negedge scl);
        if (!sl_mack[$]) return;
      end
    end
  endtask

  // ----------------------------------------------------------- transfers
  task automatic xfer(input logic rw_i, input logic [6:0] a, input logic [7:0] r,
                      input logic [7:0] wbytes [$], input int nrd,
                      output longint cyc);
    longint t0;
    foreach (wbytes[i]) begin
      @(negedge clk);
      tx_push = 1'b1;
      data    = wbytes[i];
      @(negedge clk);
      tx_push = 1'b0;
    end
    sl_got.delete();
    sl_mack.delete();
    @(negedge clk);
    rw = rw_i; address = a; reg_addr = r; rd_len = 4'(nrd);
    ena = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    ena = 1'b0;
    fork
      sl_serve();
      begin
        while (!done) @(posedge clk);
        cyc = cycle - t0;
      end
    join
    @(negedge clk);
  endtask

  longint     cyc;
  logic [7:0] none [$];
  int         st0, sp0;
  bit         went_ready;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    // 1. Read one byte (the source design's slave 1 example).
    sl_ack_addr = 1; sl_nack_wr_at = -1; sl_stretch = 0;
    sl_rd_bytes = '{8'b00011101};
    xfer(RW_READ, 7'b1001001, 8'b01001010, none, 1, cyc);
    check(sl_got.size() == 2 && sl_got[0] == {7'b1001001, 1'b1} && sl_got[1] == 8'b01001010,
          "read: address+R and register address on the bus");
    check(sl_mack.size() == 1 && sl_mack[0] == 1'b0, "read: master NACKs the last byte");
    check(!rx_empty && rx_data == 8'b00011101, $sformatf("read: data %b", rx_data));
    rx_pop = 1'b1; @(negedge clk); rx_pop = 1'b0;
    check(!ack_err, "read: no ack error");
    check(cyc == BIT_CYC * (2 + 9 * 3) + 1, $sformatf("read: %0d cycles", cyc));

    // 2. Read three bytes: ACK, ACK, NACK.
    sl_rd_bytes = '{8'h81, 8'h7E, 8'hC3};
    xfer(RW_READ, 7'b1000001, 8'h05, none, 3, cyc);
    check(sl_mack.size() == 3 && sl_mack[0] && sl_mack[1] && !sl_mack[2], "multi-read: ACK, ACK, NACK");
    foreach (sl_rd_bytes[j]) begin
      check(!rx_empty && rx_data == sl_rd_bytes[j], $sformatf("multi-read byte %0d = %h", j, rx_data));
      rx_pop = 1'b1; @(negedge clk); rx_pop = 1'b0;
    end
    check(cyc == BIT_CYC * (2 + 9 * 5) + 1, $sformatf("multi-read: %0d cycles", cyc));

    // 3. Write three bytes from the FIFO.
    xfer(RW_WRITE, 7'b1101011, 8'h40, '{8'hA5, 8'h00, 8'hFF}, 0, cyc);
    check(sl_got.size() == 5 && sl_got[0] == {7'b1101011, 1'b0} && sl_got[1] == 8'h40 &&
          sl_got[2] == 8'hA5 && sl_got[3] == 8'h00 && sl_got[4] == 8'hFF, "write: bytes on the bus");
    check(!ack_err, "write: no ack error");
    check(cyc == BIT_CYC * (2 + 9 * 5) + 1, $sformatf("write: %0d cycles", cyc));

    // 4. Address not acknowledged: Sl_sel -> Ready, no STOP.
    sl_ack_addr = 0;
    st0 = n_start; sp0 = n_stop;
    went_ready = 0;
    fork
      begin
        wait (state == M_SL_SEL);
        wait (state != M_SL_SEL);
        went_ready = (state == M_READY);
      end
      xfer(RW_READ, 7'b0000111, 8'h00, none, 1, cyc);
    join
    check(ack_err, "address NACK: ack_err");
    check(went_ready, "address NACK: Sl_sel goes to Ready");
    check(n_start == st0 + 1 && n_stop == sp0, "address NACK: START without STOP");
    check(rx_empty, "address NACK: nothing received");
    check(cyc == BIT_CYC * 10 + 1, $sformatf("address NACK: %0d cycles", cyc));

    // 5. Slave NACKs the second data byte: the third stays in the FIFO unsent.
    sl_ack_addr = 1; sl_nack_wr_at = 1;
    xfer(RW_WRITE, 7'b1101011, 8'h41, '{8'h11, 8'h22, 8'h33}, 0, cyc);
    check(ack_err, "data NACK: ack_err");
    check(sl_got.size() == 4 && sl_got[3] == 8'h22, "data NACK: stopped after the NACKed byte");
    check(n_stop == sp0 + 1, "data NACK: STOP sent");
    // The leftover byte goes out with the next write.
    sl_nack_wr_at = -1;
    xfer(RW_WRITE, 7'b1101011, 8'h50, none, 0, cyc);
    check(sl_got.size() == 3 && sl_got[2] == 8'h33, "leftover FIFO byte sent next");

    // 6. Clock stretching after the address ACK.
    sl_stretch = 1;
    sl_rd_bytes = '{8'h5C};
    xfer(RW_READ, 7'b1001001, 8'h01, none, 1, cyc);
    check(cyc >= BIT_CYC * (2 + 9 * 3) + 1 + 2 * BIT_CYC, $sformatf("stretch: %0d cycles", cyc));
    check(!rx_empty && rx_data == 8'h5C, "stretch: data intact");
    rx_pop = 1'b1; @(negedge clk); rx_pop = 1'b0;

    check(n_start == 7 && n_stop == 6, $sformatf("START %0d STOP %0d", n_start, n_stop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
