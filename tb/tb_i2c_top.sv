// tb_i2c_top: end-to-end test of one master and three slaves on one bus, at
// the default parameters (50 MHz system clock, 100 kbit/s SCL).
//
// The test runs the three read examples of the source design (slave 1 at 1001001
// returns 00011101 and slave 2 at 1000001 returns 10000001 from register
// 1001010; slave 3 at 1101011 is read after being written), a two-byte write
// through the transmit FIFO, a two-byte read with master ACK then NACK, a
// transfer to an absent address (NACK, back to Ready), a write past the last
// register (the slave NACKs the byte it cannot accept, the master stops), and
// a read during which a slave stretches SCL.
//
// Checks are independent of the RTL: a bus monitor decodes START, STOP and
// every 9-bit byte slot from the SCL/SDA lines and compares them with the
// expected frame; the data returned through the receive FIFO is compared
// with a reference copy of every slave's registers; the time from request
// to `done` is compared with 4*QUARTER*(2 + 9*bytes) + 1 cycles. Every
// mechanism (write, read, address NACK, data NACK, multi-byte read, clock
// stretch, each
// of the seven master states) must be seen at least once.
module tb_i2c_top;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);
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
  logic [2:0] stretch = '0;
  logic [2:0] slave_selected;
  logic [2:0] master_state;
  logic       scl, sda;

  i2c_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

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

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- bus monitor
  logic       scl_q = 1'b1, sda_q = 1'b1;
  int         mon_bits = 0;
  logic [8:0] mon_sh = '0;
  logic [8:0] mon_frame [$];
  int         n_start = 0, n_stop = 0;

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (rst_n) begin
      if (scl && scl_q && sda_q && !sda) begin
        n_start++;
        mon_bits = 0;
        mon_frame.delete();
      end else if (scl && scl_q && !sda_q && sda) begin
        n_stop++;
      end else if (scl && !scl_q) begin
        mon_sh = {mon_sh[7:0], sda};
        mon_bits++;
        if (mon_bits == 9) begin
          mon_frame.push_back(mon_sh);
          mon_bits = 0;
        end
      end
    end
  end

  // ------------------------------------------------------ mechanism counts
  int seen_state [7];
  int n_stretch_cycles = 0, n_nack = 0, n_write = 0, n_read = 0, n_multi_rd = 0;
  int n_data_nack = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      seen_state[master_state]++;
      if (!scl && dut.scl_pull_low[0] == 1'b0) n_stretch_cycles++;
    end
  end

  // -------------------------------------------------- reference registers
  logic [7:0] ref_regs [3][128];
  logic [6:0] saddr [3] = '{7'b1001001, 7'b1000001, 7'b1101011};

  function automatic int slave_idx(input logic [6:0] a);
    for (int k = 0; k < 3; k++) if (saddr[k] == a) return k;
    return -1;
  endfunction

  // ---------------------------------------------------------- transfers
  task automatic xfer(input logic rw_i, input logic [6:0] a, input logic [7:0] r,
                      input logic [7:0] wbytes [$], input int nrd, input bit stretched,
                      input int wr_nack_at = -1);
    int     k = slave_idx(a);
    int     nbus;
    longint t0, t1;
    logic [7:0] got;
    logic [7:0] exp;

    foreach (wbytes[i]) begin
      @(negedge clk);
      tx_push = 1'b1;
      data    = wbytes[i];
      @(negedge clk);
      tx_push = 1'b0;
    end
    @(negedge clk);
    rw       = rw_i;
    address  = a;
    reg_addr = r;
    rd_len   = 4'(nrd);
    ena      = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    ena = 1'b0;
    while (!done) @(posedge clk);
    t1 = cycle;
    @(negedge clk);

    // Bus frame
    if (k < 0) begin
      n_nack++;
      check(ack_err, "absent address: ack_err set");
      check(mon_frame.size() == 1, "absent address: one byte slot on the bus");
      if (mon_frame.size() >= 1)
        check(mon_frame[0] == {a, rw_i, 1'b1}, "absent address: address sent, NACK seen");
      check(t1 - t0 == longint'(BIT_CYC * 10 + 1), $sformatf("absent address timing %0d", t1 - t0));
      return;
    end
    nbus = 2 + ((rw_i == RW_READ) ? nrd : (wr_nack_at >= 0) ? wr_nack_at + 1 : wbytes.size());
    check(ack_err == (wr_nack_at >= 0), "ack_err only after a data NACK");
    check(mon_frame.size() == nbus, $sformatf("byte slots %0d expected %0d", mon_frame.size(), nbus));
    if (mon_frame.size() == nbus) begin
      check(mon_frame[0] == {a, rw_i, 1'b0}, "address + R/W with ACK");
      check(mon_frame[1] == {r, 1'b0}, "register address with ACK");
      for (int i = 0; i < nbus - 2; i++) begin
        if (rw_i == RW_WRITE) begin
          check(mon_frame[2+i] == {wbytes[i], (i == wr_nack_at) ? 1'b1 : 1'b0},
                "write byte with slave ACK (NACK when the slave is full)");
        end else begin
          exp = ref_regs[k][7'(r + i)];
          check(mon_frame[2+i] == {exp, (i == nrd - 1) ? 1'b1 : 1'b0},
                $sformatf("read byte on bus %h expected %h, ACK/NACK", mon_frame[2+i], exp));
        end
      end
    end
    if (stretched)
      check(t1 - t0 > longint'(BIT_CYC * (2 + 9 * nbus) + 1), "stretched transfer takes longer");
    else
      check(t1 - t0 == longint'(BIT_CYC * (2 + 9 * nbus) + 1),
            $sformatf("transfer time %0d expected %0d", t1 - t0, BIT_CYC * (2 + 9 * nbus) + 1));

    // Data through the FIFOs
    if (rw_i == RW_WRITE) begin
      n_write++;
      if (wr_nack_at >= 0) n_data_nack++;
      foreach (wbytes[i])
        if (wr_nack_at < 0 || i < wr_nack_at) ref_regs[k][7'(r + i)] = wbytes[i];
    end else begin
      n_read++;
      if (nrd > 1) n_multi_rd++;
      for (int i = 0; i < nrd; i++) begin
        exp = ref_regs[k][7'(r + i)];
        check(!rx_empty, "receive FIFO holds the byte");
        got = rx_data;
        check(got == exp, $sformatf("slave %0d reg %h read %h expected %h", k + 1, 7'(r + i), got, exp));
        rx_pop = 1'b1;
        @(negedge clk);
        rx_pop = 1'b0;
      end
      check(rx_empty, "receive FIFO empty after reading");
    end
  endtask

  logic [7:0] none [$];

  initial begin
    for (int k = 0; k < 3; k++) for (int i = 0; i < 128; i++) ref_regs[k][i] = 8'h00;
    ref_regs[0][7'b1001010] = 8'b00011101;
    ref_regs[1][7'b1001010] = 8'b10000001;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // The source design's read examples: slave 1 and slave 2, register 1001010.
    xfer(RW_READ, 7'b1001001, 8'b01001010, none, 1, 0);
    xfer(RW_READ, 7'b1000001, 8'b01001010, none, 1, 0);
    // Slave 3: write two bytes, then read them back with one transfer.
    xfer(RW_WRITE, 7'b1101011, 8'b01001010, '{8'hA5, 8'h3C}, 0, 0);
    xfer(RW_READ, 7'b1101011, 8'b01001010, none, 2, 0);
    // Write to slave 1 must not disturb slaves 2 and 3.
    xfer(RW_WRITE, 7'b1001001, 8'h10, '{8'h5A, 8'hFF, 8'h00, 8'h81}, 0, 0);
    xfer(RW_READ, 7'b1001001, 8'h10, none, 4, 0);
    xfer(RW_READ, 7'b1101011, 8'b01001010, none, 1, 0);
    // Slave 1 is full after register 127: the second byte is NACKed.
    xfer(RW_WRITE, 7'b1001001, 8'h7F, '{8'h12, 8'h34}, 0, 0, 1);
    xfer(RW_READ, 7'b1001001, 8'h7F, none, 1, 0);
    xfer(RW_READ, 7'b1001001, 8'h00, none, 1, 0);
    // No slave at this address.
    xfer(RW_READ, 7'b0000111, 8'h00, none, 1, 0);
    // Slave 2 stretches the clock during its read.
    fork
      begin
        wait (slave_selected[1]);
        @(negedge clk);
        stretch[1] = 1'b1;
        repeat (3 * BIT_CYC) @(negedge clk);
        stretch[1] = 1'b0;
      end
      xfer(RW_READ, 7'b1000001, 8'b01001010, none, 1, 1);
    join

    check(n_start == 12 && n_stop == 11, $sformatf("START %0d / STOP %0d conditions", n_start, n_stop));
    check(n_write > 0, "write transfer happened");
    check(n_read > 0, "read transfer happened");
    check(n_multi_rd > 0, "multi-byte read happened");
    check(n_nack > 0, "address NACK happened");
    check(n_data_nack > 0, "data NACK by a full slave happened");
    check(n_stretch_cycles > 0, $sformatf("clock stretch held SCL for %0d cycles", n_stretch_cycles));
    for (int s = 0; s < 7; s++)
      check(seen_state[s] > 0, $sformatf("master state %0d visited", s));
    $display("mechanisms: writes=%0d reads=%0d multi-byte reads=%0d address nacks=%0d data nacks=%0d stretch cycles=%0d",
             n_write, n_read, n_multi_rd, n_nack, n_data_nack, n_stretch_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
