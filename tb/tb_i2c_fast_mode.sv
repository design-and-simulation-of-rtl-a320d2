// tb_i2c_fast_mode: the whole system in fast mode, 400 kbit/s SCL from the
// default 50 MHz system clock.
//
// QUARTER becomes 50e6 / (4 * 400e3) = 31 cycles (integer division), so one
// bit takes 124 cycles, 403 kbit/s. The test repeats the two read examples
// whose data is known (slave 1 at 1001001 returns 00011101, slave 2 at
// 1000001 returns 10000001, both from register 1001010), writes and reads
// back slave 3, and measures the SCL period on the bus between rising edges
// inside a byte. Expected values are written out here, not taken from the
// RTL.
module tb_i2c_fast_mode;

  localparam int unsigned BIT_CYC = 124;

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

  i2c_top #(.SCL_HZ(400_000)) dut (.*);

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

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCL period between consecutive rising edges (the START/STOP bits and the
  // Rw_c cycle make some gaps longer; the shortest one is the bit period).
  longint last_rise = -1;
  longint min_period = 1_000_000;
  int     n_periods = 0;
  logic   scl_q = 1'b1;
  always @(posedge clk) begin
    scl_q <= scl;
    if (rst_n && scl && !scl_q) begin
      if (last_rise >= 0 && busy) begin
        n_periods++;
        if (cycle - last_rise < min_period) min_period = cycle - last_rise;
      end
      last_rise = cycle;
    end
    if (!busy) last_rise = -1;
  end

  task automatic run(input logic rw_i, input logic [6:0] a, input logic [7:0] r, input int n,
                     output longint cyc);
    longint t0;
    @(negedge clk);
    rw = rw_i; address = a; reg_addr = r; rd_len = 4'(n);
    ena = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    ena = 1'b0;
    while (!done) @(posedge clk);
    cyc = cycle - t0;
    @(negedge clk);
  endtask

  task automatic pop_expect(input logic [7:0] exp, input string what);
    check(!rx_empty && rx_data == exp, $sformatf("%s: got %b expected %b", what, rx_data, exp));
    rx_pop = 1'b1;
    @(negedge clk);
    rx_pop = 1'b0;
  endtask

  longint cyc;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    run(1'b1, 7'b1001001, 8'b01001010, 1, cyc);
    check(!ack_err, "slave 1 acknowledged");
    pop_expect(8'b00011101, "slave 1 data");
    check(cyc == BIT_CYC * (2 + 9 * 3) + 1, $sformatf("slave 1 read took %0d cycles", cyc));

    run(1'b1, 7'b1000001, 8'b01001010, 1, cyc);
    check(!ack_err, "slave 2 acknowledged");
    pop_expect(8'b10000001, "slave 2 data");

    @(negedge clk);
    tx_push = 1'b1; data = 8'hC7;
    @(negedge clk);
    tx_push = 1'b0;
    run(1'b0, 7'b1101011, 8'b01001010, 0, cyc);
    check(!ack_err, "slave 3 write acknowledged");
    check(cyc == BIT_CYC * (2 + 9 * 3) + 1, $sformatf("slave 3 write took %0d cycles", cyc));
    run(1'b1, 7'b1101011, 8'b01001010, 1, cyc);
    pop_expect(8'hC7, "slave 3 data");

    check(n_periods > 50, "SCL periods measured");
    check(min_period == BIT_CYC, $sformatf("SCL period %0d cycles, expected %0d", min_period, BIT_CYC));
    $display("SCL period %0d cycles = %0d bit/s", min_period, 50_000_000 / min_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
