// tb_i2c_clk_gen: test of the SCL clock divider.
//
// With run high the divider must produce one `tick` every QUARTER cycles and
// step `q` through Q0, Q1, Q2, Q3, Q0, ...; with run low it must sit at Q0.
// A hold raised inside the first HOLD_GRACE counts of a quarter must not
// delay it; a hold raised later must freeze it for exactly as long as it
// stays high. QUARTER is derived from CLK_HZ and SCL_HZ as in the RTL
// (100 kbit/s from a 50 MHz clock gives 125 cycles).
module tb_i2c_clk_gen;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned QUARTER = 125;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     run = 1'b0, hold = 1'b0;
  logic     tick;
  quarter_e q;

  i2c_clk_gen #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.*);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycles from now until the next tick (tick sampled at a negedge).
  task automatic cycles_to_tick(output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!tick);
  endtask

  int n;
  quarter_e q_prev;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(q == Q0 && !tick, "idle at Q0 without ticks");

    run = 1'b1;
    cycles_to_tick(n);
    // The cycle in which run rises is count 0 of the first quarter.
    check(n + 1 == QUARTER, $sformatf("first quarter %0d cycles, expected %0d", n + 1, QUARTER));
    for (int i = 0; i < 12; i++) begin
      q_prev = q;
      cycles_to_tick(n);
      check(n == QUARTER, $sformatf("quarter %0d cycles, expected %0d", n, QUARTER));
      check(q == quarter_e'(q_prev + 2'd1), "q steps by one per quarter");
    end

    // Hold inside the grace window: no delay.
    @(negedge clk);                      // count 0 of a new quarter
    hold = 1'b1;
    @(negedge clk);
    @(negedge clk);
    hold = 1'b0;
    cycles_to_tick(n);
    check(n + 3 == QUARTER, $sformatf("hold in grace window: quarter %0d cycles", n + 3));

    // Hold after the grace window: stretches the quarter by its length.
    repeat (20) @(negedge clk);
    hold = 1'b1;
    repeat (37) @(negedge clk);
    hold = 1'b0;
    cycles_to_tick(n);
    check(n + 20 + 37 == QUARTER + 37, $sformatf("held quarter %0d cycles", n + 20 + 37));

    // run low: back to Q0 and silent.
    run = 1'b0;
    repeat (2 * QUARTER) begin
      @(negedge clk);
      if (tick || q != Q0) begin
        check(1'b0, "activity with run low");
        break;
      end
    end
    check(q == Q0, "Q0 with run low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
