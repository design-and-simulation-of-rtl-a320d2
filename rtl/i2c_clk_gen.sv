// i2c_clk_gen: clock divider that paces the master's SCL.
//
// The system clock is divided down so that one SCL bit takes four equal
// quarters (Q0..Q3, see i2c_pkg). A counter runs from 0 to QUARTER-1; on its
// last count `tick` is high for one cycle and the quarter number `q` steps
// on at the next edge. With `run` low the divider sits at Q0, count 0, so a
// transfer always begins with a full quarter.
//
// `hold` freezes the counter. The master raises it while it has released SCL
// but still reads SCL low, i.e. while a slave stretches the clock through its
// clock-disable pull-down; the high quarters then last until the slave lets
// go. The first HOLD_GRACE counts of every quarter ignore `hold`: they cover
// the master's output register and input synchronizer, so that an unstretched
// bus runs at exactly 4*QUARTER clock cycles per bit.
//
// The source design names this block a clock divider that makes the design work at a
// particular frequency and lists the 100 kbit/s, 400 kbit/s and 3.4 Mbit/s
// bus modes. SCL_HZ defaults to the 100 kbit/s mode. The system clock
// frequency, the four-quarter split and the hold input are this design's own
// choices.
//
// Timing: `tick` is registered-count decode (combinational from the
// counter); `q` changes one cycle after `tick`.
module i2c_clk_gen
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCL_HZ  = 100_000,
  parameter int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ),
  parameter int unsigned HOLD_GRACE = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,     // divider counts while high
  input  logic     hold,    // SCL stretched by a slave: freeze
  output logic     tick,    // last cycle of the current quarter
  output quarter_e q        // current quarter of the bit period
);

  localparam int unsigned CW = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  initial begin
    assert (QUARTER > HOLD_GRACE + 2)
      else $error("i2c_clk_gen: QUARTER=%0d too short for HOLD_GRACE=%0d", QUARTER, HOLD_GRACE);
  end

  logic [CW-1:0] cnt;
  logic          stall;

  assign stall = hold && (cnt >= CW'(HOLD_GRACE));
  assign tick  = run && !stall && (cnt == CW'(QUARTER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q   <= Q0;
    end else if (!run) begin
      cnt <= '0;
      q   <= Q0;
    end else if (!stall) begin
      if (tick) begin
        cnt <= '0;
        q   <= quarter_e'(q + 2'd1);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
