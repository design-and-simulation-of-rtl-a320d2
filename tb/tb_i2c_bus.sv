// tb_i2c_bus: exhaustive test of the open-drain wired-AND bus model.
//
// Every combination of pull-low requests from the four devices is applied to
// both lines (with independent patterns on SCL and SDA), and each line must
// read high exactly when no device pulls it low.
module tb_i2c_bus;

  localparam int unsigned N = 4;

  logic [N-1:0] scl_pull_low = '0, sda_pull_low = '0;
  logic         scl, sda;

  i2c_bus #(.N_DEV(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** N; a++) begin
      for (int b = 0; b < 2 ** N; b++) begin
        scl_pull_low = N'(a);
        sda_pull_low = N'(b);
        #1;
        checks += 2;
        if (scl !== (a == 0)) begin
          failures++;
          $display("FAIL: scl=%b with pull-low %b", scl, N'(a));
        end
        if (sda !== (b == 0)) begin
          failures++;
          $display("FAIL: sda=%b with pull-low %b", sda, N'(b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
