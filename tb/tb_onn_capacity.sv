// tb_onn_capacity: capacity experiment of the 25-neuron network for the
// three weight precisions studied, 5, 4 and 3 bits, plus the largest
// network size reported for on-chip learning, 35 neurons at 5 bits, run side
// by side (see onn_capacity_run). Sums their checks and failures.
`timescale 1ns/1ps
module tb_onn_capacity;
  int  c5, f5, c4, f4, c3, f3, c35, f35;
  bit  d5, d4, d3, d35;
  int  checks, failures;

  onn_capacity_run #(.WB(5)) u_w5 (.checks (c5), .failures (f5), .finished (d5));
  onn_capacity_run #(.WB(4)) u_w4 (.checks (c4), .failures (f4), .finished (d4));
  onn_capacity_run #(.WB(3)) u_w3 (.checks (c3), .failures (f3), .finished (d3));
  onn_capacity_run #(.N(35), .WB(5)) u_n35 (.checks (c35), .failures (f35), .finished (d35));

  initial begin
    fork
      begin
        wait (d5 && d4 && d3 && d35);
        #1;
        checks = c5 + c4 + c3 + c35;
        failures = f5 + f4 + f3 + f35;
      end
      begin
        #200ms;
        checks = c5 + c4 + c3 + c35;
        failures = f5 + f4 + f3 + f35 + 1;
        $display("FAIL: watchdog");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
