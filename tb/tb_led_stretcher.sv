// Testbench for led_stretcher with a short stretch (10 ticks). A reference
// remembers the last tick each input was sampled high; the LED must be on
// exactly when that tick is less than STRETCH ticks ago. Inputs are random
// single pulses, long levels and quiet stretches.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_led_stretcher;
  `TB_COUNTERS
  localparam int N = 4, ST = 10;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  logic [N-1:0] in = 0, led;
  led_stretcher #(.N(N), .STRETCH(ST)) dut (.clk, .rst_n, .in, .led);

  int last [N];
  int k = 0, n_on = 0, n_off_edge = 0;
  initial begin
    for (int i = 0; i < N; i++) last[i] = -1000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      k++;
      for (int i = 0; i < N; i++) begin
        bit exp_led;
        exp_led = (k - 1 - last[i]) < ST;   // state after the previous edge
        `CHECK(led[i] == exp_led, $sformatf("led %0d", i))
        if (led[i]) n_on++;
        if (!exp_led && (k - 1 - last[i]) == ST) n_off_edge++;
        case ((n / 500) % 3)
          0: in[i] = ($urandom_range(0, 40) == 0);      // sparse pulses
          1: in[i] = ($urandom_range(0, 3) != 0);       // mostly high
          default: in[i] = 0;                            // quiet
        endcase
        if (in[i]) last[i] = k;
      end
    end
    `CHECK(n_on > 0 && n_off_edge > 0, "on and off transitions seen")
    `TB_FINISH
  end
endmodule
