// led_stretcher: keeps front-panel indications visible.
//
// Each of N inputs is a level or a one-tick pulse. When an input is high its
// LED output turns on at the next tick and a per-channel counter is reloaded;
// the LED stays on until the input has been low for STRETCH ticks. The
// default of 8,000,000 ticks is 0.2 s at 40 MHz: "a significant fraction of a
// second". Reset (synchronous, active low) turns all LEDs off.
module led_stretcher #(
  parameter int unsigned N       = 8,
  parameter int unsigned STRETCH = 8_000_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic [N-1:0] led
);
  localparam int unsigned CW = $clog2(STRETCH + 1);
  logic [CW-1:0] cnt [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!rst_n)         cnt[i] <= '0;
      else if (in[i])     cnt[i] <= CW'(STRETCH);
      else if (cnt[i] != 0) cnt[i] <= cnt[i] - 1'b1;
    end
  end

  always_comb
    for (int i = 0; i < N; i++) led[i] = (cnt[i] != 0);
endmodule
