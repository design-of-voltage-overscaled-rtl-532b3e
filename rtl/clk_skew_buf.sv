// clk_skew_buf: BEHAVIOURAL MODEL (not synthesizable logic) of the tunable
// clock delay element placed in front of each ACS flip-flop to realise the
// scheduled clock skews.
//
// The skew of each flip-flop is a 3-bit code, 2 integer bits and 1 fraction
// bit, in units of one half-adder delay, so the delay steps are half a unit
// (0 to 3.5 units). The model delays clk_in by code * HA_PS / 2 time
// units (picoseconds under the default 1 ps time unit) with a transport
// delay, so every edge is reproduced. The 3-bit quantization follows the
// design description; the absolute half-adder delay (HA_PS, default 100) is
// this model's assumption. In silicon this is a
// trimmed buffer chain or a custom delay cell whose delay is a layout and
// process matter, which is why it is only modelled here.
module clk_skew_buf #(
  parameter int unsigned HA_PS = 100
) (
  input  logic       clk_in,
  input  logic [2:0] code,
  output logic       clk_out
);
  localparam int unsigned HALF_UNIT_PS = HA_PS / 2;

  initial clk_out = 1'b0;

  always @(clk_in) begin
    clk_out <= #(int'(code) * HALF_UNIT_PS) clk_in;
  end
endmodule
