// ddr_oddr: double-data-rate output register.
//
// d_rise and d_fall are sampled together on the rising clock edge. d_rise
// is driven on q while the clock is high (the beat launched by the rising
// edge); d_fall is re-registered on the falling edge and driven while the
// clock is low. q therefore carries two values per clock cycle, one cycle
// after they are presented. This is the usual two-flop-and-multiplexer form
// of a DDR output cell; the output multiplexer is selected by the clock.
module ddr_oddr #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d_rise,
  input  logic [W-1:0] d_fall,
  output logic [W-1:0] q
);

  logic [W-1:0] rise_q, fall_p, fall_q;

  always_ff @(posedge clk) begin
    rise_q <= d_rise;
    fall_p <= d_fall;
  end

  always_ff @(negedge clk) fall_q <= fall_p;

  assign q = clk ? rise_q : fall_q;

endmodule
