// ddr_refresh_counter: the controller's counter module / refresh control.
//
// After reset it counts T_200US clock cycles, the power and clock
// stabilisation delay, and then raises sys_dly_200us, which stays high.
// Once initialisation is complete (init_done) it counts refresh intervals of
// T_REFI cycles. At the end of each interval it raises ref_req and holds it
// until the command FSM acknowledges with a one-cycle ref_ack, when the
// refresh has been issued. The interval counter runs on regardless, so the
// average refresh rate is one per T_REFI cycles. If an interval ends while a
// request is still pending the request simply stays high (one refresh).
//
// The 200 us delay follows the design description; the 15.6 us interval
// (64 ms / 4096 rows) and the 100 MHz clock behind both defaults are
// assumptions. Synchronous active-high reset.
module ddr_refresh_counter #(
  parameter int unsigned T_200US = 20000,
  parameter int unsigned T_REFI  = 1560
) (
  input  logic clk,
  input  logic rst,
  input  logic init_done,
  input  logic ref_ack,
  output logic sys_dly_200us,
  output logic ref_req
);

  logic [$clog2(T_200US+1)-1:0] dly_cnt;
  logic [$clog2(T_REFI+1)-1:0]  ref_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      dly_cnt       <= '0;
      sys_dly_200us <= 1'b0;
    end else if (!sys_dly_200us) begin
      if (dly_cnt == $bits(dly_cnt)'(T_200US - 1)) sys_dly_200us <= 1'b1;
      dly_cnt <= dly_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !init_done) begin
      ref_cnt <= '0;
      ref_req <= 1'b0;
    end else begin
      if (ref_cnt == $bits(ref_cnt)'(T_REFI - 1)) ref_cnt <= '0;
      else                                        ref_cnt <= ref_cnt + 1'b1;
      if (ref_cnt == $bits(ref_cnt)'(T_REFI - 1)) ref_req <= 1'b1;
      else if (ref_ack)                            ref_req <= 1'b0;
    end
  end

endmodule
