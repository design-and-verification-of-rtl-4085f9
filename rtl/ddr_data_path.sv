// ddr_data_path: host data to and from the DDR data pins.
//
// Write: DATAIN (16 bits) and DM (2 bits) are registered every cycle. While
// oe is high the registered word is sent as two DQ beats in the following
// cycle: the low byte while the clock is high (rising-edge beat), the high
// byte while it is low (falling-edge beat), with DM[0]/DM[1] on DQM in the
// same beats. dq_oe covers those beats; dqs_oe opens half a cycle earlier
// (write preamble, DQS low) and DQS toggles with the clock during the burst.
// Relative to a WRITE on the command pins in cycle k, the host word for beat
// pair n (n = 0..BL/2-1) must be on DATAIN in cycle k+n; it appears on DQ
// in cycle k+2+n.
//
// Read: DQ is sampled on the falling edge (the rising-edge beat) and on the
// next rising edge (the falling-edge beat); while rd_win is high the pair is
// loaded into DATAOUT as {second beat, first beat}. DATAOUT holds its value
// outside read bursts. With a READ on the pins in cycle k and CAS latency CL
// the host words are on DATAOUT in cycles k+CL+2 .. k+CL+1+BL/2.
//
// The 16-bit host / 8-bit DDR widths and the use of the command generator's
// OE follow the design description; the byte order, the preamble and
// capturing read data with the controller clock rather than DQS are this
// design's choices.
module ddr_data_path
  import ddr_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // host side
  input  logic [DSIZE-1:0] datain,
  input  logic [DM_W-1:0]  dm,
  output logic [DSIZE-1:0] dataout,
  // timing from the command generator
  input  logic             oe,
  input  logic             rd_win,
  // DDR side (pad signals)
  output logic [DQ_W-1:0]  dq_o,
  output logic             dq_oe,
  input  logic [DQ_W-1:0]  dq_i,
  output logic [DQS_W-1:0] dqm,
  output logic [DQS_W-1:0] dqs_o,
  output logic             dqs_oe
);

  logic [DSIZE-1:0] din_q;
  logic [DM_W-1:0]  dm_q;
  logic             pre_n;
  logic [DQ_W-1:0]  rise_cap;

  always_ff @(posedge clk) begin
    if (rst) begin
      din_q <= '0;
      dm_q  <= '0;
      dq_oe <= 1'b0;
    end else begin
      din_q <= datain;
      dm_q  <= dm;
      dq_oe <= oe;
    end
  end

  // preamble: DQS driven (low) from the falling edge before the burst
  always_ff @(negedge clk) begin
    if (rst) pre_n <= 1'b0;
    else     pre_n <= oe;
  end
  assign dqs_oe = dq_oe | pre_n;

  ddr_oddr #(.W(DQ_W)) u_dq (
    .clk, .d_rise(din_q[DQ_W-1:0]), .d_fall(din_q[DSIZE-1:DQ_W]), .q(dq_o)
  );

  ddr_oddr #(.W(DQS_W)) u_dqm (
    .clk, .d_rise({DQS_W{dm_q[0]}}), .d_fall({DQS_W{dm_q[DM_W-1]}}), .q(dqm)
  );

  ddr_oddr #(.W(DQS_W)) u_dqs (
    .clk, .d_rise({DQS_W{oe}}), .d_fall('0), .q(dqs_o)
  );

  // read capture
  always_ff @(negedge clk) rise_cap <= dq_i;

  always_ff @(posedge clk) begin
    if (rst)         dataout <= '0;
    else if (rd_win) dataout <= {dq_i, rise_cap};
  end

endmodule
