// tb_ddr_data_path: checks the 16-bit to DDR 8-bit conversion both ways.
//
// Random host words, masks, oe and rd_win are driven each cycle (1 ns after
// the rising edge) and random DQ input bytes are driven 1 ns after both
// clock edges. The expected pin values are worked out per cycle t from the
// recorded stimulus: in the high half of cycle t DQ = low byte of the word
// of cycle t-2, DQM = its mask bit 0, DQS = oe(t-1); in the low half DQ =
// high byte, DQM = mask bit 1, DQS = 0. DQ_OE = oe(t-1), DQS_OE also in the
// low half before a burst (preamble). DATAOUT after edge t+1 = {DQ driven
// after the falling edge of t, DQ driven after the rising edge of t} when
// rd_win(t), else unchanged. Pins are sampled a quarter cycle after each edge.
module tb_ddr_data_path;
  timeunit 1ns; timeprecision 100ps;
  import ddr_pkg::*;
  localparam int N = 400;
  logic clk = 0, rst = 1;
  logic [15:0] datain = '0, dataout;
  logic [1:0] dm = '0;
  logic oe = 0, rd_win = 0;
  logic [7:0] dq_o, dq_i = '0;
  logic dq_oe, dqs_oe;
  logic [0:0] dqm, dqs_o;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [15:0] w_h [N + 4];
  logic [1:0]  m_h [N + 4];
  logic        oe_h [N + 4];
  logic        rw_h [N + 4];
  logic [7:0]  qr_h [N + 4];   // DQ driven after the rising edge of cycle t
  logic [7:0]  qf_h [N + 4];   // DQ driven after the falling edge of cycle t
  logic [15:0] dout_exp = '0;

  ddr_data_path dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // stimulus
  always @(posedge clk) begin
    cyc++;
    #1;
    if (cyc > 2 && cyc < N) begin
      int t;
      t = cyc;
      w_h[t]  = 16'($urandom);
      m_h[t]  = 2'($urandom);
      oe_h[t] = ($urandom_range(0, 2) != 0);
      rw_h[t] = ($urandom_range(0, 2) != 0);
      qr_h[t] = 8'($urandom);
      qf_h[t] = 8'($urandom);
      datain = w_h[t]; dm = m_h[t]; oe = oe_h[t]; rd_win = rw_h[t]; dq_i = qr_h[t];
    end
  end
  always @(negedge clk) begin
    #1;
    if (cyc > 2 && cyc < N) dq_i = qf_h[cyc];
  end

  // high half of cycle t
  always @(posedge clk) begin
    int t;
    #2.5;
    t = cyc;
    if (t > 3 && t < N && rw_h[t-1]) dout_exp = {qf_h[t-1], qr_h[t-1]};
    if (t > 5 && t < N) begin
      chk(dq_oe == oe_h[t-1], "DQ_OE");
      chk(dqs_oe == oe_h[t-1], "DQS_OE (high half)");
      if (oe_h[t-1]) begin
        chk(dq_o == w_h[t-2][7:0], $sformatf("rising beat: got %h expected %h", dq_o, w_h[t-2][7:0]));
        chk(dqm[0] == m_h[t-2][0], "DQM rising beat");
        chk(dqs_o[0] == 1'b1, "DQS high");
      end
      // read capture of the previous cycle
      chk(dataout == dout_exp, $sformatf("DATAOUT got %h expected %h", dataout, dout_exp));
    end
  end

  // low half of cycle t
  always @(negedge clk) begin
    int t;
    #2.5;
    t = cyc;
    if (t > 5 && t < N) begin
      chk(dqs_oe == (oe_h[t-1] || oe_h[t]), "DQS_OE (low half, preamble)");
      chk(dqs_o[0] == 1'b0, "DQS low");
      if (oe_h[t-1]) begin
        chk(dq_o == w_h[t-2][15:8], $sformatf("falling beat: got %h expected %h", dq_o, w_h[t-2][15:8]));
        chk(dqm[0] == m_h[t-2][1], "DQM falling beat");
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst = 0;
    wait (cyc == N + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
