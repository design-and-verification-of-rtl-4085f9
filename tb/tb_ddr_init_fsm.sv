// tb_ddr_init_fsm: checks the initialization state sequence and its timing.
//
// The expected sequence (state, cycles) is i_IDLE until sys_dly_200us, then
// i_NOP 1, i_PRE T_RP, i_AR1 T_RFC, i_AR2 T_RFC, i_MRS T_MRD, i_READY for
// good. Every cycle the state, the first-cycle flag and sys_init_done are
// compared with that table. Run with T_RP = 3, T_RFC = 5, T_MRD = 2.
module tb_ddr_init_fsm;
  import ddr_pkg::*;
  localparam int RP = 3, RFC = 5, MRD = 2;
  logic clk = 0, rst = 1, sys_dly_200us = 0;
  istate_e istate;
  logic ifirst, sys_init_done;
  int checks = 0, failures = 0;

  ddr_init_fsm #(.T_RP(RP), .T_RFC(RFC), .T_MRD(MRD)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic expect_state(istate_e s, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk(istate == s, $sformatf("state %s cycle %0d (got %s)", s.name(), i, istate.name()));
      chk(ifirst == (i == 0), $sformatf("first flag in %s cycle %0d", s.name(), i));
      chk(sys_init_done == (s == I_READY), "init done only in i_READY");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // stays idle while the delay runs
    repeat (10) begin
      @(negedge clk);
      chk(istate == I_IDLE && !sys_init_done, "idle while waiting");
    end
    sys_dly_200us = 1;
    expect_state(I_NOP, 1);
    expect_state(I_PRE, RP);
    expect_state(I_AR1, RFC);
    expect_state(I_AR2, RFC);
    expect_state(I_MRS, MRD);
    expect_state(I_READY, 20);
    // reset returns to idle
    rst = 1; sys_dly_200us = 0;
    @(negedge clk);
    chk(istate == I_IDLE && !sys_init_done, "reset to i_IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
