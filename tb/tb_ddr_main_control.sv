// tb_ddr_main_control: checks the main control module as a whole.
//
// Runs with T_200US = 30 and T_REFI = 150 and plays the arbiter (refresh
// first, no host grant while refreshing). Checks: the initialisation states
// and INIT_DONE at T_200US + 2 + T_RP + 2 T_RFC + T_MRD cycles; an idle
// controller acknowledges a READA 4 cycles after it is presented (latch,
// idle, T_RCD cycles of ACTIVE) and serves it as ACTIVE, READ, PRE with the
// given address; a refresh request arrives T_REFI cycles after INIT_DONE
// and runs PREALL then REFRESH; a host command presented while a refresh is
// pending or running is acknowledged only after the refresh.
module tb_ddr_main_control;
  import ddr_pkg::*;
  localparam int TD = 30, TR = 150, RP = 2, RFC = 8, MRD = 2;
  logic clk = 0, rst = 1;
  logic [2:0] cmd = 3'b000;
  logic [ASIZE-1:0] addr = '0;
  logic cmdack, init_done, host_req, ref_req, refreshing, host_gnt, ref_gnt;
  istate_e istate;
  cstate_e cstate;
  logic ifirst, cfirst;
  host_req_t cur;
  int checks = 0, failures = 0;
  int cyc = 0;

  assign ref_gnt  = ref_req;
  assign host_gnt = host_req && !ref_req && !refreshing;

  ddr_main_control #(.T_200US(TD), .T_REFI(TR), .T_RP(RP), .T_RFC(RFC), .T_MRD(MRD)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // issue a command and return the number of cycles until CMDACK
  task automatic issue(logic [2:0] c, logic [21:0] a, output int lat);
    cmd = c; addr = a; lat = 0;
    do begin @(negedge clk); lat++; end while (!cmdack);
    cmd = 3'b000;
  endtask

  int t0, t_init, lat;
  bit seen_act, seen_rd, seen_pre, seen_prea, seen_ref;

  always @(negedge clk) begin
    if (cstate == C_ACTIVE)  seen_act  = 1;
    if (cstate == C_READ)    seen_rd   = 1;
    if (cstate == C_PRE)     seen_pre  = 1;
    if (cstate == C_PREALL)  seen_prea = 1;
    if (cstate == C_REFRESH) seen_ref  = 1;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    t0 = cyc;
    while (!init_done) begin
      @(negedge clk);
      chk(cstate == C_INIT || init_done, "command FSM waits for init");
    end
    t_init = cyc;
    chk(istate == I_READY, "i_READY");
    chk(t_init - t0 == TD + 2 + RP + 2 * RFC + MRD, $sformatf("INIT_DONE after %0d", t_init - t0));
    // a read on an idle controller
    @(negedge clk);
    issue(3'b001, 22'h2abcde, lat);
    chk(lat == 4, $sformatf("CMDACK latency %0d", lat));
    chk(cstate == C_READ && cur == host_req_t'({1'b0, 22'h2abcde}), "serving the read");
    repeat (10) @(negedge clk);
    chk(seen_act && seen_rd && seen_pre && cstate == C_IDLE, "ACTIVE, READ, PRE, back to idle");
    // wait for the refresh request
    while (!ref_req) @(negedge clk);
    chk(cyc - t_init == TR, $sformatf("first refresh request %0d cycles after init", cyc - t_init));
    // host command during the refresh
    issue(3'b010, 22'h012345, lat);
    chk(seen_prea && seen_ref, "PRECHARGE all and REFRESH ran");
    chk(lat >= RP + RFC, $sformatf("host held off %0d cycles", lat));
    chk(cstate == C_WRITE && cur.write, "write served after refresh");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
