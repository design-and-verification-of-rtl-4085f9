// tb_ddr_cmd_fsm: checks the command FSM's state sequences and timing.
//
// The testbench plays the command interface (one pending request, dropped
// on accept, optionally replaced by a queued follow-up) and the arbiter
// (refresh first). Each scenario lists the expected (state, cycles) runs and
// compares cState, the first-cycle flag, accept and ref_ack every cycle:
//   write: ACTIVE T_RCD, WRITE BL/2+1+T_WR, PRE T_RP, IDLE
//   read : ACTIVE T_RCD, READ BL/2, PRE T_RP, IDLE
//   chained reads/writes to one row, a follow-up to another row (no chain),
//   refresh from idle (PREALL T_RP, REFRESH T_RFC) and a refresh request
//   arriving during a read burst (the burst finishes first).
module tb_ddr_cmd_fsm;
  import ddr_pkg::*;
  localparam int RCD = 2, RP = 2, RFC = 5, WR = 2, BL = 8;
  logic clk = 0, rst = 1, init_done = 0;
  logic host_gnt, ref_gnt;
  host_req_t req;
  cstate_e cstate;
  logic cfirst, accept, ref_ack, refreshing;
  host_req_t cur;
  int checks = 0, failures = 0;

  // command interface and arbiter stand-ins
  logic hvalid = 0, ref_req = 0;
  host_req_t hreq = '0;
  host_req_t q [$];     // requests in the order the host issues them
  assign req      = hreq;
  assign ref_gnt  = ref_req;
  assign host_gnt = hvalid && !ref_req && !refreshing;

  always @(posedge clk) begin
    if (accept) begin
      void'(q.pop_front());
      hvalid <= (q.size() != 0);
      if (q.size() != 0) hreq <= q[0];
    end
    if (ref_ack) ref_req <= 0;
  end

  ddr_cmd_fsm #(.T_RCD(RCD), .T_RP(RP), .T_RFC(RFC), .T_WR(WR), .BL(BL)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // expect `n` cycles of state s; accept/ref_ack expected in the last one
  task automatic run(cstate_e s, int n, bit acc = 0, bit rack = 0, bit cont = 0);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      chk(cstate == s, $sformatf("%s cycle %0d, got %s", s.name(), i, cstate.name()));
      chk(cfirst == (i == 0 && !cont), $sformatf("first flag %s cycle %0d", s.name(), i));
      chk(accept == (acc && i == n - 1), $sformatf("accept in %s cycle %0d", s.name(), i));
      chk(ref_ack == (rack && i == n - 1), $sformatf("ref_ack in %s cycle %0d", s.name(), i));
    end
  endtask

  function automatic host_req_t mk(bit w, bit chip, logic [1:0] bank, logic [11:0] row, logic [6:0] col);
    host_req_t r;
    r.write = w; r.addr.chip = chip; r.addr.bank = bank; r.addr.row = row; r.addr.col = col;
    return r;
  endfunction

  task automatic give(host_req_t r);
    q.push_back(r);
    if (!hvalid) begin hreq = r; hvalid = 1; end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) begin
      @(negedge clk);
      chk(cstate == C_INIT, "waits for initialisation");
    end
    init_done = 1;
    run(C_IDLE, 3);
    // single write
    give(mk(1, 0, 2'd1, 12'h123, 7'h05));
    run(C_ACTIVE, RCD, 1);
    chk(cur == mk(1, 0, 2'd1, 12'h123, 7'h05), "served request");
    run(C_WRITE, BL / 2 + 1 + WR);
    run(C_PRE, RP);
    run(C_IDLE, 2);
    // single read
    give(mk(0, 1, 2'd2, 12'hfff, 7'h7f));
    run(C_ACTIVE, RCD, 1);
    run(C_READ, BL / 2);
    run(C_PRE, RP);
    run(C_IDLE, 1);
    // chained reads: follow-up to the same row, then one to another row
    give(mk(0, 1, 2'd2, 12'h00f, 7'h00));
    give(mk(0, 1, 2'd2, 12'h00f, 7'h10));
    give(mk(0, 1, 2'd3, 12'h00f, 7'h00));
    run(C_ACTIVE, RCD, 1);
    run(C_READ, BL / 2, 1);            // follow-up accepted: chain
    run(C_READ, BL / 2);               // next is to another bank: no chain
    chk(cur.addr.col == 7'h10, "chained column");
    run(C_PRE, RP);
    run(C_IDLE, 1);
    run(C_ACTIVE, RCD, 1);
    run(C_READ, BL / 2);
    run(C_PRE, RP);
    run(C_IDLE, 1);
    // chained writes
    give(mk(1, 0, 2'd0, 12'h0aa, 7'h00));
    give(mk(1, 0, 2'd0, 12'h0aa, 7'h04));
    run(C_ACTIVE, RCD, 1);
    run(C_WRITE, BL / 2, 1);
    run(C_WRITE, BL / 2 + 1 + WR);
    run(C_PRE, RP);
    run(C_IDLE, 1);
    // refresh from idle, with a host request waiting: refresh first
    ref_req = 1;
    give(mk(0, 0, 2'd0, 12'h001, 7'h00));
    #1 chk(!host_gnt, "host held off by refresh request");
    run(C_PREALL, RP, 0, 1);
    chk(!host_gnt, "host held off during refresh");
    run(C_REFRESH, RFC);
    run(C_IDLE, 1);
    run(C_ACTIVE, RCD, 1);
    // refresh request during the read burst: burst completes, then refresh
    run(C_READ, 1);
    ref_req = 1;
    run(C_READ, BL / 2 - 1, 0, 0, 1);
    run(C_PREALL, RP, 0, 1);
    run(C_REFRESH, RFC);
    run(C_IDLE, 3);
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
