// tb_ddr_signal_gen: checks arbitration and command generation together.
//
// Drives the requests and the FSM states directly. Checks that a refresh
// request is granted ahead of a host request, that the host gets no grant
// during a refresh, and that states reach the pins one cycle later as the
// right commands (AUTO REFRESH, ACTIVE, WRITE with the burst window on oe,
// PRECHARGE) with the request's bank, row and column.
module tb_ddr_signal_gen;
  import ddr_pkg::*;
  logic clk = 0, rst = 1;
  logic host_req = 0, ref_req = 0, refreshing = 0, host_gnt, ref_gnt;
  istate_e istate = I_READY;
  cstate_e cstate = C_IDLE;
  logic ifirst = 0, cfirst = 0;
  host_req_t cur = '0;
  logic [SA_W-1:0] sa;
  logic [BANK_W-1:0] ba;
  logic [CS_W-1:0] cs_n;
  logic cke, ras_n, cas_n, we_n, oe, rd_win;
  int checks = 0, failures = 0;

  ddr_signal_gen dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic step(cstate_e cs, bit cfi);
    cstate = cs; cfirst = cfi;
    @(negedge clk);
  endtask

  initial begin
    int n_oe;
    @(negedge clk) rst = 0;
    host_req = 1; ref_req = 1; #1;
    chk(ref_gnt && !host_gnt, "refresh before host");
    ref_req = 0; refreshing = 1; #1;
    chk(!host_gnt && !ref_gnt, "host held off during refresh");
    refreshing = 0; #1;
    chk(host_gnt && !ref_gnt, "host granted");
    step(C_REFRESH, 1);
    chk({ras_n, cas_n, we_n} == 3'b001 && cs_n == 2'b00, "AUTO REFRESH");
    cur.write = 1; cur.addr.chip = 0; cur.addr.bank = 2'd3; cur.addr.row = 12'h5a5; cur.addr.col = 7'h40;
    step(C_ACTIVE, 1);
    chk({ras_n, cas_n, we_n} == 3'b011 && sa == 12'h5a5 && ba == 2'd3 && cs_n == 2'b10, "ACTIVE");
    step(C_ACTIVE, 0);
    chk({ras_n, cas_n, we_n} == 3'b111, "NOP");
    step(C_WRITE, 1);
    chk({ras_n, cas_n, we_n} == 3'b100 && sa == 12'h080 && ba == 2'd3, "WRITE");
    n_oe = 0;
    repeat (6) begin step(C_WRITE, 0); n_oe += int'(oe); end
    chk(n_oe == 4, $sformatf("oe for %0d cycles", n_oe));
    step(C_PRE, 1);
    chk({ras_n, cas_n, we_n} == 3'b010 && !sa[10] && ba == 2'd3, "PRECHARGE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
