// tb_ddr_cmd_gen: checks the command generator's pins and data timing.
//
// The FSM states are driven directly. One cycle after a state's first cycle
// the pins must carry that state's command: during initialisation
// PRECHARGE all (A10 = 1), AUTO REFRESH and LOAD MODE REGISTER (BA = 0,
// SA = 0x023: burst 8, sequential, CAS latency 2) to both chips; afterwards
// ACTIVE (row), WRITE/READ (byte column = 2 x word column, A10 = 0),
// PRECHARGE of one bank, PRECHARGE all and AUTO REFRESH. Other cycles are
// NOP with CS_N kept. oe must be high exactly in cycles 1..4 after the WRITE
// is on the pins and rd_win in cycles CL+1..CL+4 after the READ.
module tb_ddr_cmd_gen;
  import ddr_pkg::*;
  localparam int CL = 2;
  logic clk = 0, rst = 1;
  istate_e istate = I_IDLE;
  cstate_e cstate = C_INIT;
  logic ifirst = 0, cfirst = 0;
  host_req_t cur = '0;
  logic [SA_W-1:0] sa;
  logic [BANK_W-1:0] ba;
  logic [CS_W-1:0] cs_n;
  logic cke, ras_n, cas_n, we_n, oe, rd_win;
  int checks = 0, failures = 0;

  ddr_cmd_gen #(.CL(CL), .BL(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // drive one cycle of state, then look at the pins after the clock edge
  task automatic step(istate_e is, bit ifi, cstate_e cs, bit cfi);
    istate = is; ifirst = ifi; cstate = cs; cfirst = cfi;
    @(negedge clk);
  endtask

  task automatic pins(logic [2:0] c, string what);
    chk({ras_n, cas_n, we_n} == c, $sformatf("%s: got %b", what, {ras_n, cas_n, we_n}));
  endtask

  initial begin
    int k;
    @(negedge clk) rst = 0;
    step(I_IDLE, 1, C_INIT, 1);
    pins(3'b111, "NOP in i_IDLE"); chk(!cke, "CKE low in i_IDLE");
    step(I_NOP, 1, C_INIT, 0);
    pins(3'b111, "NOP in i_NOP"); chk(cke, "CKE high after i_IDLE");
    step(I_PRE, 1, C_INIT, 0);
    pins(3'b010, "PRECHARGE"); chk(sa[10] && cs_n == 2'b00, "precharge all, both chips");
    step(I_PRE, 0, C_INIT, 0);
    pins(3'b111, "NOP after PRECHARGE"); chk(cs_n == 2'b00, "CS_N kept");
    step(I_AR1, 1, C_INIT, 0);
    pins(3'b001, "AUTO REFRESH 1");
    step(I_AR1, 0, C_INIT, 0);
    pins(3'b111, "NOP");
    step(I_AR2, 1, C_INIT, 0);
    pins(3'b001, "AUTO REFRESH 2");
    step(I_MRS, 1, C_INIT, 0);
    pins(3'b000, "LOAD MODE REGISTER");
    chk(sa == 12'h023 && ba == 2'b00, $sformatf("mode register value %h", sa));
    step(I_MRS, 0, C_INIT, 0);
    pins(3'b111, "NOP");
    step(I_READY, 1, C_IDLE, 1);
    pins(3'b111, "NOP in idle");
    // normal accesses
    cur.write = 1; cur.addr.chip = 1; cur.addr.bank = 2'd2; cur.addr.row = 12'habc; cur.addr.col = 7'h15;
    step(I_READY, 0, C_ACTIVE, 1);
    pins(3'b011, "ACTIVE");
    chk(sa == 12'habc && ba == 2'd2 && cs_n == 2'b01, "ACTIVE row, bank, chip 1");
    step(I_READY, 0, C_ACTIVE, 0);
    pins(3'b111, "NOP");
    step(I_READY, 0, C_WRITE, 1);
    pins(3'b100, "WRITE");
    chk(sa == 12'h02a && ba == 2'd2 && cs_n == 2'b01, $sformatf("WRITE column %h", sa));
    chk(!oe, "oe low with WRITE on the pins");
    for (k = 1; k <= 7; k++) begin
      step(I_READY, 0, C_WRITE, 0);
      pins(3'b111, "NOP in write burst");
      chk(oe == (k >= 1 && k <= 4), $sformatf("oe %0d cycles after WRITE", k));
      chk(!rd_win, "no read window on writes");
    end
    step(I_READY, 0, C_PRE, 1);
    pins(3'b010, "PRECHARGE bank");
    chk(!sa[10] && ba == 2'd2 && cs_n == 2'b01, "single bank precharge");
    cur.write = 0; cur.addr.chip = 0; cur.addr.bank = 2'd1; cur.addr.row = 12'h00f; cur.addr.col = 7'h7f;
    step(I_READY, 0, C_ACTIVE, 1);
    pins(3'b011, "ACTIVE");
    chk(cs_n == 2'b10 && sa == 12'h00f, "ACTIVE chip 0");
    step(I_READY, 0, C_READ, 1);
    pins(3'b101, "READ");
    chk(sa == 12'h0fe && ba == 2'd1 && !sa[10], $sformatf("READ column %h", sa));
    for (k = 1; k <= 8; k++) begin
      step(I_READY, 0, C_READ, 0);
      chk(rd_win == (k >= CL + 1 && k <= CL + 4), $sformatf("rd_win %0d cycles after READ", k));
      chk(!oe, "no oe on reads");
    end
    step(I_READY, 0, C_PREALL, 1);
    pins(3'b010, "PRECHARGE all");
    chk(sa[10] && cs_n == 2'b00, "precharge all to both chips");
    step(I_READY, 0, C_REFRESH, 1);
    pins(3'b001, "AUTO REFRESH");
    chk(cs_n == 2'b00, "refresh both chips");
    step(I_READY, 0, C_REFRESH, 0);
    pins(3'b111, "NOP");
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
