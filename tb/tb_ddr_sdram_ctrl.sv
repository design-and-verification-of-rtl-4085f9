// tb_ddr_sdram_ctrl: end-to-end test of the DDR SDRAM controller with its
// default parameters, against the behavioural DDR SDRAM model.
//
// A host model issues 2500 random READA/WRITEA commands following the
// controller's host protocol: hold CMD/ADDR until CMDACK, write words in the
// 4 cycles after CMDACK, read words CL+3 .. CL+6 cycles after CMDACK. The
// next command is issued as soon as CMDACK is seen, so bursts to the same
// open row chain back to back. Addresses come from a few rows so that row
// hits and read-after-write both happen; some writes mask bytes. A
// scoreboard of 16-bit words (two byte lanes) predicts every read word.
// Checked: read data, the cycle at which INIT_DONE rises, gapless chaining
// (4 cycles between chained CMDACKs), and the memory model's protocol and
// timing checks. Each mechanism of the controller must occur at least once:
// initialisation, refresh, a host held off by a refresh, a refresh waiting
// for a burst, chained reads, chained writes, masked writes, single-bank
// precharge and both chip selects.
module tb_ddr_sdram_ctrl;
  timeunit 1ns; timeprecision 100ps;
  import ddr_pkg::*;

  localparam int NOPS    = 2500;
  localparam int T_200US = 20000, T_RP = 2, T_RFC = 8, T_MRD = 2, CL = 2;

  logic CLK = 0, RESET = 1;
  logic [2:0] CMD = 3'b000;
  logic [ASIZE-1:0] ADDR = '0;
  logic CMDACK, INIT_DONE;
  logic [DSIZE-1:0] DATAIN = '0, DATAOUT;
  logic [DM_W-1:0] DM = '0;
  logic SCLK, SCLK_N, CKE, RAS_N, CAS_N, WE_N, DQ_OE, DQS_OE;
  logic [SA_W-1:0] SA;
  logic [BANK_W-1:0] BA;
  logic [CS_W-1:0] CS_N;
  logic [DQS_W-1:0] DQM, DQS_O;
  logic [DQ_W-1:0] DQ_O, DQ_I;
  logic dq_m_oe;

  always #5 CLK = ~CLK;

  ddr_sdram_ctrl dut (.*);

  ddr_sdram_model #(.CL(CL), .T_PWR(T_200US)) mem (
    .ck(SCLK), .ck_n(SCLK_N), .cke(CKE), .cs_n(CS_N), .ras_n(RAS_N), .cas_n(CAS_N),
    .we_n(WE_N), .ba(BA), .a(SA), .dqm(DQM[0]), .dq_c(DQ_O), .dq_c_oe(DQ_OE),
    .dqs_c(DQS_O[0]), .dqs_c_oe(DQS_OE), .dq_m(DQ_I), .dq_m_oe(dq_m_oe)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  int init_cycles = 0;   // rising edges after reset with INIT_DONE still low
  always @(posedge CLK) begin
    cyc++;
    if (!RESET && !INIT_DONE) init_cycles++;
  end

  // scoreboard: expected bytes per host word address
  logic [7:0] sb_lo [bit [21:0]];
  logic [7:0] sb_hi [bit [21:0]];

  function automatic logic [21:0] word_addr(logic [21:0] a, int n);
    host_addr_t h;
    h = host_addr_t'(a);
    h.col[1:0] = h.col[1:0] + 2'(n);
    return 22'(h);
  endfunction

  // mechanism counters
  int n_holdoff = 0, n_ref_wait = 0, n_chain_rd = 0, n_chain_wr = 0, n_masked = 0;
  int n_chip = 0, n_reads = 0, n_writes = 0;
  bit chip_seen [2];
  int last_ack = -100;

  always @(posedge CLK) if (!RESET) begin
    if (CMD != 3'b000 && dut.refreshing && !CMDACK) n_holdoff++;
    if (dut.ref_req && (dut.cstate == C_READ || dut.cstate == C_WRITE || dut.cstate == C_ACTIVE))
      n_ref_wait++;
    if (dut.u_main.u_cmd_fsm.reenter) begin
      if (dut.cstate == C_READ) n_chain_rd++; else n_chain_wr++;
    end
  end

  // chained bursts must be gapless: CMDACKs BL/2 cycles apart
  bit chain_next = 0;
  always @(posedge CLK) begin
    if (CMDACK) begin
      if (chain_next) begin
        checks++;
        if (cyc - last_ack != 4) begin
          failures++;
          $display("chained CMDACK %0d cycles after previous", cyc - last_ack);
        end
      end
      last_ack = cyc;
    end
    chain_next = dut.u_main.u_cmd_fsm.reenter;
  end

  // data phase schedule, indexed by the falling-edge count modulo 64: the
  // command process fills it when CMDACK is seen, the process below drives
  // write words and checks read words in the cycles the protocol gives.
  typedef struct {
    bit          v;
    logic [21:0] a;      // host word address of this word
    logic [15:0] w;
    logic [1:0]  m;
  } slot_t;
  slot_t wsched [64];
  slot_t rsched [64];
  int ncyc = 0;

  always @(negedge CLK) begin
    int k;
    ncyc++;
    k = ncyc % 64;
    if (wsched[k].v) begin
      DATAIN = wsched[k].w; DM = wsched[k].m;
      if (!wsched[k].m[0]) sb_lo[wsched[k].a] = wsched[k].w[7:0];
      if (!wsched[k].m[1]) sb_hi[wsched[k].a] = wsched[k].w[15:8];
      wsched[k].v = 0;
    end
    if (rsched[k].v) begin
      logic [15:0] exp;
      exp[7:0]  = sb_lo.exists(rsched[k].a) ? sb_lo[rsched[k].a] : 8'h00;
      exp[15:8] = sb_hi.exists(rsched[k].a) ? sb_hi[rsched[k].a] : 8'h00;
      checks++;
      if (DATAOUT !== exp) begin
        failures++;
        if (failures < 10) $display("[%0t] read %h: got %h expected %h", $time, rsched[k].a, DATAOUT, exp);
      end
      rsched[k].v = 0;
    end
  end

  function automatic logic [21:0] rand_addr(logic [21:0] prev);
    host_addr_t h;
    h = host_addr_t'(prev);
    if ($urandom_range(0, 2) != 0) begin
      h.chip = 1'($urandom_range(0, 1));
      h.bank = 2'($urandom_range(0, 3));
      case ($urandom_range(0, 3))
        0: h.row = 12'h000;
        1: h.row = 12'h001;
        2: h.row = 12'hfff;
        default: h.row = 12'($urandom);
      endcase
    end
    h.col = 7'($urandom_range(0, 15));   // few columns: many read-after-write hits
    return 22'(h);
  endfunction

  initial begin
    logic [21:0] a;
    bit wr, prev_wr;
    a = '0; prev_wr = 0;
    repeat (4) @(posedge CLK);
    @(negedge CLK) RESET = 0;
    wait (INIT_DONE);
    @(negedge CLK);
    checks++;
    // 200 us wait, then one cycle each in i_IDLE and i_NOP, tRP, 2 x tRFC, tMRD
    if (init_cycles != T_200US + 2 + T_RP + 2 * T_RFC + T_MRD) begin
      failures++;
      $display("INIT_DONE after %0d cycles", init_cycles);
    end
    for (int op = 0; op < NOPS; op++) begin
      logic [15:0] w [4];
      logic [1:0]  m [4];
      bit masked;
      a  = rand_addr(a);
      wr = ($urandom_range(0, 3) == 0) ? !prev_wr : prev_wr;
      if ($urandom_range(0, 9) == 0) wr = 1;
      masked = 0;
      for (int n = 0; n < 4; n++) begin
        w[n] = 16'($urandom);
        m[n] = ($urandom_range(0, 7) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
        if (m[n] != 0) masked = 1;
      end
      @(negedge CLK);
      CMD = wr ? 3'b010 : 3'b001; ADDR = a;
      do @(negedge CLK); while (!CMDACK);
      #1;   // after the schedule process has counted this falling edge
      CMD = 3'b000;
      chip_seen[a[21]] = 1;
      if (wr) begin
        n_writes++;
        if (masked) n_masked++;
        for (int n = 0; n < 4; n++) begin
          wsched[(ncyc + 1 + n) % 64].v = 1;
          wsched[(ncyc + 1 + n) % 64].a = word_addr(a, n);
          wsched[(ncyc + 1 + n) % 64].w = w[n];
          wsched[(ncyc + 1 + n) % 64].m = m[n];
        end
      end else begin
        n_reads++;
        for (int n = 0; n < 4; n++) begin
          rsched[(ncyc + CL + 3 + n) % 64].v = 1;
          rsched[(ncyc + CL + 3 + n) % 64].a = word_addr(a, n);
        end
      end
      prev_wr = wr;
      // keep idle gaps now and then so rows also get closed and reopened
      if ($urandom_range(0, 5) == 0) repeat ($urandom_range(1, 12)) @(negedge CLK);
    end
    repeat (40) @(negedge CLK);
    finish_test();
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  task automatic finish_test();
    expect_seen("initialisation", int'(INIT_DONE));
    expect_seen("auto refresh", mem.n_ref - 4);
    expect_seen("host held off by refresh", n_holdoff);
    expect_seen("refresh waits for burst", n_ref_wait);
    expect_seen("chained reads", n_chain_rd);
    expect_seen("chained writes", n_chain_wr);
    expect_seen("masked writes", n_masked);
    expect_seen("bank precharge", mem.n_pre);
    expect_seen("chip 0 and chip 1", int'(chip_seen[0] && chip_seen[1]));
    expect_seen("reads", n_reads);
    expect_seen("writes", n_writes);
    $display("  longest refresh gap %0d cycles, cycles run %0d", mem.max_ref_gap, cyc);
    checks++;
    if (mem.errors != 0) begin
      failures++;
      $display("memory model counted %0d protocol errors", mem.errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
