// ddr_sdram_model: behavioural model of an 8-bit DDR SDRAM pair (two chip
// selects, 4 banks, 4096 rows, 256 columns) for simulation only.
//
// It decodes the command pins on each rising edge of ck, keeps the open row
// of every bank, stores written bytes in a sparse array and returns read
// data CL cycles after a READ, each beat td after the clock edge that
// launches it. Write beats are sampled a quarter cycle (tq) after each
// rising and falling clock edge of the data phase, which starts one cycle
// after the WRITE (tDQSS = 1). Bursts are 8 beats, sequential, wrapping in
// an aligned group of 8 columns. It checks the protocol and the timing a
// real part needs (counted in clock cycles) and counts every violation in
// `errors`: commands before the power-up wait, the initialisation order,
// the mode register (burst length 8, CAS latency CL), ACTIVE to an open
// bank, READ/WRITE to a closed bank, tRCD, tRP, tRFC, tMRD, write recovery,
// refresh gap, DQS/DQ enables during write beats and bus contention during
// read beats. Command counters are public for coverage.
module ddr_sdram_model #(
  parameter int  CL        = 2,
  parameter int  T_RCD     = 2,
  parameter int  T_RP      = 2,
  parameter int  T_RFC     = 8,
  parameter int  T_MRD     = 2,
  parameter int  T_WR      = 2,
  parameter int  T_PWR     = 20000,   // cycles before the first command
  parameter int  REF_MAX   = 1700,    // longest allowed gap between refreshes
  parameter real TQ        = 2.5,     // quarter clock period, ns
  parameter real TD        = 1.0      // read data output delay, ns
) (
  input  logic       ck,
  input  logic       ck_n,
  input  logic       cke,
  input  logic [1:0] cs_n,
  input  logic       ras_n,
  input  logic       cas_n,
  input  logic       we_n,
  input  logic [1:0] ba,
  input  logic [11:0] a,
  input  logic       dqm,
  input  logic [7:0] dq_c,      // controller DQ output
  input  logic       dq_c_oe,
  input  logic       dqs_c,
  input  logic       dqs_c_oe,
  output logic [7:0] dq_m,      // model DQ output (to controller input)
  output logic       dq_m_oe
);
  timeunit 1ns; timeprecision 100ps;

  typedef struct {
    bit       v;
    bit       chip;
    bit [1:0] bank;
    bit [11:0] row;
    bit [7:0] col;
    int       pair;
  } slot_t;

  logic [7:0] mem [bit [22:0]];
  int    cyc = 0;
  int    errors = 0;
  int    n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_prea = 0, n_ref = 0, n_lmr = 0;
  int    n_init_ref = 0;
  bit    mode_ok = 0;
  bit    open_b   [2][4];
  bit [11:0] row_b [2][4];
  int    t_act    [2][4];
  int    t_pre    [2][4];
  int    t_rd     [2][4];
  int    t_wrd    [2][4];   // cycle of the last write data pair
  int    t_ref    [2];
  int    t_lmr = -1000;
  int    max_ref_gap = 0;
  slot_t wslot [16];
  slot_t rslot [16];

  function automatic bit [22:0] key(bit chip, bit [1:0] bank, bit [11:0] row, bit [7:0] col);
    return {chip, bank, row, col};
  endfunction

  function automatic bit [7:0] beat_col(bit [7:0] c0, int b);
    bit [2:0] lo;
    lo = c0[2:0] + 3'(b);
    return {c0[7:3], lo};
  endfunction

  task automatic err(string msg);
    errors++;
    if (errors <= 10) $display("[%0t] ddr model: %s", $time, msg);
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      t_ref[c] = -1000;
      for (int b = 0; b < 4; b++) begin
        open_b[c][b] = 0; t_act[c][b] = -1000; t_pre[c][b] = -1000;
        t_rd[c][b] = -1000; t_wrd[c][b] = -1000; row_b[c][b] = 0;
      end
    end
    for (int i = 0; i < 16; i++) begin wslot[i].v = 0; rslot[i].v = 0; end
    dq_m = '0; dq_m_oe = 0;
  end

  // command decoder
  always @(posedge ck) begin
    logic [2:0] c;
    cyc = cyc + 1;
    wslot[(cyc + 15) % 16].v = 0;   // retire last cycle's slots
    rslot[(cyc + 15) % 16].v = 0;
    c = {ras_n, cas_n, we_n};
    if (cs_n != 2'b11 && c != 3'b111) begin
      if (!cke)        err("command while CKE low");
      if (cyc < T_PWR) err("command before power-up wait");
      for (int ch = 0; ch < 2; ch++) if (!cs_n[ch]) begin
        int b;
        b = int'(ba);
        case (c)
          3'b011: begin // ACTIVE
            n_act++;
            if (!mode_ok)                 err("ACTIVE before mode register");
            if (open_b[ch][b])            err("ACTIVE to open bank");
            if (cyc - t_pre[ch][b] < T_RP) err("tRP violated before ACTIVE");
            if (cyc - t_ref[ch] < T_RFC)   err("tRFC violated");
            if (cyc - t_lmr < T_MRD)       err("tMRD violated");
            open_b[ch][b] = 1; row_b[ch][b] = a; t_act[ch][b] = cyc;
          end
          3'b101, 3'b100: begin // READ / WRITE
            if (cs_n == 2'b00)             err("READ/WRITE to both chips");
            if (!open_b[ch][b])            err("READ/WRITE to closed bank");
            if (cyc - t_act[ch][b] < T_RCD) err("tRCD violated");
            if (a[10])                     err("unexpected auto precharge");
            for (int n = 0; n < 4; n++) begin
              slot_t s;
              s.v = 1; s.chip = ch[0]; s.bank = ba; s.row = row_b[ch][b]; s.col = a[7:0]; s.pair = n;
              if (c == 3'b100) wslot[(cyc + 1 + n) % 16] = s;
              else             rslot[(cyc + CL + n) % 16] = s;
            end
            if (c == 3'b100) begin n_wr++; t_wrd[ch][b] = cyc + 4; end
            else begin n_rd++; t_rd[ch][b] = cyc; end
          end
          3'b010: begin // PRECHARGE
            for (int bb = 0; bb < 4; bb++) if (a[10] || bb == b) begin
              if (cyc - t_wrd[ch][bb] < T_WR + 1) err("write recovery violated");
              if (cyc - t_rd[ch][bb] < 4)         err("PRECHARGE inside read burst");
              open_b[ch][bb] = 0; t_pre[ch][bb] = cyc;
            end
            if (a[10]) n_prea++; else n_pre++;
          end
          3'b001: begin // AUTO REFRESH
            n_ref++;
            for (int bb = 0; bb < 4; bb++) begin
              if (open_b[ch][bb])              err("REFRESH with open bank");
              if (cyc - t_pre[ch][bb] < T_RP)  err("tRP violated before REFRESH");
            end
            if (cyc - t_ref[ch] < T_RFC) err("tRFC violated between refreshes");
            if (!mode_ok) n_init_ref++;
            else if (cyc - t_ref[ch] > max_ref_gap) max_ref_gap = cyc - t_ref[ch];
            if (mode_ok && cyc - t_ref[ch] > REF_MAX) err("refresh interval exceeded");
            t_ref[ch] = cyc;
          end
          3'b000: begin // LOAD MODE REGISTER
            n_lmr++;
            if (n_init_ref < 4)  err("mode register before two refreshes");
            for (int bb = 0; bb < 4; bb++) if (open_b[ch][bb]) err("LMR with open bank");
            if (ba != 0 || a[2:0] != 3'b011 || a[3] != 0 || a[6:4] != 3'(CL))
              err("unexpected mode register value");
            mode_ok = 1; t_lmr = cyc;
          end
          default: err("unsupported command");
        endcase
      end
    end
  end

  // write data: sample a quarter cycle after each edge of the data phase
  always @(posedge ck) begin
    slot_t s;
    #(TQ);
    s = wslot[cyc % 16];
    if (s.v) begin
      if (!dq_c_oe || !dqs_c_oe || dqs_c !== 1'b1) err("write beat without DQ/DQS");
      if (!dqm) mem[key(s.chip, s.bank, s.row, beat_col(s.col, 2 * s.pair))] = dq_c;
    end
  end

  always @(negedge ck) begin
    slot_t s;
    #(TQ);
    s = wslot[cyc % 16];
    if (s.v) begin
      if (!dq_c_oe || !dqs_c_oe || dqs_c !== 1'b0) err("write beat without DQ/DQS");
      if (!dqm) mem[key(s.chip, s.bank, s.row, beat_col(s.col, 2 * s.pair + 1))] = dq_c;
    end
  end

  // read data: launched td after each edge of the data phase
  function automatic logic [7:0] rd_byte(slot_t s, int b);
    bit [22:0] k;
    k = key(s.chip, s.bank, s.row, beat_col(s.col, b));
    return mem.exists(k) ? mem[k] : 8'h00;
  endfunction

  always @(posedge ck) begin
    slot_t s;
    #(TD);
    s = rslot[cyc % 16];
    dq_m_oe = s.v;
    if (s.v) begin
      dq_m = rd_byte(s, 2 * s.pair);
      if (dq_c_oe) err("bus contention on DQ");
    end
  end

  always @(negedge ck) begin
    slot_t s;
    #(TD);
    s = rslot[cyc % 16];
    if (s.v) dq_m = rd_byte(s, 2 * s.pair + 1);
  end

endmodule
