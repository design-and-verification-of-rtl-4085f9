// ddr_sdram_ctrl: DDR SDRAM controller, top level.
//
// Sits between a bus master with a simple 16-bit read/write interface and
// an 8-bit DDR SDRAM (two chip selects). It initialises the memory after
// reset (200 us wait, PRECHARGE all, two AUTO REFRESH, LOAD MODE REGISTER:
// burst length 8, CAS latency CL), refreshes it every T_REFI cycles, and
// turns each host READA/WRITEA into ACTIVE, READ or WRITE and PRECHARGE,
// chaining further bursts to an open row back to back.
//
// Host protocol (all synchronous to CLK, RESET active high):
//   * wait for INIT_DONE;
//   * drive CMD (001 READA, 010 WRITEA) and ADDR = {chip, row[11:0],
//     bank[1:0], column[6:0]} (16-bit words) and hold them until CMDACK is
//     high for one cycle; the next command may follow in the next cycle;
//   * WRITEA: drive the 4 words of the burst (column, column+1, ... within
//     an aligned group of 4, wrapping) on DATAIN/DM in the 4 cycles after the
//     CMDACK cycle, one per cycle; DM bit i set masks byte i;
//   * READA: the 4 words appear on DATAOUT in cycles CL+3 .. CL+6 after the
//     CMDACK cycle, one per cycle.
//   Host requests are held off (no CMDACK) while a refresh is pending or
//   running; a refresh waits for a burst in progress.
//
// Memory side: SCLK/SCLK_N are CLK and its inverse; command and address
// pins change after the rising edge; DQ, DQM and DQS carry two beats per
// cycle. The bidirectional DQ and DQS pads and the clock PLL are outside
// this module: DQ and DQS appear as output, output-enable and input
// signals, and CLK is the clock the PLL would deliver. Module structure
// (main control, signal generation, data path) follows the design
// description; timing defaults assume a 100 MHz clock and DDR-200 parts.
module ddr_sdram_ctrl
  import ddr_pkg::*;
#(
  parameter int unsigned T_200US = 20000,
  parameter int unsigned T_REFI  = 1560,
  parameter int unsigned T_RCD   = 2,
  parameter int unsigned T_RP    = 2,
  parameter int unsigned T_RFC   = 8,
  parameter int unsigned T_WR    = 2,
  parameter int unsigned T_MRD   = 2,
  parameter int unsigned CL      = 2,
  parameter int unsigned BL      = 8
) (
  input  logic              CLK,
  input  logic              RESET,
  // host
  input  logic [2:0]        CMD,
  input  logic [ASIZE-1:0]  ADDR,
  output logic              CMDACK,
  input  logic [DSIZE-1:0]  DATAIN,
  input  logic [DM_W-1:0]   DM,
  output logic [DSIZE-1:0]  DATAOUT,
  output logic              INIT_DONE,
  // SDRAM
  output logic              SCLK,
  output logic              SCLK_N,
  output logic [SA_W-1:0]   SA,
  output logic [BANK_W-1:0] BA,
  output logic [CS_W-1:0]   CS_N,
  output logic              CKE,
  output logic              RAS_N,
  output logic              CAS_N,
  output logic              WE_N,
  output logic [DQS_W-1:0]  DQM,
  output logic [DQ_W-1:0]   DQ_O,
  output logic              DQ_OE,
  input  logic [DQ_W-1:0]   DQ_I,
  output logic [DQS_W-1:0]  DQS_O,
  output logic              DQS_OE
);

  logic      host_req, ref_req, refreshing, host_gnt, ref_gnt;
  istate_e   istate;
  cstate_e   cstate;
  logic      ifirst, cfirst, oe, rd_win;
  host_req_t cur;

  ddr_main_control #(
    .T_200US(T_200US), .T_REFI(T_REFI), .T_RCD(T_RCD), .T_RP(T_RP),
    .T_RFC(T_RFC), .T_WR(T_WR), .T_MRD(T_MRD), .BL(BL)
  ) u_main (
    .clk(CLK), .rst(RESET), .cmd(CMD), .addr(ADDR), .cmdack(CMDACK),
    .init_done(INIT_DONE), .host_req, .ref_req, .refreshing, .host_gnt,
    .ref_gnt, .istate, .ifirst, .cstate, .cfirst, .cur
  );

  ddr_signal_gen #(.CL(CL), .BL(BL)) u_sig (
    .clk(CLK), .rst(RESET), .host_req, .ref_req, .refreshing, .host_gnt,
    .ref_gnt, .istate, .ifirst, .cstate, .cfirst, .cur,
    .sa(SA), .ba(BA), .cs_n(CS_N), .cke(CKE), .ras_n(RAS_N), .cas_n(CAS_N),
    .we_n(WE_N), .oe, .rd_win
  );

  ddr_data_path u_dp (
    .clk(CLK), .rst(RESET), .datain(DATAIN), .dm(DM), .dataout(DATAOUT),
    .oe, .rd_win, .dq_o(DQ_O), .dq_oe(DQ_OE), .dq_i(DQ_I), .dqm(DQM),
    .dqs_o(DQS_O), .dqs_oe(DQS_OE)
  );

  // forwarded memory clock, through the same DDR output cell as the data
  ddr_oddr #(.W(2)) u_sclk (
    .clk(CLK), .d_rise(2'b01), .d_fall(2'b10), .q({SCLK_N, SCLK})
  );

endmodule
