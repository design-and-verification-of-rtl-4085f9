// ddr_main_control: main control module.
//
// Holds the command interface (host CMD/ADDR/CMDACK), the counter module
// (200 us power-up delay and refresh interval), the initialization FSM
// (iState) and the command FSM (cState). The pending host request and the
// refresh request go out to the arbiter in the signal generation module;
// its grants come back to the command FSM. iState, cState and the request
// being served go to the command generator. The command FSM starts once the
// initialization FSM reaches i_READY (init_done). The grouping follows the
// design description; the parameters are the timing values of the blocks
// inside (see each block).
module ddr_main_control
  import ddr_pkg::*;
#(
  parameter int unsigned T_200US = 20000,
  parameter int unsigned T_REFI  = 1560,
  parameter int unsigned T_RCD   = 2,
  parameter int unsigned T_RP    = 2,
  parameter int unsigned T_RFC   = 8,
  parameter int unsigned T_WR    = 2,
  parameter int unsigned T_MRD   = 2,
  parameter int unsigned BL      = 8
) (
  input  logic             clk,
  input  logic             rst,
  // host
  input  logic [2:0]       cmd,
  input  logic [ASIZE-1:0] addr,
  output logic             cmdack,
  output logic             init_done,
  // to / from the arbiter
  output logic             host_req,
  output logic             ref_req,
  output logic             refreshing,
  input  logic             host_gnt,
  input  logic             ref_gnt,
  // to the command generator
  output istate_e          istate,
  output logic             ifirst,
  output cstate_e          cstate,
  output logic             cfirst,
  output host_req_t        cur
);

  host_req_t req;
  logic      accept, ref_ack, dly_done;

  ddr_control_if u_ctrl_if (
    .clk, .rst, .cmd, .addr, .cmdack, .accept, .req_valid(host_req), .req
  );

  ddr_refresh_counter #(.T_200US(T_200US), .T_REFI(T_REFI)) u_counter (
    .clk, .rst, .init_done, .ref_ack, .sys_dly_200us(dly_done), .ref_req
  );

  ddr_init_fsm #(.T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD)) u_init_fsm (
    .clk, .rst, .sys_dly_200us(dly_done), .istate, .ifirst, .sys_init_done(init_done)
  );

  ddr_cmd_fsm #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_WR(T_WR), .BL(BL)) u_cmd_fsm (
    .clk, .rst, .init_done, .host_gnt, .ref_gnt, .req, .cstate, .cfirst, .cur,
    .accept, .ref_ack, .refreshing
  );

endmodule
