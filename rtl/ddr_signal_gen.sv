// ddr_signal_gen: signal generation module.
//
// Puts together the arbiter, which decides between the pending host command
// and a refresh request (refresh first), and the command generator, which
// turns iState/cState and the request being served into the registered
// SDRAM command and address pins and the data path timing (oe, rd_win).
// The grants go back to the command FSM in the main control module. The
// split into arbiter and command generator follows the design description.
module ddr_signal_gen
  import ddr_pkg::*;
#(
  parameter int unsigned CL = 2,
  parameter int unsigned BL = 8
) (
  input  logic              clk,
  input  logic              rst,
  // arbitration
  input  logic              host_req,
  input  logic              ref_req,
  input  logic              refreshing,
  output logic              host_gnt,
  output logic              ref_gnt,
  // from the FSMs
  input  istate_e           istate,
  input  logic              ifirst,
  input  cstate_e           cstate,
  input  logic              cfirst,
  input  host_req_t         cur,
  // SDRAM pins
  output logic [SA_W-1:0]   sa,
  output logic [BANK_W-1:0] ba,
  output logic [CS_W-1:0]   cs_n,
  output logic              cke,
  output logic              ras_n,
  output logic              cas_n,
  output logic              we_n,
  // data path timing
  output logic              oe,
  output logic              rd_win
);

  ddr_arbiter u_arbiter (
    .host_req, .ref_req, .refreshing, .host_gnt, .ref_gnt
  );

  ddr_cmd_gen #(.CL(CL), .BL(BL)) u_cmd_gen (
    .clk, .rst, .istate, .ifirst, .cstate, .cfirst, .cur,
    .sa, .ba, .cs_n, .cke, .ras_n, .cas_n, .we_n, .oe, .rd_win
  );

endmodule
