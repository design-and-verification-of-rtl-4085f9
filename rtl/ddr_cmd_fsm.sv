// ddr_cmd_fsm: command FSM (cState) for reads, writes and refresh.
//
// States: C_INIT (waiting for the initialization FSM), C_IDLE, C_ACTIVE,
// C_WRITE, C_READ, C_PRE (precharge the open bank), C_PREALL (precharge all
// banks) and C_REFRESH. From idle a refresh grant leads to precharge-all and
// refresh; a host grant opens the row (ACTIVE) and, T_RCD cycles later, goes
// to read or write. A read or write state lasts one burst, BL/2 cycles
// (writes add T_WR+1 cycles of write recovery before the row is closed). In
// its last burst cycle a further host request of the same kind to the same
// chip, bank and row re-enters the state, so bursts run back to back;
// a refresh request closes all banks and refreshes; otherwise the bank is
// precharged and the FSM returns to idle.
//
// Outputs: cstate and cfirst (first cycle of a state, also on re-entry),
// cur (the request being served, for the address pins), accept (one cycle,
// the host request is taken; its CMDACK follows a cycle later), ref_ack
// (one cycle, the refresh is under way) and refreshing (for the arbiter).
// The states and transitions follow the design's command state diagram;
// timing values are assumed DDR-200 values at 100 MHz.
module ddr_cmd_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 8,
  parameter int unsigned T_WR  = 2,
  parameter int unsigned BL    = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      init_done,
  input  logic      host_gnt,
  input  logic      ref_gnt,
  input  host_req_t req,
  output cstate_e   cstate,
  output logic      cfirst,
  output host_req_t cur,
  output logic      accept,
  output logic      ref_ack,
  output logic      refreshing
);

  localparam int unsigned BURST_CYC = BL / 2;
  localparam int unsigned WR_CYC    = BURST_CYC + 1 + T_WR;

  logic [4:0] cnt;
  cstate_e    nstate;
  logic       reenter;
  logic       row_hit;

  assign row_hit = (req.addr.chip == cur.addr.chip) && (req.addr.bank == cur.addr.bank) &&
                   (req.addr.row == cur.addr.row);

  always_comb begin
    nstate  = cstate;
    reenter = 1'b0;
    accept  = 1'b0;
    ref_ack = 1'b0;
    case (cstate)
      C_INIT: if (init_done) nstate = C_IDLE;
      C_IDLE: begin
        if (ref_gnt)       nstate = C_PREALL;
        else if (host_gnt) nstate = C_ACTIVE;
      end
      C_ACTIVE: if (cnt == 5'(T_RCD - 1)) begin
        nstate = cur.write ? C_WRITE : C_READ;
        accept = 1'b1;
      end
      C_READ: if (cnt == 5'(BURST_CYC - 1)) begin
        if (ref_gnt) nstate = C_PREALL;
        else if (host_gnt && !req.write && row_hit) begin
          reenter = 1'b1;
          accept  = 1'b1;
        end else nstate = C_PRE;
      end
      C_WRITE: begin
        if (cnt == 5'(BURST_CYC - 1) && !ref_gnt && host_gnt && req.write && row_hit) begin
          reenter = 1'b1;
          accept  = 1'b1;
        end else if (cnt == 5'(WR_CYC - 1)) begin
          nstate = ref_gnt ? C_PREALL : C_PRE;
        end
      end
      C_PRE:     if (cnt == 5'(T_RP - 1)) nstate = C_IDLE;
      C_PREALL:  if (cnt == 5'(T_RP - 1)) begin
        nstate  = C_REFRESH;
        ref_ack = 1'b1;
      end
      C_REFRESH: if (cnt == 5'(T_RFC - 1)) nstate = C_IDLE;
      default:   nstate = C_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cstate <= C_INIT;
      cfirst <= 1'b1;
      cnt    <= '0;
      cur    <= '0;
    end else begin
      cstate <= nstate;
      cfirst <= (nstate != cstate) || reenter;
      cnt    <= ((nstate != cstate) || reenter) ? '0 : cnt + 1'b1;
      // take the request when a row is opened or a burst is chained onto it
      if ((cstate == C_IDLE && nstate == C_ACTIVE) || reenter) cur <= req;
    end
  end

  assign refreshing = (cstate == C_PREALL) || (cstate == C_REFRESH);

endmodule
