// ddr_init_fsm: initialization FSM (iState).
//
// Walks the SDRAM power-up sequence once after reset:
//   i_IDLE  wait for sys_dly_200us (clock/power stabilisation)
//   i_NOP   one cycle, CKE goes high
//   i_PRE   PRECHARGE all banks, stay T_RP cycles
//   i_AR1   AUTO REFRESH, stay T_RFC cycles
//   i_AR2   AUTO REFRESH, stay T_RFC cycles
//   i_MRS   LOAD MODE REGISTER, stay T_MRD cycles
//   i_READY stay here; sys_init_done is high
// istate is registered; ifirst is high in the first cycle of each state, so
// that the command generator issues that state's command exactly once.
// The state sequence and the 200 us wait follow the design description; the
// wait lengths T_RP, T_RFC and T_MRD are assumed DDR-200 values at 100 MHz.
// Synchronous active-high reset returns to i_IDLE.
module ddr_init_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 8,
  parameter int unsigned T_MRD = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sys_dly_200us,
  output istate_e istate,
  output logic    ifirst,
  output logic    sys_init_done
);

  logic [3:0] cnt;      // cycles spent in the current state
  istate_e    nstate;

  // number of cycles a state lasts
  function automatic logic [3:0] dur(istate_e s);
    case (s)
      I_PRE:        return 4'(T_RP);
      I_AR1, I_AR2: return 4'(T_RFC);
      I_MRS:        return 4'(T_MRD);
      default:      return 4'd1;
    endcase
  endfunction

  logic done_here;
  assign done_here = (cnt == dur(istate) - 4'd1);

  always_comb begin
    nstate = istate;
    case (istate)
      I_IDLE:  if (sys_dly_200us) nstate = I_NOP;
      I_NOP:   nstate = I_PRE;
      I_PRE:   if (done_here) nstate = I_AR1;
      I_AR1:   if (done_here) nstate = I_AR2;
      I_AR2:   if (done_here) nstate = I_MRS;
      I_MRS:   if (done_here) nstate = I_READY;
      default: nstate = I_READY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      istate <= I_IDLE;
      ifirst <= 1'b1;
      cnt    <= '0;
    end else begin
      istate <= nstate;
      ifirst <= (nstate != istate);
      cnt    <= (nstate != istate) ? '0 : cnt + 1'b1;
    end
  end

  assign sys_init_done = (istate == I_READY);

endmodule
