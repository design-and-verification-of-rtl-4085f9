// ddr_cmd_gen: command generator, the SDRAM command and address pins.
//
// In the first cycle of each initialization state (while istate is not
// i_READY) or of each command-FSM state (afterwards) it issues that state's
// SDRAM command: PRECHARGE all, AUTO REFRESH, LOAD MODE REGISTER during
// initialization; ACTIVE, READ, WRITE, PRECHARGE (one bank), PRECHARGE all
// and AUTO REFRESH afterwards. In every other cycle it issues NOP
// (RAS_N = CAS_N = WE_N = 1); SA, BA and CS_N then keep their last value.
// All pins are registered, so a command appears one cycle after its state is
// entered. Commands for every chip (initialization, precharge-all, refresh)
// drive both CS_N low; the others select the addressed chip.
//
// It also times the data path. oe is high for the BL/2 cycles before the
// write data cycles (cycles 1..BL/2 after a WRITE is on the pins) and
// rd_win for the BL/2 cycles before the read data words are complete
// (cycles CL+1..CL+BL/2 after a READ). READ/WRITE pin codes follow the
// design description; mode register (burst 8, sequential, CAS latency CL),
// other command codes, the column mapping (byte column = 2 x word column,
// A10 = 0) and the CS_N policy are this design's choices.
module ddr_cmd_gen
  import ddr_pkg::*;
#(
  parameter int unsigned CL = 2,
  parameter int unsigned BL = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  istate_e          istate,
  input  logic             ifirst,
  input  cstate_e          cstate,
  input  logic             cfirst,
  input  host_req_t        cur,
  output logic [SA_W-1:0]  sa,
  output logic [BANK_W-1:0] ba,
  output logic [CS_W-1:0]  cs_n,
  output logic             cke,
  output logic             ras_n,
  output logic             cas_n,
  output logic             we_n,
  output logic             oe,
  output logic             rd_win
);

  localparam int unsigned SH = CL + BL / 2 + 1;

  sd_cmd_e               cmd;
  logic                  issue;
  logic                  all_chips;
  logic [SA_W-1:0]       sa_n;
  logic [BANK_W-1:0]     ba_n;
  logic [CS_W-1:0]       chip_cs_n;
  logic [SH-1:0]         wsh, rsh;

  assign chip_cs_n = ~(CS_W'(1) << cur.addr.chip);

  always_comb begin
    cmd       = SD_NOP;
    issue     = 1'b0;
    all_chips = 1'b0;
    sa_n      = sa;
    ba_n      = ba;
    if (istate != I_READY) begin
      if (ifirst) begin
        all_chips = 1'b1;
        case (istate)
          I_PRE: begin cmd = SD_PRE; issue = 1'b1; sa_n = SA_W'(1) << 10; end
          I_AR1, I_AR2: begin cmd = SD_REF; issue = 1'b1; end
          I_MRS: begin cmd = SD_LMR; issue = 1'b1; sa_n = mode_reg(BL, CL); ba_n = '0; end
          default: ;
        endcase
      end
    end else if (cfirst) begin
      case (cstate)
        C_ACTIVE: begin cmd = SD_ACT; issue = 1'b1; sa_n = cur.addr.row; ba_n = cur.addr.bank; end
        C_WRITE, C_READ: begin
          cmd   = (cstate == C_WRITE) ? SD_WRITE : SD_READ;
          issue = 1'b1;
          sa_n  = SA_W'({cur.addr.col, 1'b0});
          ba_n  = cur.addr.bank;
        end
        C_PRE:     begin cmd = SD_PRE; issue = 1'b1; sa_n = '0; ba_n = cur.addr.bank; end
        C_PREALL:  begin cmd = SD_PRE; issue = 1'b1; sa_n = SA_W'(1) << 10; all_chips = 1'b1; end
        C_REFRESH: begin cmd = SD_REF; issue = 1'b1; all_chips = 1'b1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {ras_n, cas_n, we_n} <= SD_NOP;
      cs_n <= '1;
      sa   <= '0;
      ba   <= '0;
      cke  <= 1'b0;
      wsh  <= '0;
      rsh  <= '0;
    end else begin
      {ras_n, cas_n, we_n} <= cmd;
      if (issue) cs_n <= all_chips ? '0 : chip_cs_n;
      sa   <= sa_n;
      ba   <= ba_n;
      cke  <= (istate != I_IDLE);
      wsh  <= {wsh[SH-2:0], cmd == SD_WRITE};
      rsh  <= {rsh[SH-2:0], cmd == SD_READ};
    end
  end

  assign oe     = |wsh[BL/2:1];
  assign rd_win = |rsh[CL+BL/2:CL+1];

endmodule
