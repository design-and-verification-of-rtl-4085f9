// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// The controller connects a 16-bit single-data-rate host bus to an 8-bit
// DDR SDRAM bus made of two chip selects, four banks, 4096 rows and 256
// byte-wide columns per row. The host addresses 16-bit words; one host word
// is two DDR beats (low byte on the rising-edge beat, high byte on the
// falling-edge beat). A burst of 8 beats moves 4 host words.
//
// Fixed by the design description: burst length 8, 16-bit host / 8-bit
// memory data, a 12-bit SA bus, 2-bit BA, 2-bit CS_N, 3-bit CMD, a 22-bit
// host address, the READ (RAS_N=1, CAS_N=0, WE_N=1) and WRITE (RAS_N=1,
// CAS_N=0, WE_N=0) pin codes and the state names of both FSMs. The host
// command codes, the address field order and the remaining SDRAM command
// codes (standard JEDEC values) are this design's choices.
package ddr_pkg;

  localparam int DSIZE  = 16;          // host data width
  localparam int DQ_W   = DSIZE / 2;   // DDR data width
  localparam int DM_W   = DSIZE / 8;   // host byte-mask width
  localparam int DQS_W  = DQ_W / 8;    // strobes / masks on the DDR side
  localparam int ROW_W  = 12;
  localparam int BANK_W = 2;
  localparam int COL_W  = 7;           // column of a 16-bit host word
  localparam int CS_W   = 2;           // chip selects
  localparam int SA_W   = 12;
  localparam int ASIZE  = 1 + ROW_W + BANK_W + COL_W;  // 22

  // Host command codes on CMD[2:0]
  typedef enum logic [2:0] {
    HCMD_NOP    = 3'b000,
    HCMD_READA  = 3'b001,
    HCMD_WRITEA = 3'b010
  } host_cmd_e;

  // Host word address: {chip, row, bank, column}
  typedef struct packed {
    logic              chip;
    logic [ROW_W-1:0]  row;
    logic [BANK_W-1:0] bank;
    logic [COL_W-1:0]  col;
  } host_addr_t;

  // A decoded host request as passed from the command interface onwards
  typedef struct packed {
    logic       write;   // 1 = WRITEA, 0 = READA
    host_addr_t addr;
  } host_req_t;

  // SDRAM command, as the pin code {RAS_N, CAS_N, WE_N} with CS_N low
  typedef enum logic [2:0] {
    SD_LMR   = 3'b000,
    SD_REF   = 3'b001,
    SD_PRE   = 3'b010,
    SD_ACT   = 3'b011,
    SD_WRITE = 3'b100,
    SD_READ  = 3'b101,
    SD_BST   = 3'b110,
    SD_NOP   = 3'b111
  } sd_cmd_e;

  // Initialization FSM state (iState)
  typedef enum logic [2:0] {
    I_IDLE, I_NOP, I_PRE, I_AR1, I_AR2, I_MRS, I_READY
  } istate_e;

  // Command FSM state (cState)
  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_ACTIVE, C_WRITE, C_READ, C_PRE, C_PREALL, C_REFRESH
  } cstate_e;

  // Mode register value: burst type sequential, given burst length and CAS
  // latency (A[2:0] = burst length code, A[6:4] = CAS latency).
  function automatic logic [SA_W-1:0] mode_reg(input int bl, input int cl);
    logic [2:0] blc;
    case (bl)
      2:       blc = 3'b001;
      4:       blc = 3'b010;
      default: blc = 3'b011;
    endcase
    return SA_W'({cl[2:0], 1'b0, blc});
  endfunction

endpackage
