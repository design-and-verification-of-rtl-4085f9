// ddr_control_if: the command interface between the host and the controller.
//
// The host puts a command on CMD (001 READA, 010 WRITEA, anything else is a
// no-operation) with its word address on ADDR and holds both until CMDACK
// is high for one cycle. This block decodes the command and keeps it as a
// pending request (req_valid, req) for the arbiter and command FSM. When the
// command FSM accepts the request (accept, one cycle) the request is
// dropped and CMDACK is raised in the next cycle, the cycle before the READ
// or WRITE command reaches the SDRAM pins. A command still on CMD while
// CMDACK is high is the one just acknowledged and is not taken again.
// Decoding and acknowledging follow the design description; the command
// codes and this hold-until-acknowledge handshake are this design's choice.
module ddr_control_if
  import ddr_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       cmd,
  input  logic [ASIZE-1:0] addr,
  output logic             cmdack,
  input  logic             accept,
  output logic             req_valid,
  output host_req_t        req
);

  logic is_rw;
  assign is_rw = (cmd == HCMD_READA) || (cmd == HCMD_WRITEA);

  always_ff @(posedge clk) begin
    if (rst) begin
      req_valid <= 1'b0;
      req       <= '0;
      cmdack    <= 1'b0;
    end else begin
      cmdack <= accept;
      if (accept) begin
        req_valid <= 1'b0;
      end else if (!req_valid && !cmdack && !accept && is_rw) begin
        req_valid  <= 1'b1;
        req.write  <= (cmd == HCMD_WRITEA);
        req.addr   <= host_addr_t'(addr);
      end
    end
  end

  // the FSM only accepts a pending request
  always_ff @(posedge clk) if (!rst) assert (!accept || req_valid);

endmodule
