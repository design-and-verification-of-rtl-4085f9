// tb_ddr_control_if: checks command decoding and the CMDACK handshake.
//
// NOP and undefined codes never raise a request. READA/WRITEA raise
// req_valid one cycle later with the decoded kind and address; the request
// stays until accept; CMDACK follows accept by one cycle for one cycle; a
// command still held during CMDACK is not taken twice; a new command after
// CMDACK is taken.
module tb_ddr_control_if;
  import ddr_pkg::*;
  logic clk = 0, rst = 1, accept = 0;
  logic [2:0] cmd = 3'b000;
  logic [ASIZE-1:0] addr = '0;
  logic cmdack, req_valid;
  host_req_t req;
  int checks = 0, failures = 0;

  ddr_control_if dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic one(logic [2:0] c, logic [21:0] a, int wait_cyc);
    @(negedge clk) cmd = c; addr = a;
    @(negedge clk);
    chk(req_valid, "request raised");
    chk(req.write == (c == 3'b010), "decoded kind");
    chk(22'(req.addr) == a, "decoded address");
    repeat (wait_cyc) begin
      @(negedge clk);
      chk(req_valid && !cmdack, "request held until accepted");
    end
    accept = 1;
    @(negedge clk) accept = 0;
    chk(cmdack, "CMDACK after accept");
    chk(!req_valid, "request dropped on accept");
    cmd = 3'b000;
    @(negedge clk);
    chk(!cmdack, "CMDACK lasts one cycle");
    chk(!req_valid, "held command not taken twice");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < 8; c++) if (c != 1 && c != 2) begin
      cmd = 3'(c);
      @(negedge clk);
      chk(!req_valid && !cmdack, $sformatf("code %0d ignored", c));
    end
    one(3'b001, 22'h2abcde, 0);
    one(3'b010, 22'h012345, 3);
    one(3'b001, 22'h3fffff, 7);
    // back-to-back: next command presented in the CMDACK cycle
    @(negedge clk) cmd = 3'b010; addr = 22'h111111;
    @(negedge clk) accept = 1;
    @(negedge clk) accept = 0; cmd = 3'b001; addr = 22'h222222;
    chk(cmdack, "CMDACK");
    @(negedge clk);
    chk(!req_valid, "command seen during CMDACK waits a cycle");
    @(negedge clk);
    chk(req_valid && !req.write && 22'(req.addr) == 22'h222222, "next command taken after CMDACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
