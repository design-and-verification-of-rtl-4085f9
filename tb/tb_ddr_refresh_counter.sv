// tb_ddr_refresh_counter: checks the power-up delay and refresh requests.
//
// With T_200US = 37 and T_REFI = 23: sys_dly_200us must rise exactly at the
// 37th rising edge after reset and stay high; ref_req must stay low until
// init_done, then rise every 23 cycles; an acknowledge clears it in the next
// cycle, and without an acknowledge it stays high.
module tb_ddr_refresh_counter;
  localparam int TD = 37, TR = 23;
  logic clk = 0, rst = 1, init_done = 0, ref_ack = 0;
  logic sys_dly_200us, ref_req;
  int checks = 0, failures = 0;

  ddr_refresh_counter #(.T_200US(TD), .T_REFI(TR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int first;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int e = 1; e <= TD + 5; e++) begin
      @(negedge clk);
      chk(sys_dly_200us == (e >= TD), $sformatf("sys_dly_200us after %0d edges", e));
      chk(!ref_req, "no refresh before init done");
    end
    init_done = 1;
    // first interval: request after TR edges
    for (int e = 1; e <= TR; e++) begin
      @(negedge clk);
      chk(ref_req == (e >= TR), $sformatf("ref_req after %0d edges", e));
    end
    // acknowledge after 3 cycles
    repeat (3) @(negedge clk);
    chk(ref_req, "request held until acknowledged");
    ref_ack = 1;
    @(negedge clk) ref_ack = 0;
    chk(!ref_req, "request cleared by acknowledge");
    // next request comes TR cycles after the previous one
    first = 4;   // edges since previous request
    while (!ref_req) begin @(negedge clk); first++; end
    chk(first == TR, $sformatf("refresh period %0d", first));
    // several intervals without acknowledge: stays high
    repeat (3 * TR) @(negedge clk);
    chk(ref_req, "request stays high without acknowledge");
    chk(sys_dly_200us, "sys_dly_200us stays high");
    // reset clears everything
    rst = 1;
    @(negedge clk);
    chk(!ref_req && !sys_dly_200us, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
