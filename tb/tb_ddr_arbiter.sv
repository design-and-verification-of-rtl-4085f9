// tb_ddr_arbiter: exhaustive check of the refresh-first arbiter.
//
// For every combination of host request, refresh request and refresh in
// progress: the refresh request is granted whenever present; the host is
// granted only when there is no refresh request and no refresh running.
module tb_ddr_arbiter;
  logic host_req, ref_req, refreshing, host_gnt, ref_gnt;
  int checks = 0, failures = 0;

  ddr_arbiter dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {host_req, ref_req, refreshing} = 3'(i);
      #1;
      checks++;
      if (ref_gnt !== ref_req) begin failures++; $display("FAIL ref_gnt for %b", 3'(i)); end
      checks++;
      if (host_gnt !== (host_req && !ref_req && !refreshing)) begin
        failures++; $display("FAIL host_gnt for %b", 3'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
