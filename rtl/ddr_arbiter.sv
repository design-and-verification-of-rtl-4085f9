// ddr_arbiter: fixed-priority arbiter between host commands and refresh.
//
// Two requesters: the command interface (host_req) and the refresh counter
// (ref_req). A refresh request always wins. While a refresh is in progress
// (refreshing, from the command FSM) the host is not granted, so it sees no
// CMDACK until the refresh is finished. The grants are combinational; the
// command FSM only acts on them at its decision points (idle, or the last
// cycle of a read or write burst), which is what makes a refresh wait for a
// host operation that is already running. Priority and hold-off follow the
// design description; the combinational form is this design's choice.
module ddr_arbiter (
  input  logic host_req,
  input  logic ref_req,
  input  logic refreshing,
  output logic host_gnt,
  output logic ref_gnt
);

  always_comb begin
    ref_gnt  = ref_req;
    host_gnt = host_req && !ref_req && !refreshing;
  end

  // at most one requester is granted
  always_comb assert (!(host_gnt && ref_gnt));

endmodule
