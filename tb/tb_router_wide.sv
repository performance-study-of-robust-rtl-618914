// tb_router_wide: end-to-end runs of the router with more output ports.
//
// Two router instances run side by side, each with its own traffic and
// checker (router_env): one with four output ports, the channel count of
// the reference waveform, and one with five, the port count named in the
// closing remarks. Port k answers to DA 8'hF8 + k in both. The test ends
// when both checkers are done and reports their combined counts.
module tb_router_wide;
  logic done4, done5;
  int checks4, failures4, checks5, failures5;
  int checks, failures;

  router_env #(.N(4), .N_PKTS(1000)) u_env4 (.done(done4), .checks(checks4), .failures(failures4));
  router_env #(.N(5), .N_PKTS(1000)) u_env5 (.done(done5), .checks(checks5), .failures(failures5));

  initial begin
    wait (done4 && done5);
    checks = checks4 + checks5;
    failures = failures4 + failures5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    checks = checks4 + checks5;
    failures = failures4 + failures5 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
