// tb_addr_decoder: exhaustive test of the destination address decoder.
//
// Ports get the addresses 8'hF8 + k. Every one of the 256 DA values is
// applied; hit and port_idx are compared with the expected port worked
// out from the address arithmetic. A second pass uses scattered addresses
// with one duplicate to check that the lowest matching port wins.
module tb_addr_decoder;
  import router_pkg::*;
  localparam int N = 3;
  byte_t [N-1:0] port_addr;
  byte_t         da;
  logic          hit;
  logic [1:0]    port_idx;
  int checks = 0, failures = 0;

  addr_decoder dut (.da(da), .port_addr(port_addr), .hit(hit), .port_idx(port_idx));

  initial begin
    for (int k = 0; k < N; k++) port_addr[k] = byte_t'(8'hF8 + k);
    for (int v = 0; v < 256; v++) begin
      int exp_idx;
      da = byte_t'(v);
      #1;
      exp_idx = v - 'hF8;
      checks++;
      if (exp_idx >= 0 && exp_idx < N) begin
        if (!hit || port_idx != 2'(exp_idx)) begin
          failures++;
          $display("FAIL da=%02h hit=%0b idx=%0d expected port %0d", da, hit, port_idx, exp_idx);
        end
      end else if (hit) begin
        failures++;
        $display("FAIL da=%02h unexpected hit idx=%0d", da, port_idx);
      end
    end
    // scattered addresses, port 2 duplicates port 0
    port_addr[0] = 8'h11; port_addr[1] = 8'h80; port_addr[2] = 8'h11;
    da = 8'h80; #1; checks++;
    if (!hit || port_idx != 2'd1) begin failures++; $display("FAIL scattered 80"); end
    da = 8'h11; #1; checks++;
    if (!hit || port_idx != 2'd0) begin failures++; $display("FAIL duplicate 11"); end
    da = 8'hF8; #1; checks++;
    if (hit) begin failures++; $display("FAIL stale F8"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
