// addr_decoder: destination address decoding.
//
// Every output port owns a unique 8-bit address. The decoder compares the
// packet's destination address byte with each port address and reports
// whether any port matched (hit) and the index of the matching port. It is purely combinational. The per-port equality
// compare follows the source's "simple decoding logic"; the addresses are
// an input so that the instantiating module chooses them. If two ports
// were given the same address the lowest index wins.
module addr_decoder #(
  parameter int unsigned N_PORTS = 3,
  localparam int unsigned IDX_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  router_pkg::byte_t               da,
  input  router_pkg::byte_t [N_PORTS-1:0] port_addr,
  output logic                            hit,
  output logic [IDX_W-1:0]                port_idx
);

  logic [N_PORTS-1:0] match;

  always_comb begin
    match    = '0;
    hit      = 1'b0;
    port_idx = '0;
    for (int unsigned k = 0; k < N_PORTS; k++) begin
      match[k] = (da == port_addr[k]);
    end
    for (int k = N_PORTS - 1; k >= 0; k--) begin
      if (match[k]) begin
        hit      = 1'b1;
        port_idx = IDX_W'(k);
      end
    end
  end

endmodule
