// router_tb_pkg: packet generation shared by the router testbenches.
//
// A packet is a queue of bytes: DA, length L, L data bytes, check byte.
// The check byte is the XOR of every byte before it; a packet of kind
// PK_BAD_FCS gets a wrong check byte, PK_NO_PORT an address no port owns,
// PK_TOO_LONG a length above the router's limit.
package router_tb_pkg;

  typedef byte unsigned pkt_t[$];

  typedef enum int {PK_GOOD, PK_BAD_FCS, PK_NO_PORT, PK_TOO_LONG} pkt_kind_e;

  function automatic pkt_t make_packet(pkt_kind_e kind, int port, int len,
                                       byte unsigned addr_base, int n_ports);
    pkt_t p;
    byte unsigned x;
    byte unsigned da;
    da = (kind == PK_NO_PORT) ? byte'(int'(addr_base) + n_ports + int'($urandom_range(0, 20)))
                              : byte'(int'(addr_base) + port);
    p.push_back(da);
    p.push_back(byte'(len));
    for (int i = 0; i < len; i++) p.push_back(byte'($urandom));
    x = 0;
    foreach (p[i]) x ^= p[i];
    if (kind == PK_BAD_FCS) x ^= byte'(1 << $urandom_range(0, 7));
    p.push_back(x);
    return p;
  endfunction

endpackage
