// router_top: one-input, N-output store-and-forward packet router.
//
// Packets arrive one byte per cycle on data_in while packet_valid is high:
// destination address (DA), length L, L data bytes (0..MAX_LEN), then a
// frame check byte equal to the XOR of all bytes before it. The router
// sends each packet, unchanged and complete, to the output port whose
// address equals DA (port k answers to ADDR_BASE + k).
//
// Datapath: data_in -> input register (data_register) -> write
// demultiplexer (write_demux) -> one output_fifo per port. The controller
// (router_fsm), helped by the address decoder (addr_decoder) that looks
// at data_in, decides which FIFO each byte goes to, checks the frame
// check byte and commits the packet in that FIFO, or discards it and
// pulses err. A packet is only offered on its port (valid_channel) once
// it has been received whole and found good.
//
// Timing: a byte taken at a rising edge is written into its FIFO at the
// next one; a packet's first byte appears on ch_out one cycle after the
// edge that took the frame check byte, if that port's FIFO was empty.
// suspend_data_in=1 tells the sender to hold the current byte (its FIFO
// is full). Each output is read first-word-fall-through: ch_out[k] is valid
// while valid_channel[k]=1, and re[k]=1 pops it. resetn is active low and
// asynchronous.
//
// The three blocks (input register, FSM controller, output block of
// FIFOs), three output ports, 8-bit addresses and fields, the signal names
// and the address of ports 0 and 1 follow the source description; FIFO
// depth, frame check kind and the handshakes are this design's choices.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned N_PORTS    = 3,
  parameter int unsigned MAX_LEN    = DEFAULT_MAX_LEN,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter byte_t       ADDR_BASE  = DEFAULT_ADDR_BASE,
  localparam int unsigned IDX_W     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic                      clk,
  input  logic                      resetn,
  // input port
  input  logic                      packet_valid,
  input  byte_t                     data_in,
  output logic                      suspend_data_in,
  output logic                      err,
  // output ports
  input  logic  [N_PORTS-1:0]       re,
  output logic  [N_PORTS-1:0]       valid_channel,
  output byte_t [N_PORTS-1:0]       ch_out
);

  logic rst;
  assign rst = !resetn;

  byte_t [N_PORTS-1:0] port_addr;
  always_comb begin
    for (int unsigned k = 0; k < N_PORTS; k++) port_addr[k] = ADDR_BASE + byte_t'(k);
  end

  logic               hit;
  logic [IDX_W-1:0]   hit_idx;
  logic [N_PORTS-1:0] fifo_full;
  logic               reg_en, wr, commit, discard;
  logic [IDX_W-1:0]   sel;
  byte_t              reg_q;

  logic  [N_PORTS-1:0] fifo_wr, fifo_commit, fifo_discard;
  byte_t [N_PORTS-1:0] fifo_din;

  addr_decoder #(.N_PORTS(N_PORTS)) u_dec (
    .da(data_in), .port_addr(port_addr), .hit(hit), .port_idx(hit_idx)
  );

  router_fsm #(.N_PORTS(N_PORTS), .MAX_LEN(MAX_LEN)) u_fsm (
    .clk(clk), .rst(rst),
    .packet_valid(packet_valid), .data_in(data_in),
    .suspend_data_in(suspend_data_in), .err(err),
    .hit(hit), .hit_idx(hit_idx),
    .fifo_full(fifo_full), .reg_en(reg_en), .sel(sel),
    .wr(wr), .commit(commit), .discard(discard)
  );

  data_register #(.WIDTH(BYTE_W)) u_reg (
    .clk(clk), .rst(rst), .en(reg_en), .d(data_in), .q(reg_q)
  );

  write_demux #(.N_PORTS(N_PORTS), .WIDTH(BYTE_W)) u_demux (
    .sel(sel), .wr(wr), .commit(commit), .discard(discard), .din(reg_q),
    .fifo_wr(fifo_wr), .fifo_commit(fifo_commit), .fifo_discard(fifo_discard),
    .fifo_din(fifo_din)
  );

  for (genvar k = 0; k < N_PORTS; k++) begin : g_port
    output_fifo #(.WIDTH(BYTE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst(rst),
      .wr(fifo_wr[k]), .commit(fifo_commit[k]), .discard(fifo_discard[k]),
      .din(fifo_din[k]), .full(fifo_full[k]),
      .re(re[k]), .valid_channel(valid_channel[k]), .ch_out(ch_out[k])
    );
  end

  initial begin
    assert (FIFO_DEPTH >= MAX_LEN + 3)
      else $error("router_top: FIFO_DEPTH must hold a whole packet of MAX_LEN data bytes");
  end

endmodule
