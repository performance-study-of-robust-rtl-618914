// router_fsm: the router controller.
//
// It follows each packet byte by byte (DA, length, data, frame check byte),
// using the length byte to find the end of the packet. A byte is taken in
// every cycle with packet_valid=1 and suspend_data_in=0; the taken byte is
// loaded into the input register (reg_en) and, one cycle later, written
// from there into the FIFO of the port chosen by the DA byte (wr, sel).
//
// On the DA byte the address decoder says which port matches (hit,
// hit_idx); a packet that matches no port is consumed and discarded. A
// length above MAX_LEN also discards the packet: its DA byte, already in
// the FIFO, is discarded, and err pulses. The controller XORs DA, length
// and data bytes; on the frame check byte it compares. A match commits the
// packet in the FIFO together with the write of the check byte; a mismatch
// discards it and err pulses for one cycle.
//
// suspend_data_in is high while the byte waiting in the input register
// cannot be written because its FIFO is full; the sender must then hold
// data_in. It is a combinational function of the FIFO full flags and the
// controller's registers, not of data_in. err is registered: it is high in
// the cycle after the offending byte was taken.
//
// The controller being an FSM that gives err and suspend_data_in, the
// packet layout and the 8-bit fields follow the source description. The
// states, the XOR check, the suspend rule and dropping bad packets are
// this design's choices.
module router_fsm
  import router_pkg::*;
#(
  parameter int unsigned N_PORTS = 3,
  parameter int unsigned MAX_LEN = DEFAULT_MAX_LEN,
  localparam int unsigned IDX_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // input port
  input  logic               packet_valid,
  input  byte_t              data_in,
  output logic               suspend_data_in,
  output logic               err,
  // address decoder (looks at data_in)
  input  logic               hit,
  input  logic [IDX_W-1:0]   hit_idx,
  // input register and write path
  input  logic [N_PORTS-1:0] fifo_full,
  output logic               reg_en,
  output logic [IDX_W-1:0]   sel,
  output logic               wr,
  output logic               commit,
  output logic               discard
);

  rx_state_t state;
  byte_t     fcs;        // running XOR of the packet so far
  byte_t     remain;     // data bytes still to come
  logic      drop;       // current packet is being discarded
  // what to do with the byte now in the input register
  logic      pend;       // it must be written (or discarded)
  logic      pend_last;  // it is the packet's last byte
  logic      pend_bad;   // ... and the packet is to be discarded

  logic take;            // a byte is taken from data_in this cycle
  logic blocked;         // the byte in the register cannot leave yet

  assign blocked         = pend && !(pend_last && pend_bad) && fifo_full[sel];
  assign suspend_data_in = blocked;
  assign take            = packet_valid && !blocked;
  assign reg_en          = take;

  assign wr     = pend && !(pend_last && pend_bad) && !fifo_full[sel];
  assign commit = wr && pend_last;
  assign discard  = pend && pend_last && pend_bad;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= ST_DA;
      fcs       <= '0;
      remain    <= '0;
      drop      <= 1'b0;
      sel       <= '0;
      pend      <= 1'b0;
      pend_last <= 1'b0;
      pend_bad  <= 1'b0;
      err       <= 1'b0;
    end else begin
      err <= 1'b0;
      // the byte in the register leaves unless it is blocked
      if (!blocked) begin
        pend      <= 1'b0;
        pend_last <= 1'b0;
        pend_bad  <= 1'b0;
      end
      if (take) begin
        unique case (state)
          ST_DA: begin
            fcs   <= data_in;
            drop  <= !hit;
            sel   <= hit ? hit_idx : sel;
            pend  <= hit;
            state <= ST_LEN;
          end
          ST_LEN: begin
            fcs    <= fcs ^ data_in;
            remain <= data_in;
            state  <= (data_in == '0) ? ST_FCS : ST_DATA;
            if (!drop && (32'(data_in) > MAX_LEN)) begin
              // too long: discard what is buffered and skip the rest
              drop      <= 1'b1;
              pend      <= 1'b1;
              pend_last <= 1'b1;
              pend_bad  <= 1'b1;
              err       <= 1'b1;
            end else begin
              pend <= !drop;
            end
          end
          ST_DATA: begin
            fcs    <= fcs ^ data_in;
            remain <= remain - 1'b1;
            pend   <= !drop;
            if (remain == 8'd1) state <= ST_FCS;
          end
          ST_FCS: begin
            pend      <= !drop;
            pend_last <= 1'b1;
            pend_bad  <= (fcs != data_in);
            err       <= !drop && (fcs != data_in);
            drop      <= 1'b0;
            state     <= ST_DA;
          end
          default: state <= ST_DA;
        endcase
      end
    end
  end

  // The register is only reloaded once its byte has left.
  a_no_overwrite: assert property (@(posedge clk) disable iff (rst)
    reg_en |-> !blocked);
  // While suspended, the sender must hold its byte.
  a_suspend_holds: assert property (@(posedge clk) disable iff (rst)
    suspend_data_in && packet_valid |=> packet_valid && $stable(data_in));

endmodule
