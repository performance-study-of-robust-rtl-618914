// write_demux: steers the input register's byte to one output FIFO.
//
// The controller names the destination port (sel) of the byte held in the
// input register. The demultiplexer forwards the write strobe, the commit
// and discard strobes and the byte itself to that port only; every other
// port sees no strobe and zero data. Combinational, no state. The
// demultiplexer between register and output block is in the source
// description; carrying commit/discard along with the write strobe is this
// design's choice (they implement store-and-forward in the FIFOs).
module write_demux #(
  parameter int unsigned N_PORTS = 3,
  parameter int unsigned WIDTH   = 8,
  localparam int unsigned IDX_W  = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic [IDX_W-1:0]               sel,
  input  logic                           wr,
  input  logic                           commit,
  input  logic                           discard,
  input  logic [WIDTH-1:0]               din,
  output logic [N_PORTS-1:0]             fifo_wr,
  output logic [N_PORTS-1:0]             fifo_commit,
  output logic [N_PORTS-1:0]             fifo_discard,
  output logic [N_PORTS-1:0][WIDTH-1:0]  fifo_din
);

  always_comb begin
    for (int unsigned k = 0; k < N_PORTS; k++) begin
      fifo_wr[k]     = wr     && (sel == IDX_W'(k));
      fifo_commit[k] = commit && (sel == IDX_W'(k));
      fifo_discard[k]  = discard  && (sel == IDX_W'(k));
      fifo_din[k]    = (sel == IDX_W'(k)) ? din : '0;
    end
  end

endmodule
