// output_fifo: store-and-forward packet buffer of one output port.
//
// The output block holds one of these per port. Bytes are written at the
// write pointer, but the reader only sees bytes up to the commit pointer:
// a packet becomes visible when its last byte is written with commit=1,
// never while it is still arriving (store and forward). discard=1 throws
// away everything written since the last commit, which is how a packet
// that failed its frame check is dropped; a write in the same cycle as
// discard is ignored.
//
// Read side is first-word-fall-through: valid_channel=1 means ch_out holds
// the oldest committed byte; re=1 in that cycle pops it. re while
// valid_channel=0 does nothing. full=1 means no byte can be written this
// cycle. Asynchronous active-high reset empties the buffer.
//
// The FIFO per port and store-and-forward operation follow the source
// description; depth, commit/discard and the read handshake are this
// design's choices. DEPTH must be a power of two; 128 holds two packets of
// the largest size (65 bytes each).
module output_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // write side (from the demultiplexer)
  input  logic             wr,
  input  logic             commit,
  input  logic             discard,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  // read side (output channel)
  input  logic             re,
  output logic             valid_channel,
  output logic [WIDTH-1:0] ch_out
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr, cm_ptr, rd_ptr;   // one extra bit tells full from empty
  logic        do_wr, do_rd;

  assign full          = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign valid_channel = (cm_ptr != rd_ptr);
  assign ch_out        = mem[rd_ptr[AW-1:0]];
  assign do_wr         = wr && !discard && !full;
  assign do_rd         = re && valid_channel;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      cm_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (discard) begin
        wr_ptr <= cm_ptr;
      end else if (do_wr) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (commit) cm_ptr <= wr_ptr + 1'b1;
      end
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // A write into a full buffer would lose a byte: the controller must
  // hold the byte (suspend its sender) instead.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst)
    wr && !discard |-> !full);
  // commit only ever comes with the packet's last byte.
  a_commit_with_write: assert property (@(posedge clk) disable iff (rst)
    commit |-> wr);

  initial begin
    assert ((1 << AW) == DEPTH) else $error("output_fifo: DEPTH must be a power of two");
  end

endmodule
