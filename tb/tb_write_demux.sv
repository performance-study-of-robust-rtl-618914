// tb_write_demux: random test of the write demultiplexer.
//
// For random select, strobes and data, every port's outputs are compared
// with the expected values: the strobes and data reach the selected port
// only, and the other ports see no strobe and zero data.
module tb_write_demux;
  localparam int N = 3;
  logic [1:0] sel;
  logic wr, commit, discard;
  logic [7:0] din;
  logic [N-1:0] fifo_wr, fifo_commit, fifo_discard;
  logic [N-1:0][7:0] fifo_din;
  int checks = 0, failures = 0;

  write_demux dut (
    .sel(sel), .wr(wr), .commit(commit), .discard(discard), .din(din),
    .fifo_wr(fifo_wr), .fifo_commit(fifo_commit), .fifo_discard(fifo_discard),
    .fifo_din(fifo_din));

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = 2'($urandom_range(0, N - 1));
      wr = 1'($urandom); commit = 1'($urandom); discard = 1'($urandom);
      din = 8'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        logic me;
        me = (int'(sel) == k);
        checks++;
        if (fifo_wr[k] !== (me & wr) || fifo_commit[k] !== (me & commit) ||
            fifo_discard[k] !== (me & discard) || fifo_din[k] !== (me ? din : 8'h00)) begin
          failures++;
          $display("FAIL sel=%0d port %0d: wr=%0b commit=%0b discard=%0b din=%02h", sel, k,
                   fifo_wr[k], fifo_commit[k], fifo_discard[k], fifo_din[k]);
        end
      end
    end
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
