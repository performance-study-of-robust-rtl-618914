// tb_output_fifo: random test of the store-and-forward output buffer.
//
// Writes packets of random length (1 to 65 bytes); the last byte of each
// either commits the packet or is replaced by a discard. Reads pop at
// random. A reference model keeps the committed bytes and the bytes of the
// packet being written. Every cycle valid_channel must equal "committed
// bytes waiting", full must equal "model holds DEPTH bytes", and every
// popped byte must equal the model's oldest committed byte. Counts that
// the buffer filled, that packets were discarded and that a packet was
// written while another was being read.
module tb_output_fifo;
  localparam int DEPTH = 128;
  logic clk = 1'b0, rst;
  logic wr, commit, discard, re, full, valid_channel;
  logic [7:0] din, ch_out;
  int checks = 0, failures = 0;
  int n_full = 0, n_discard = 0, n_commit = 0, n_overlap = 0;

  byte unsigned committed[$];
  byte unsigned building[$];

  output_fifo dut (
    .clk(clk), .rst(rst), .wr(wr), .commit(commit), .discard(discard), .din(din),
    .full(full), .re(re), .valid_channel(valid_channel), .ch_out(ch_out));

  always #5 clk = ~clk;

  int pkt_len = 0, pkt_pos = 0;
  logic pkt_bad;

  initial begin
    rst = 1'b1; wr = 0; commit = 0; discard = 0; re = 0; din = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // compare status with the model
      checks++;
      if (valid_channel !== (committed.size() > 0) ||
          full !== ((committed.size() + building.size()) == DEPTH)) begin
        failures++;
        $display("FAIL cyc %0d: valid=%0b full=%0b model committed=%0d building=%0d",
                 cyc, valid_channel, full, committed.size(), building.size());
      end
      if (valid_channel) begin
        checks++;
        if (ch_out !== committed[0]) begin
          failures++;
          $display("FAIL cyc %0d: ch_out=%02h expected %02h", cyc, ch_out, committed[0]);
        end
      end
      if (full) n_full++;
      // next write
      if (pkt_pos == pkt_len) begin
        pkt_len = $urandom_range(1, 65);
        pkt_pos = 0;
        pkt_bad = ($urandom_range(0, 3) == 0);
      end
      wr = 0; commit = 0; discard = 0;
      if ($urandom_range(0, 3) != 0) begin
        if (pkt_pos == pkt_len - 1 && pkt_bad) begin
          discard = 1'b1;
        end else if (!full) begin
          wr = 1'b1;
          din = 8'($urandom);
          commit = (pkt_pos == pkt_len - 1);
        end
      end
      // the reader slows down now and then so that the buffer fills
      re = ((cyc / 3000) % 2 == 0) ? ($urandom_range(0, 9) == 0) : 1'($urandom);
      if (re && valid_channel && building.size() > 0) n_overlap++;
      @(posedge clk); #1;
      // update the model with what the buffer was asked to do
      if (re && committed.size() > 0) void'(committed.pop_front());
      if (discard) begin
        building.delete();
        pkt_pos++;
        n_discard++;
      end else if (wr) begin
        building.push_back(din);
        pkt_pos++;
        if (commit) begin
          foreach (building[i]) committed.push_back(building[i]);
          building.delete();
          n_commit++;
        end
      end
    end
    checks++;
    if (n_full == 0 || n_discard == 0 || n_commit == 0 || n_overlap == 0) begin
      failures++;
      $display("FAIL coverage: full=%0d discard=%0d commit=%0d overlap=%0d",
               n_full, n_discard, n_commit, n_overlap);
    end
    $display("coverage: full=%0d discard=%0d commit=%0d overlap=%0d", n_full, n_discard, n_commit, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
