// router_env: traffic generator and checker for one router instance with
// N output ports, used by tb_router_wide to run wider configurations.
//
// It instantiates router_top with N_PORTS=N and runs the same sequence as
// tb_router_top: the two-packet routing example (DA 8'hF9 to port 1,
// DA 8'hF8 to port 0), then N_PKTS random packets of every kind with slow
// and fast readers per port. Checks: bytes out of each port equal the good
// packets sent to it, in order; no byte of an unfinished packet is offered;
// a completed packet is offered within one cycle; err pulses exactly for
// bad-check and over-long packets, one cycle after the deciding byte; every
// mechanism (suspend, drops, zero and maximum length, a nearly full FIFO,
// simultaneous reads, every port) happened. done rises when it has finished;
// checks and failures are its counts.
module router_env #(
  parameter int N = 4,
  parameter int N_PKTS = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import router_pkg::*;
  import router_tb_pkg::*;
  localparam int MAXL = 62;
  localparam byte unsigned BASE = 8'hF8;

  logic clk = 1'b0, resetn;
  logic packet_valid;
  byte_t data_in;
  logic suspend_data_in, err;
  logic [N-1:0] re, valid_channel;
  byte_t [N-1:0] ch_out;

  router_top #(.N_PORTS(N)) dut (
    .clk(clk), .resetn(resetn), .packet_valid(packet_valid), .data_in(data_in),
    .suspend_data_in(suspend_data_in), .err(err),
    .re(re), .valid_channel(valid_channel), .ch_out(ch_out));

  always #5 clk = ~clk;

  initial begin checks = 0; failures = 0; done = 1'b0; end
  int cycle = 0;
  byte unsigned expected[N][$];   // bytes of good packets sent to each port
  int avail[N];                   // bytes of completed good packets per port
  int avail_prev[N];
  int popped[N];
  int err_due[$];
  int n_err = 0, exp_err = 0;
  // mechanism counters
  int n_suspend = 0, n_bad_fcs = 0, n_too_long = 0, n_no_port = 0;
  int n_zero = 0, n_max = 0, n_full = 0, n_multi_read = 0;
  int n_port_pkts[N];
  logic took;
  logic [N-1:0] fast;             // reader phase per port
  logic directed_done = 1'b0;

  // output side: random reads, checked against the model
  always @(posedge clk) begin
    cycle <= cycle + 1;
    took <= packet_valid && !suspend_data_in;
    if (resetn) begin
      if (suspend_data_in && packet_valid) n_suspend++;
      if ($countones(re & valid_channel) > 1) n_multi_read++;
      for (int k = 0; k < N; k++) begin
        // the FIFO is close to full: less than one maximum packet of room
        if (avail[k] - popped[k] > 128 - (MAXL + 3)) n_full++;
        // safety: only bytes of completed packets are offered
        checks++;
        if (valid_channel[k] && popped[k] >= avail[k]) begin
          failures++;
          $display("FAIL cycle %0d port %0d offers a byte of an unfinished packet", cycle, k);
        end
        // latency: a packet completed a cycle ago must be on offer
        checks++;
        if (!valid_channel[k] && popped[k] < avail_prev[k]) begin
          failures++;
          $display("FAIL cycle %0d port %0d holds back a completed packet", cycle, k);
        end
        if (re[k] && valid_channel[k]) begin
          checks++;
          if (expected[k].size() == 0 || ch_out[k] !== expected[k][0]) begin
            failures++;
            $display("FAIL cycle %0d port %0d read %02h expected %02h", cycle, k, ch_out[k],
                     (expected[k].size() > 0) ? expected[k][0] : 8'h00);
          end
          if (expected[k].size() > 0) void'(expected[k].pop_front());
          popped[k]++;
        end
      end
      avail_prev <= avail;
      if (err) begin
        n_err++;
        checks++;
        if (err_due.size() == 0 || err_due[0] != cycle) begin
          failures++;
          $display("FAIL unexpected err at cycle %0d", cycle);
        end else void'(err_due.pop_front());
      end
    end
  end

  // reader phases: each port switches between slow and fast readers
  always @(negedge clk) begin
    if (cycle % 700 == 0) fast <= N'($urandom);
    if (directed_done) begin
      for (int k = 0; k < N; k++)
        re[k] = fast[k] ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 40) == 0);
    end
  end

  task automatic send(pkt_t p, int port, pkt_kind_e kind);
    foreach (p[i]) begin
      while ($urandom_range(0, 6) == 0) begin
        @(negedge clk) packet_valid = 1'b0;
      end
      @(negedge clk);
      packet_valid = 1'b1;
      data_in = p[i];
      do @(negedge clk); while (!took);
      packet_valid = 1'b0;
      if ((kind == PK_BAD_FCS && i == p.size() - 1) || (kind == PK_TOO_LONG && i == 1))
        err_due.push_back(cycle);
      if (kind == PK_GOOD && i == p.size() - 1) avail[port] += p.size();
    end
  endtask

  task automatic send_kind(pkt_kind_e kind, int port, int len);
    pkt_t p;
    p = make_packet(kind, port, len, BASE, N);
    case (kind)
      PK_GOOD: begin
        foreach (p[i]) expected[port].push_back(p[i]);
        n_port_pkts[port]++;
        if (len == 0) n_zero++;
        if (len == MAXL) n_max++;
      end
      PK_BAD_FCS:  begin exp_err++; n_bad_fcs++; end
      PK_TOO_LONG: begin exp_err++; n_too_long++; end
      PK_NO_PORT:  n_no_port++;
    endcase
    send(p, port, kind);
  endtask

  task automatic expect_only(int port, int nbytes, string what);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (valid_channel[k] !== (k == port)) begin
        failures++;
        $display("FAIL %s: valid_channel=%b", what, valid_channel);
      end
    end
    checks++;
    if (avail[port] - popped[port] != nbytes) begin
      failures++;
      $display("FAIL %s: %0d bytes waiting", what, avail[port] - popped[port]);
    end
  endtask

  initial begin
    resetn = 1'b0; packet_valid = 1'b0; data_in = '0; re = '0; fast = '0;
    for (int k = 0; k < N; k++) begin
      avail[k] = 0; avail_prev[k] = 0; popped[k] = 0; n_port_pkts[k] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) resetn = 1'b1;

    // reference example: DA 11111001 -> second channel, DA 11111000 -> first
    send_kind(PK_GOOD, 1, 7);
    repeat (3) @(negedge clk);
    expect_only(1, 10, "DA F9");
    while (valid_channel[1]) begin
      @(negedge clk) re[1] = 1'b1;
      @(negedge clk) re[1] = 1'b0;
    end
    send_kind(PK_GOOD, 0, 7);
    repeat (3) @(negedge clk);
    expect_only(0, 10, "DA F8");
    directed_done = 1'b1;

    for (int n = 0; n < N_PKTS; n++) begin
      int r, port, len;
      pkt_kind_e kind;
      r = $urandom_range(0, 19);
      kind = (r < 14) ? PK_GOOD : (r < 16) ? PK_BAD_FCS : (r < 18) ? PK_NO_PORT : PK_TOO_LONG;
      port = $urandom_range(0, N - 1);
      len = (kind == PK_TOO_LONG) ? $urandom_range(MAXL + 1, 255)
          : (n % 16 == 0) ? 0 : (n % 16 == 1) ? MAXL : $urandom_range(0, MAXL);
      send_kind(kind, port, len);
    end
    // drain
    fast = '1;
    for (int w = 0; w < 20000; w++) begin
      int left;
      left = 0;
      for (int k = 0; k < N; k++) left += expected[k].size();
      if (left == 0) break;
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (expected[k].size() != 0 || valid_channel[k]) begin
        failures++;
        $display("FAIL port %0d: %0d expected bytes never came out", k, expected[k].size());
      end
    end
    checks++;
    if (n_err != exp_err || err_due.size() != 0) begin
      failures++;
      $display("FAIL err pulses %0d, expected %0d", n_err, exp_err);
    end
    // every mechanism must have happened
    begin
      int counts[string];
      counts["suspend"] = n_suspend;   counts["bad_check"] = n_bad_fcs;
      counts["too_long"] = n_too_long; counts["no_port"] = n_no_port;
      counts["zero_len"] = n_zero;     counts["max_len"] = n_max;
      counts["fifo_high"] = n_full;    counts["multi_read"] = n_multi_read;
      for (int k = 0; k < N; k++) counts[$sformatf("port%0d", k)] = n_port_pkts[k];
      foreach (counts[s]) begin
        checks++;
        $display("N=%0d mechanism %-10s %0d", N, s, counts[s]);
        if (counts[s] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", s);
        end
      end
    end
    done = 1'b1;
  end
endmodule
