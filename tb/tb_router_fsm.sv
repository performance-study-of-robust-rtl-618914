// tb_router_fsm: test of the router controller on its own.
//
// The testbench plays the parts around the controller: the address
// decoder (port k owns 8'hF8 + k), the input register (a copy loaded on
// reg_en) and the output FIFOs (reference queues that honour wr, commit and
// discard). Their full flags are random, so the controller must suspend
// its sender often. Random packets of every kind are sent, with idle
// cycles between bytes. At the end each port's committed bytes must equal
// the good packets sent to it, in order; err must have pulsed exactly once
// per bad-check or over-long packet, in the cycle after that packet's
// deciding byte was taken; no write may hit a full FIFO.
module tb_router_fsm;
  import router_pkg::*;
  import router_tb_pkg::*;
  localparam int N = 3;
  localparam int MAXL = 62;
  localparam byte unsigned BASE = 8'hF8;

  logic clk = 1'b0, rst;
  logic packet_valid;
  byte_t data_in;
  logic suspend_data_in, err, hit, reg_en, wr, commit, discard;
  logic [1:0] hit_idx, sel;
  logic [N-1:0] fifo_full;
  int checks = 0, failures = 0;
  int n_suspend = 0, n_err = 0, exp_err = 0;
  int err_due[$];       // cycles at which err is expected
  int cycle = 0;

  router_fsm dut (
    .clk(clk), .rst(rst), .packet_valid(packet_valid), .data_in(data_in),
    .suspend_data_in(suspend_data_in), .err(err), .hit(hit), .hit_idx(hit_idx),
    .fifo_full(fifo_full), .reg_en(reg_en), .sel(sel), .wr(wr), .commit(commit),
    .discard(discard));

  always #5 clk = ~clk;

  // decoder model
  always_comb begin
    hit = (data_in >= BASE) && (int'(data_in) < int'(BASE) + N);
    hit_idx = hit ? 2'(data_in - BASE) : 2'd0;
  end

  // register and FIFO models
  byte_t reg_q;
  byte unsigned building[N][$];
  byte unsigned committed[N][$];
  byte unsigned expected[N][$];
  logic took;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    took <= packet_valid && !suspend_data_in && !rst;
    if (!rst) begin
      if (wr) begin
        if (fifo_full[sel]) begin
          failures++;
          $display("FAIL write into full FIFO %0d", sel);
        end
        building[sel].push_back(reg_q);
        if (commit) begin
          foreach (building[sel][i]) committed[sel].push_back(building[sel][i]);
          building[sel].delete();
        end
      end
      if (discard) building[sel].delete();
      if (suspend_data_in && packet_valid) n_suspend++;
      if (err) begin
        n_err++;
        checks++;
        if (err_due.size() == 0 || err_due[0] != cycle) begin
          failures++;
          $display("FAIL unexpected err at cycle %0d", cycle);
        end else void'(err_due.pop_front());
      end
      if (reg_en) reg_q <= data_in;
      fifo_full <= N'($urandom) & N'($urandom);
    end
  end

  task automatic send(pkt_t p, logic err_on_last, int err_at);
    foreach (p[i]) begin
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk) packet_valid = 1'b0;
      end
      @(negedge clk);
      packet_valid = 1'b1;
      data_in = p[i];
      do @(negedge clk); while (!took);
      if (i == err_at) err_due.push_back(cycle);
      packet_valid = 1'b0;
    end
  endtask

  initial begin
    rst = 1'b1; packet_valid = 1'b0; data_in = '0; fifo_full = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      pkt_kind_e kind;
      int port, len, r;
      pkt_t p;
      r = $urandom_range(0, 9);
      kind = (r < 6) ? PK_GOOD : (r == 6) ? PK_BAD_FCS : (r == 7) ? PK_NO_PORT : PK_TOO_LONG;
      port = $urandom_range(0, N - 1);
      len = (kind == PK_TOO_LONG) ? $urandom_range(MAXL + 1, 255)
          : (n % 10 == 0) ? 0 : (n % 10 == 1) ? MAXL : $urandom_range(0, MAXL);
      p = make_packet(kind, port, len, BASE, N);
      if (kind == PK_GOOD) foreach (p[i]) expected[port].push_back(p[i]);
      if (kind == PK_BAD_FCS || kind == PK_TOO_LONG) exp_err++;
      send(p, 0, (kind == PK_BAD_FCS) ? p.size() - 1 : (kind == PK_TOO_LONG) ? 1 : -1);
    end
    repeat (5) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (committed[k] != expected[k] || building[k].size() != 0) begin
        failures++;
        $display("FAIL port %0d: %0d bytes committed, %0d expected, %0d left unfinished",
                 k, committed[k].size(), expected[k].size(), building[k].size());
      end
    end
    checks++;
    if (n_err != exp_err || err_due.size() != 0) begin
      failures++;
      $display("FAIL err pulses %0d, expected %0d", n_err, exp_err);
    end
    checks++;
    if (n_suspend == 0) begin
      failures++;
      $display("FAIL suspend_data_in never raised");
    end
    $display("suspends=%0d errs=%0d", n_suspend, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
