// tb_data_register: self-checking test of the input register.
//
// Drives random enable, data and reset values and compares q after every
// rising edge with a reference value kept by the testbench: load when
// en=1, hold when en=0, zero during reset. Also checks that the reset
// clears q at once, between clock edges (asynchronous).
module tb_data_register;
  logic clk = 1'b0;
  logic rst, en;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  data_register dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%02h expected %02h", what, q, exp);
    end
  endtask

  initial begin
    rst = 1'b0; en = 1'b0; d = 8'h00; model = 8'h00;
    #1 rst = 1'b1;
    #1 check(8'h00, "reset");
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = 8'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      check(model, "clocked");
      // occasional asynchronous reset pulse away from the clock edge
      if (i % 97 == 50) begin
        #2 rst = 1'b1;
        #1 check(8'h00, "async reset");
        model = 8'h00;
        #1 rst = 1'b0;
      end
    end
    // hold with en=0 over many edges
    @(negedge clk) en = 1'b1; d = 8'hA5;
    @(negedge clk) en = 1'b0; d = 8'h3C;
    repeat (5) @(negedge clk);
    check(8'hA5, "hold");
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
