// data_register: the router's input register.
//
// A WIDTH-bit register with a rising-edge clock, an active-high clock
// enable and an active-high asynchronous reset. On a rising edge with
// en=1 and rst=0 it takes d; with en=0 it keeps its value; rst=1 clears it
// to zero at once. Its output q feeds the write demultiplexer, so every
// packet byte spends exactly one cycle here before it is written into an
// output FIFO. All of this behaviour follows the source description.
module data_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
