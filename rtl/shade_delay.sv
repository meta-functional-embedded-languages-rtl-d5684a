// shade_delay: the delay gate of the Shade primitive set.
//
// The output stream equals the input stream one clock cycle later. Its value
// in the first cycle is the parameter INIT (the document's boolean parameter
// of `delay`). The document has no reset; here the asynchronous active-low
// rst_n loads INIT, which stands for "the first cycle" of the stream.
//
// Ports: d in, q out. Timing: q(t) = d(t-1), q = INIT after reset.
module shade_delay #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= INIT;
    else        q <= d;
  end
endmodule
