// pipo_reg: parallel-in parallel-out register, the MAC's accumulator.
//
// All W bits load at once on the rising clock edge when en is high; clr
// (synchronous, takes priority over en) loads zero; rst_n is an asynchronous
// active-low reset to zero. q is always visible in parallel. The document
// gives a plain PIPO register; the clear, enable and reset controls are this
// design's choices.
module pipo_reg #(
  parameter int unsigned W = 65
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end
endmodule
