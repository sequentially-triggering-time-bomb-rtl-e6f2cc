// ht_trigger: trigger of the sequential "time-bomb" hardware Trojan.
//
// A free-running K-bit synchronous up counter advances on every rising clock
// edge; an AND gate over all of its bits raises trig while the count is all
// ones (255 for K = 8). trig is therefore high for one clock in every 2**K,
// first during the 2**K-1-th cycle after the counter is cleared. The counter,
// its width of 8 and the AND over all bits follow the paper. The clear
// input (a counter part such as the 74HC590 the paper names has one) is
// this design's choice, so that the trigger moment is known after reset.
//
// Timing: trig is a combinational function of the counter register, valid for
// the whole clock cycle in which the count is all ones.
module ht_trigger #(
  parameter int unsigned K = usq_pkg::HT_CNT_W
) (
  input  logic         clk,
  input  logic rst_n,  // asynchronous clear, active low
  output logic trig    // 1 while the count is all ones
);

  logic [K-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + K'(1);
  end

  assign trig = &count;

endmodule
