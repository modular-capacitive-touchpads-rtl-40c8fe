// synchronize: NSYNC-flop synchronizer for a single-bit signal entering the
// clock domain of clk. The output follows the input NSYNC clocks later.
// NSYNC must be at least 2. Resets to 0.
module synchronize #(
  parameter int unsigned NSYNC = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic in,
  output logic out
);

  logic [NSYNC-1:0] chain;

  always_ff @(posedge clk) begin
    if (reset) chain <= '0;
    else       chain <= {chain[NSYNC-2:0], in};
  end

  assign out = chain[NSYNC-1];

endmodule
