// base_sync: the base synchroniser, two flip-flops in series per bit, for
// level signals entering the clk domain. Output lags the input by two
// cycles. Reset clears both stages.
module base_sync #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);
  logic [W-1:0] s1;
  always_ff @(posedge clk) begin
    if (rst) begin s1 <= '0; q_o <= '0; end
    else begin s1 <= d_i; q_o <= s1; end
  end
endmodule
