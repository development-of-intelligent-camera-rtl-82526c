// narrow_en_sync: carries an enable pulse of any width from a foreign clock
// domain into the clk domain as a one-cycle pulse.
//
// A "stretcher" flip-flop is clocked by the incoming enable itself with its
// D input tied high, so even a pulse much shorter than a clk period sets it.
// Two synchroniser flip-flops bring the stretched level into the clk domain;
// the second one clears the stretcher asynchronously, so the chain then
// empties by itself. An edge detector behind the chain gives exactly one
// clk-cycle pulse per rising edge of en_i. This is the structure of the
// narrow enable synchroniser of the EDICAM timing unit.
//
// Timing: en_s_o rises 2 to 3 clk cycles after the rising edge of en_i.
// Rising edges of en_i must be at least about 4 clk periods apart, and en_i
// must be glitch free, because every rising transient is caught. rst clears
// the whole chain asynchronously. The stretcher flip-flop is clocked by a
// data signal on purpose; that is what lets it catch narrow pulses.
module narrow_en_sync (
  input  logic clk,
  input  logic rst,
  input  logic en_i,
  output logic en_s_o
);
  logic stretch;
  logic sync1, sync2, sync3;
  logic stretch_clr;

  assign stretch_clr = sync2 | rst;

  always_ff @(posedge en_i or posedge stretch_clr) begin
    if (stretch_clr) stretch <= 1'b0;
    else             stretch <= 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync1 <= 1'b0; sync2 <= 1'b0; sync3 <= 1'b0;
    end else begin
      sync1 <= stretch;
      sync2 <= sync1;
      sync3 <= sync2;
    end
  end

  assign en_s_o = sync2 & ~sync3;
endmodule
