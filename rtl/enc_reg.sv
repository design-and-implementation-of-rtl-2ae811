// enc_reg: register holding the previously encoded bus word.
//
// On every rising clk edge y takes x when en is 1 and rst is 0; otherwise y is cleared to 0.
// This is the published register structure: an AND of en with inverted rst selects between
// the input word and zero in front of a plain D flip-flop bank, so reset is synchronous and
// active high, and a cycle with en low also clears the stored word (the encoder then
// compares the next word with an all-zero bus). Width is a parameter, four by default.
//
// Ports: clk, rst (sync, active high), en, x [WIDTH] in, y [WIDTH] out (one cycle later).
module enc_reg #(
  parameter int unsigned WIDTH = xtalk_pkg::BUS_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  always_ff @(posedge clk) begin
    y <= (en && !rst) ? x : '0;
  end
endmodule
