// xtalk_bus_top: complete crosstalk-avoiding link, encoder to decoder.
//
// The encoder codes each data word so that the four bus lines avoid opposite-direction
// switching of neighbours and mass switching; the coded word and the one-bit con flag travel
// on the bus, and the decoder at the far end restores the data. The coded bus and con are
// brought out as ports so that the line activity can be observed. The wires themselves (the
// coupled RC lines of the crosstalk model) are plain connections here.
//
// Timing: data_out follows data_in combinationally in the same cycle; the encoder's reference
// word advances on each rising clk edge. rst is synchronous and active high; en low clears
// the encoder's reference word at the next edge.
//
// Ports: clk, rst, en, data_in [BUS_W], bus [BUS_W], con, data_out [BUS_W].
module xtalk_bus_top #(
  parameter int unsigned WIDTH = xtalk_pkg::BUS_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] bus,
  output logic             con,
  output logic [WIDTH-1:0] data_out
);
  bus_encoder #(.WIDTH(WIDTH)) u_enc (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .b   (data_in),
    .bus (bus),
    .con (con)
  );

  bus_decoder #(.WIDTH(WIDTH)) u_dec (
    .bus_in   (bus),
    .con      (con),
    .data_out (data_out)
  );
endmodule
