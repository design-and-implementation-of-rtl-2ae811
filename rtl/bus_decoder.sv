// bus_decoder: receiver side of the crosstalk-avoiding bus.
//
// Restores the data word from the coded bus word and the con line:
//     data_out = con ? ~bus_in : bus_in
// Purely combinational (an inverter and a 2:1 multiplexer per line), as published.
//
// Ports: bus_in [WIDTH] coded word, con invert flag, data_out [WIDTH] decoded word.
module bus_decoder #(
  parameter int unsigned WIDTH = xtalk_pkg::BUS_W
) (
  input  logic [WIDTH-1:0] bus_in,
  input  logic             con,
  output logic [WIDTH-1:0] data_out
);
  assign data_out = con ? ~bus_in : bus_in;
endmodule
