// inv_selector: inverting 2:1 selector of the bus encoder.
//
// Drives the bus with the data word or with its bitwise inverse: b_out = oc ? ~b : b.
// The select is also forwarded unchanged as inv, which becomes the CON line to the receiver.
// Combinational. The inverter, the 2:1 multiplexer (1 input = inverted data) and the
// forwarded select follow the published selector; port names follow it too.
//
// inv is deliberately a straight copy of the input oc (the buffer in front of the CON line),
// so synthesis lists it as an output wired to an input.
//
// Ports: b [WIDTH] data in, oc select in, b_out [WIDTH] bus word out, inv select out.
module inv_selector #(
  parameter int unsigned WIDTH = xtalk_pkg::BUS_W
) (
  input  logic [WIDTH-1:0] b,
  input  logic             oc,
  output logic [WIDTH-1:0] b_out,
  output logic             inv
);
  assign b_out = oc ? ~b : b;
  assign inv   = oc;
endmodule
