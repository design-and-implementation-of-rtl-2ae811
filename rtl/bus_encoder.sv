// bus_encoder: crosstalk-avoiding encoder for a 4-line bus.
//
// Each cycle the detector compares the data word b with the word the bus carried last
// (held in enc_reg). If the transfer would switch two neighbouring lines in opposite
// directions, or would switch most of the lines, the selector puts the inverted word on the
// bus and raises con; otherwise b goes out unchanged with con low:
//     if (oc_ebw) {bus, con} = {~b, 1} else {bus, con} = {b, 0}
// bus and con are combinational from b and the register; the register captures bus at the
// rising clk edge, so the word sent in cycle t is the reference for cycle t+1. After reset
// (sync, active high) the reference is all zeros. The detector, selector, register and the
// con buffer follow the published encoder; the clock/reset/enable interface is the
// register's, brought out unchanged.
//
// An assertion states the guarantee of the rule: compared with the reference word, the coded
// bus never switches more than half of its lines.
//
// Ports: clk, rst, en, b [WIDTH] data in, bus [WIDTH] coded word out, con invert flag out.
module bus_encoder #(
  parameter int unsigned WIDTH = xtalk_pkg::BUS_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] bus,
  output logic             con
);
  logic [WIDTH-1:0] prev_bus;
  logic             sel;
  logic             inv;

  enc_reg #(.WIDTH(WIDTH)) u_reg (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .x   (bus),
    .y   (prev_bus)
  );

  xtalk_detector #(.WIDTH(WIDTH)) u_det (
    .b_enc_prev (prev_bus),
    .b          (b),
    .oc_ebw     (sel)
  );

  inv_selector #(.WIDTH(WIDTH)) u_sel (
    .b     (b),
    .oc    (sel),
    .b_out (bus),
    .inv   (inv)
  );

  // Buffer on the control line towards the receiver.
  assign con = inv;

  // Inversion always leaves at most WIDTH/2 lines switching.
  a_max_switch: assert property (@(posedge clk) $countones(bus ^ prev_bus) <= WIDTH / 2)
    else $error("coded bus switches %0d lines", $countones(bus ^ prev_bus));
endmodule
