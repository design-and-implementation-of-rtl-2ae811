// xtalk_pkg: constants shared by the crosstalk-avoiding bus encoder and decoder.
//
// BUS_W is the number of data lines on the coded bus (four, as in the design's crosstalk
// model of four coupled wires). EBW_MIN is the number of simultaneously switching lines from
// which the detector asks for inversion even without an opposite-direction neighbour pair;
// with four lines this is 3, i.e. "more than half of the bus switches". The value 3 follows
// from the four three-line product terms of the detector's gate network; naming it as a
// constant is this design's own choice.
package xtalk_pkg;
  localparam int unsigned BUS_W   = 4;
  localparam int unsigned EBW_MIN = 3;
endpackage
