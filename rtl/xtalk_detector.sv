// xtalk_detector: crosstalk probability detector of the bus encoder.
//
// Compares the data word about to be sent, b, with the word currently on the bus (the
// previously encoded word, b_enc_prev) and raises oc_ebw when sending b unchanged would be a
// high-crosstalk transition. Purely combinational; oc_ebw is valid one gate network after
// the inputs settle.
//
// Two conditions are ORed, mirroring the detector's two OR trees (OC and EBW):
//   OC  - opposite coupling: two adjacent lines i, i+1 both switch and end at different values,
//         i.e. they switch in opposite directions (the worst-case coupling of the wire model).
//         Per pair: (b[i]^b_prev[i]) & (b[i+1]^b_prev[i+1]) & (b[i]^b[i+1]).
//   EBW - at least EBW_MIN lines switch at once (for four lines: three or all four), the
//         case where sending the inverted word makes at most one line switch.
// The per-line transition XORs, the adjacent-difference XORs on b, the AND terms and the OR
// trees follow the detector's published gate network; the counting form used for EBW, which
// for WIDTH=4 and EBW_MIN=3 equals the OR of the four three-line AND terms, and the
// parameterisation are this design's own.
//
// Ports: b_enc_prev [WIDTH] previous bus word, b [WIDTH] new data word, oc_ebw select output.
module xtalk_detector #(
  parameter int unsigned WIDTH   = xtalk_pkg::BUS_W,
  parameter int unsigned EBW_MIN = xtalk_pkg::EBW_MIN
) (
  input  logic [WIDTH-1:0] b_enc_prev,
  input  logic [WIDTH-1:0] b,
  output logic             oc_ebw
);
  logic [WIDTH-1:0] trans;     // line i changes value on this transfer
  logic [WIDTH-2:0] adj_diff;  // new values of lines i and i+1 differ
  logic [WIDTH-2:0] opp;       // lines i and i+1 switch in opposite directions
  logic             oc;
  logic             ebw;
  int unsigned      n_trans;

  assign trans = b ^ b_enc_prev;

  always_comb begin
    for (int i = 0; i < int'(WIDTH) - 1; i++) begin
      adj_diff[i] = b[i] ^ b[i+1];
      opp[i]      = trans[i] & trans[i+1] & adj_diff[i];
    end
    n_trans = 0;
    for (int i = 0; i < int'(WIDTH); i++) n_trans += {31'd0, trans[i]};
  end

  assign oc     = |opp;
  assign ebw    = n_trans >= EBW_MIN;
  assign oc_ebw = oc | ebw;
endmodule
