// tb_xtalk_detector: exhaustive self-check of the crosstalk probability detector.
//
// Applies all 256 combinations of previous bus word and new data word and compares oc_ebw
// with a reference written as explicit four-line product terms: three adjacent-pair
// opposite-switching terms and the four three-line switching terms. Also checks a few
// hand-worked vectors. Combinational block, so no cycle count applies; a watchdog ends a
// hung run.
module tb_xtalk_detector;
  logic [3:0] prev, b;
  logic       oc_ebw;
  int checks = 0, failures = 0;

  xtalk_detector dut (.b_enc_prev(prev), .b(b), .oc_ebw(oc_ebw));

  function automatic logic ref_sel(input logic [3:0] p, input logic [3:0] d);
    logic t0, t1, t2, t3, oc, ebw;
    t0 = p[0] ^ d[0]; t1 = p[1] ^ d[1]; t2 = p[2] ^ d[2]; t3 = p[3] ^ d[3];
    oc  = (t0 & t1 & (d[0] ^ d[1])) | (t1 & t2 & (d[1] ^ d[2])) | (t2 & t3 & (d[2] ^ d[3]));
    ebw = (t0 & t1 & t2) | (t0 & t1 & t3) | (t0 & t2 & t3) | (t1 & t2 & t3);
    return oc | ebw;
  endfunction

  task automatic check(input logic [3:0] p, input logic [3:0] d, input logic exp);
    prev = p; b = d; #1;
    checks++;
    if (oc_ebw !== exp) begin
      failures++;
      $display("FAIL prev=%h b=%h oc_ebw=%b expected %b", p, d, oc_ebw, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked cases.
    check(4'h0, 4'h0, 1'b0);  // nothing switches
    check(4'h1, 4'h4, 1'b0);  // lines 0 and 2 switch, not neighbours
    check(4'h1, 4'h2, 1'b1);  // line 0 falls while line 1 rises
    check(4'h0, 4'h3, 1'b0);  // lines 0 and 1 rise together
    check(4'h6, 4'h9, 1'b1);  // all four switch
    check(4'h0, 4'h7, 1'b1);  // three rise together
    check(4'h8, 4'h1, 1'b0);  // edge lines switch, far apart
    check(4'h7, 4'h6, 1'b0);  // single line switches
    for (int p = 0; p < 16; p++)
      for (int d = 0; d < 16; d++)
        check(4'(p), 4'(d), ref_sel(4'(p), 4'(d)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
