// tb_inv_selector: exhaustive self-check of the inverting 2:1 selector.
//
// For both select values and all 16 data words checks b_out (b or ~b) and that inv
// repeats the select. Combinational; a watchdog ends a hung run.
module tb_inv_selector;
  logic [3:0] b, b_out;
  logic       oc, inv;
  int checks = 0, failures = 0;

  inv_selector dut (.b(b), .oc(oc), .b_out(b_out), .inv(inv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int d = 0; d < 16; d++) begin
        logic [3:0] exp;
        b = 4'(d); oc = s[0]; #1;
        exp = s[0] ? 4'(15 - d) : 4'(d);
        checks += 2;
        if (b_out !== exp) begin
          failures++;
          $display("FAIL oc=%b b=%h b_out=%h expected %h", oc, b, b_out, exp);
        end
        if (inv !== s[0]) begin
          failures++;
          $display("FAIL oc=%b inv=%b", oc, inv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
