// tb_bus_decoder: exhaustive self-check of the bus decoder.
//
// For both con values and all 16 bus words checks data_out = con ? ~bus_in : bus_in,
// with the expected value formed by subtraction from 15 rather than by inversion.
// Combinational; a watchdog ends a hung run.
module tb_bus_decoder;
  logic [3:0] bus_in, data_out;
  logic       con;
  int checks = 0, failures = 0;

  bus_decoder dut (.bus_in(bus_in), .con(con), .data_out(data_out));

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
        bus_in = 4'(d); con = s[0]; #1;
        exp = s[0] ? 4'(15 - d) : 4'(d);
        checks++;
        if (data_out !== exp) begin
          failures++;
          $display("FAIL con=%b bus_in=%h data_out=%h expected %h", con, bus_in, data_out, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
