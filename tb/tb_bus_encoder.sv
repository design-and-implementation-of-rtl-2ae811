// tb_bus_encoder: self-check of the bus encoder against a cycle model.
//
// Keeps its own copy of the word last placed on the bus, computes the invert decision from
// an explicit list of crosstalk cases (opposite switching of a neighbour pair, or three or
// more lines switching), and checks bus and con every cycle. Also checks the one-cycle
// register latency: a word sent in cycle t is the reference in cycle t+1, reset and en=0
// return the reference to zero. Random data with directed openings; watchdog included.
module tb_bus_encoder;
  logic       clk = 1'b0, rst, en;
  logic [3:0] b, bus, ref_prev, exp_bus;
  logic       con, exp_con;
  int checks = 0, failures = 0;

  bus_encoder dut (.clk(clk), .rst(rst), .en(en), .b(b), .bus(bus), .con(con));

  always #5 clk = ~clk;

  function automatic logic decide(input logic [3:0] p, input logic [3:0] d);
    int n;
    logic opp;
    n = 0;
    opp = 1'b0;
    for (int i = 0; i < 4; i++) if (p[i] != d[i]) n++;
    for (int i = 0; i < 3; i++)
      // neighbours switch and end at different values: one rose, the other fell
      if (p[i] != d[i] && p[i+1] != d[i+1] && d[i] != d[i+1]) opp = 1'b1;
    return opp || n >= 3;
  endfunction

  task automatic step(input logic [3:0] d, input logic e, input logic r);
    b = d; en = e; rst = r; #1;
    exp_con = decide(ref_prev, d);
    exp_bus = exp_con ? 4'(15 - d) : d;
    checks += 2;
    if (con !== exp_con) begin
      failures++; $display("FAIL prev=%h b=%h con=%b expected %b", ref_prev, d, con, exp_con);
    end
    if (bus !== exp_bus) begin
      failures++; $display("FAIL prev=%h b=%h bus=%h expected %h", ref_prev, d, bus, exp_bus);
    end
    @(posedge clk); #1;
    ref_prev = (e && !r) ? exp_bus : 4'h0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_prev = 4'h0;
    b = 4'h0; en = 1'b1; rst = 1'b1;
    @(posedge clk); #1;
    // directed: after reset the reference is 0000
    step(4'h0, 1'b1, 1'b0);   // no switching -> pass
    step(4'h7, 1'b1, 1'b0);   // three rise -> invert, bus 1000
    step(4'h7, 1'b1, 1'b0);   // reference now 1000: data 0111 would switch all -> invert again
    step(4'h5, 1'b1, 1'b0);
    step(4'hA, 1'b1, 1'b0);
    step(4'h3, 1'b0, 1'b0);   // en low: reference cleared afterwards
    step(4'hF, 1'b1, 1'b0);   // vs 0000: all switch -> invert to 0000
    for (int i = 0; i < 1000; i++)
      step(4'($urandom), ($urandom % 16) != 0, ($urandom % 32) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
