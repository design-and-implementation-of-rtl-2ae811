// tb_xtalk_bus_top: end-to-end test of the encoder -> bus -> decoder link at default size.
//
// Sends a directed sequence and then random words through the link and checks every cycle
// that data_out equals data_in (lossless coding), and that the coded bus never switches more
// than two of its four lines from one cycle to the next (the inversion rule guarantees it).
// It counts each mechanism: plain pass-through, inversion caused by opposite switching of a
// neighbour pair, inversion caused by three or more lines switching, synchronous reset, and
// the reference clear by en=0; a mechanism that never occurred counts as a failure. It also
// reports how many opposite-direction neighbour transitions the raw data and the coded bus
// would have carried. Watchdog included.
module tb_xtalk_bus_top;
  logic       clk = 1'b0, rst, en, con;
  logic [3:0] data_in, bus, data_out, prev_bus, prev_raw;
  int checks = 0, failures = 0;
  int n_pass = 0, n_inv_opp = 0, n_inv_many = 0, n_reset = 0, n_en_clear = 0;
  int raw_opp = 0, bus_opp = 0;

  xtalk_bus_top dut (
    .clk(clk), .rst(rst), .en(en), .data_in(data_in),
    .bus(bus), .con(con), .data_out(data_out)
  );

  always #5 clk = ~clk;

  function automatic int n_switch(input logic [3:0] p, input logic [3:0] d);
    int n = 0;
    for (int i = 0; i < 4; i++) if (p[i] != d[i]) n++;
    return n;
  endfunction

  function automatic int n_opposite(input logic [3:0] p, input logic [3:0] d);
    int n = 0;
    for (int i = 0; i < 3; i++)
      if (p[i] != d[i] && p[i+1] != d[i+1] && d[i] != d[i+1]) n++;
    return n;
  endfunction

  task automatic step(input logic [3:0] d, input logic e, input logic r);
    data_in = d; en = e; rst = r; #1;
    checks += 2;
    if (data_out !== d) begin
      failures++; $display("FAIL data_in=%h data_out=%h bus=%h con=%b", d, data_out, bus, con);
    end
    if (n_switch(prev_bus, bus) > 2) begin
      failures++; $display("FAIL bus %h -> %h switches %0d lines", prev_bus, bus, n_switch(prev_bus, bus));
    end
    raw_opp += n_opposite(prev_raw, d);
    bus_opp += n_opposite(prev_bus, bus);
    if (!con) n_pass++;
    else if (n_opposite(prev_bus, d) > 0) n_inv_opp++;
    else if (n_switch(prev_bus, d) >= 3) n_inv_many++;
    else begin
      failures++; $display("FAIL inverted without cause: prev=%h data=%h", prev_bus, d);
    end
    if (r) n_reset++;
    else if (!e) n_en_clear++;
    @(posedge clk); #1;
    prev_bus = (e && !r) ? bus : 4'h0;
    prev_raw = d;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_in = 4'h0; en = 1'b1; rst = 1'b1;
    @(posedge clk); #1;
    prev_bus = 4'h0; prev_raw = 4'h0;
    step(4'h1, 1'b1, 1'b0);   // one line rises: pass
    step(4'h2, 1'b1, 1'b0);   // line 0 falls, line 1 rises: opposite -> invert
    step(4'h9, 1'b1, 1'b0);
    step(4'h6, 1'b1, 1'b0);
    step(4'hC, 1'b0, 1'b0);   // en low clears the reference
    step(4'h7, 1'b1, 1'b0);   // three lines rise vs 0000 -> invert
    step(4'h5, 1'b1, 1'b1);   // reset
    for (int i = 0; i < 5000; i++)
      step(4'($urandom), ($urandom % 32) != 0, ($urandom % 64) == 0);
    $display("mechanisms: pass=%0d invert_opposite=%0d invert_many=%0d reset=%0d en_clear=%0d",
             n_pass, n_inv_opp, n_inv_many, n_reset, n_en_clear);
    $display("opposite neighbour transitions: raw data=%0d coded bus=%0d", raw_opp, bus_opp);
    if (n_pass == 0)     begin failures++; $display("FAIL pass-through never seen"); end
    if (n_inv_opp == 0)  begin failures++; $display("FAIL opposite-switching inversion never seen"); end
    if (n_inv_many == 0) begin failures++; $display("FAIL many-line inversion never seen"); end
    if (n_reset == 0)    begin failures++; $display("FAIL reset never seen"); end
    if (n_en_clear == 0) begin failures++; $display("FAIL en clear never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
