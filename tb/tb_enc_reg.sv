// tb_enc_reg: self-check of the previous-word register.
//
// Drives random words with random en and rst and checks, one clock after each edge, that y
// holds x when en=1 and rst=0 and zero otherwise (one-cycle latency). A watchdog ends a hung
// run after a fixed number of cycles.
module tb_enc_reg;
  logic       clk = 1'b0, rst, en;
  logic [3:0] x, y, exp;
  int checks = 0, failures = 0;

  enc_reg dut (.clk(clk), .rst(rst), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1; x = 4'hA;
    @(posedge clk); #1;
    checks++;
    if (y !== 4'h0) begin failures++; $display("FAIL reset y=%h", y); end
    for (int i = 0; i < 500; i++) begin
      x   = 4'($urandom);
      en  = ($urandom % 4) != 0;
      rst = ($urandom % 8) == 0;
      exp = (en && !rst) ? x : 4'h0;
      @(posedge clk); #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL en=%b rst=%b x=%h y=%h expected %h", en, rst, x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
