// addr_gen_tb: self-checking test of the address generator.
// A 5-deep generator is stepped with a random enable pattern; every issued
// address, the new_addr strobe and the last flag are compared with a
// counter model, including wrap-around and a clear in mid-count.
module addr_gen_tb;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned AW    = 3;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, en = 1'b0;
  logic [AW-1:0] addr;
  logic new_addr, last;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  addr_gen #(.DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%0d model=%0d last=%0b", what, addr, model, last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = (i == 77);
      #1;
      check(new_addr == en, "new_addr");
      if (!clr) begin
        check(addr == AW'(model), "addr");
        check(last == (en && model == DEPTH - 1), "last");
      end
      @(posedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model == DEPTH - 1) begin model = 0; wraps++; end
        else model++;
      end
    end
    check(wraps > 5, "wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
