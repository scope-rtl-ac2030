// alpha_mem_tb: self-checking test of the alpha coefficient memory.
// Writes signed 18-bit coefficients (including the extremes) to a 40-entry
// memory, reads them back in random order and compares with a model.
module alpha_mem_tb;
  localparam int unsigned DEPTH = 40;
  localparam int unsigned AW    = 6;

  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic signed [17:0] wdata = '0, rdata;
  logic signed [17:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  alpha_mem #(.DEPTH(DEPTH), .DATA_W(18), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = (i == 0) ? -18'sd131072 : (i == 1) ? 18'sd131071 : 18'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      re = 1'b0;
      check(rdata == ref_mem[a], $sformatf("read %0d", a));
    end
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
