// sv_mem_tb: self-checking test of the per-PE SV memory bank.
// Fills a 60-word bank with random data, then issues random reads and
// compares each result, one cycle later, with a model array. Also checks
// that rdata holds while re is low.
module sv_mem_tb;
  localparam int unsigned DEPTH = 60;
  localparam int unsigned AW    = 6;

  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata, held;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sv_mem #(.DEPTH(DEPTH), .DATA_W(8), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ref_mem[i] = 8'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      re = 1'b1; raddr = AW'(a);
      @(negedge clk);
      check(rdata == ref_mem[a], $sformatf("read %0d", a));
      held = rdata;
      re = 1'b0; raddr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      check(rdata == held, "hold without re");
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
