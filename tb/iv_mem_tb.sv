// iv_mem_tb: self-checking test of the input vector memory.
// Writes a random 16-element vector, checks that vec_ready rises only after
// the last element, reads every element back (one-cycle latency, rvalid)
// and checks that clr lowers vec_ready.
module iv_mem_tb;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW    = 4;

  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic rvalid, vec_ready;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  iv_mem #(.DEPTH(DEPTH), .DATA_W(8), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!vec_ready, "not ready after reset");
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 8'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = ref_mem[i];
      @(negedge clk);
      if (i < DEPTH - 1) check(!vec_ready, "ready too early");
    end
    we = 1'b0;
    check(vec_ready, "ready after last element");
    for (int i = DEPTH - 1; i >= 0; i--) begin
      re = 1'b1; raddr = AW'(i);
      @(negedge clk);
      re = 1'b0;
      check(rvalid, "rvalid");
      check(rdata == ref_mem[i], $sformatf("read %0d", i));
      @(negedge clk);
      check(!rvalid, "rvalid drops");
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(!vec_ready, "clr lowers ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
