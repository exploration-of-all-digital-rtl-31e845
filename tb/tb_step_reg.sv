// tb_step_reg - self-checking test of the processor control register.
//
// Writes Step and run values, checks the outputs after each write, reads
// both addresses back, and checks that reset clears them.
// Provenance: the register map is this design's.
module tb_step_reg;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0, addr = 1'b0, run;
  logic [31:0] wdata = '0, rdata;
  logic [9:0]  step;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  step_reg dut (.clk(clk), .rst(rst), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata), .step(step), .run(run));

  task automatic wr(logic a, logic [31:0] d);
    addr = a; wdata = d; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  task automatic chk(logic [9:0] es, logic er);
    checks += 4;
    if (step !== es) begin failures++; $display("step %0d exp %0d", step, es); end
    if (run !== er)  begin failures++; $display("run %0b exp %0b", run, er); end
    addr = 1'b0; #1;
    if (rdata !== 32'(es)) begin failures++; $display("rdata0 %0h", rdata); end
    addr = 1'b1; #1;
    if (rdata !== 32'(er)) begin failures++; $display("rdata1 %0h", rdata); end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    chk(10'd0, 1'b0);
    for (int k = 0; k < 20; k++) begin
      logic [9:0] s;
      s = 10'($urandom);
      wr(1'b0, {22'($urandom), s});
      chk(s, 1'(k % 2));
      wr(1'b1, 32'(~k[0]));
      chk(s, ~k[0]);
    end
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    chk(10'd0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
