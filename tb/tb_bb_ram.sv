// tb_bb_ram - self-checking test of the run-time loadable baseband RAM.
//
// The host writes random words to the RAM, sets a loop length of 100 and
// streams 350 samples (wrapping three times), then rewrites part of the RAM
// while it is being read and checks the new contents appear; finally
// len = 0 must loop over the whole RAM. One clock read latency.
// Provenance: the RAM follows the design; its loop length port is this design's.
module tb_bb_ram;
  import adt_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0, en = 1'b0;
  logic [11:0] waddr = '0;
  logic [31:0] wdata = '0;
  logic [12:0] len = '0;
  sample_t     io, qo;
  logic [31:0] model [4096];
  int   checks = 0, failures = 0, wraps = 0;
  always #5 clk = ~clk;

  bb_ram dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata), .len(len), .en(en),
              .i_out(io), .q_out(qo));

  task automatic host_write(int a, logic [31:0] d);
    we = 1'b1; waddr = 12'(a); wdata = d; model[a] = d;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  task automatic stream(int n, int l);
    int a;
    a = 0;
    en = 1'b1;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      checks++;
      if ({io, qo} !== model[a]) begin
        failures++; if (failures < 10) $display("k=%0d a=%0d got %h exp %h", k, a, {io, qo}, model[a]);
      end
      a = (a + 1) % l;
      if (a == 0) wraps++;
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int a = 0; a < 4096; a++) host_write(a, $urandom);
    len = 13'd100;
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    stream(350, 100);
    for (int a = 0; a < 50; a++) host_write(a, $urandom);
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    stream(120, 100);
    len = '0;
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    stream(4200, 4096);
    if (wraps < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
