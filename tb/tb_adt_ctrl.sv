// tb_adt_ctrl - self-checking test of the enable controller.
//
// With latencies 0/3/10/50/57, `run` is raised and each enable must rise in
// exactly the clock given by its latency (counted from the first clock with
// run high) and stay high; dropping run must clear them all, and a second
// start must repeat the same timing.
// Provenance: the latencies tested are arbitrary; the controller and its timing are
// this design's own.
module tb_adt_ctrl;
  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic en_src, en_dds, en_deint, en_dsm, en_int, tx_valid;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  adt_ctrl #(.L_DDS(0), .L_DEINT(3), .L_DSM(10), .L_INT(50), .L_VALID(57)) dut (
    .clk(clk), .rst(rst), .run(run), .en_src(en_src), .en_dds(en_dds), .en_deint(en_deint),
    .en_dsm(en_dsm), .en_int(en_int), .tx_valid(tx_valid));

  task automatic check(string what, logic got, logic exp_v, int t);
    checks++;
    if (got !== exp_v) begin
      failures++; $display("%s at clock %0d: %0b, expected %0b", what, t, got, exp_v);
    end
  endtask

  task automatic start_and_check();
    run = 1'b1;
    for (int t = 0; t < 80; t++) begin
      #2;
      check("en_src",   en_src,   1'b1,      t);
      check("en_dds",   en_dds,   1'b1,      t);
      check("en_deint", en_deint, 1'(t >= 3),  t);
      check("en_dsm",   en_dsm,   1'(t >= 10), t);
      check("en_int",   en_int,   1'(t >= 50), t);
      check("tx_valid", tx_valid, 1'(t >= 57), t);
      @(posedge clk); #1;
    end
    run = 1'b0;
    #2;
    check("idle", en_src | en_dds | en_deint | en_dsm | en_int | tx_valid, 1'b0, -1);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    start_and_check();
    repeat (3) @(posedge clk);
    #1;
    start_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
