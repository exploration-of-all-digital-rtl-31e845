// tb_deinterleaver - self-checking test of the deinterleaver corner turn.
//
// Two instances, 4 phases and the default 64 phases, are fed with sample
// numbers (din[p] = PH*t + p, en high from clock 0). After the PH-1 clock
// latency, output phase c at clock g*PH + PH-1 + i must carry sample
// g*PH*PH + c*PH + i. Every output phase is checked every clock for several
// groups, which also checks the latency.
// Provenance: the corner-turn order follows the design.
module tb_deinterleaver;
  localparam int NCYC = 64 * 64 * 3;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [15:0] din4 [4],  dout4 [4];
  logic [15:0] din64 [64], dout64 [64];

  deinterleaver #(.PH(4), .W(16)) dut4 (.clk(clk), .rst(rst), .en(en), .din(din4), .dout(dout4));
  deinterleaver dut64 (.clk(clk), .rst(rst), .en(en), .din(din64), .dout(dout64));


  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++)  din4[p]  = '0;
    for (int p = 0; p < 64; p++) din64[p] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < NCYC; t++) begin
      // drive clock t
      en = 1'b1;
      for (int p = 0; p < 4; p++)  din4[p]  = 16'(4 * t + p);
      for (int p = 0; p < 64; p++) din64[p] = 16'(64 * t + p);
      #2;
      if (t >= 3) begin
        int tp, g, i;
        tp = t - 3; g = tp / 4; i = tp % 4;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (dout4[c] !== 16'(g * 16 + c * 4 + i)) begin
            failures++;
            if (failures < 10) $display("PH4 t=%0d c=%0d got %0d exp %0d", t, c, dout4[c], g * 16 + c * 4 + i);
          end
        end
      end
      if (t >= 63) begin
        int tp, g, i;
        tp = t - 63; g = tp / 64; i = tp % 64;
        for (int c = 0; c < 64; c++) begin
          checks++;
          if (dout64[c] !== 16'(g * 4096 + c * 64 + i)) begin
            failures++;
            if (failures < 10) $display("PH64 t=%0d c=%0d got %0d exp %0d", t, c, dout64[c], g * 4096 + c * 64 + i);
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
