// tb_adt_pkg - checks the table-building functions of the shared package
// against values worked out here from their definitions:
//   * carrier tables: round(32767 * sin/cos(2*pi*a/1024)) for all a,
//   * quantizer error table: for every 4-bit integer part of v (|v| < 8)
//     the entry equals floor(v) - (+1 or -1), the sign of v picking the level,
//   * transmit prototype: symmetric, every polyphase branch has DC gain
//     within 3 % of 1,
//   * receive prototype: symmetric, total DC gain within 0.1 % of 1,
//   * round_sat saturates at the word limits.
// No clock is needed; a watchdog still bounds the run.
// Provenance: the formulas (sine tables, windowed-sinc prototypes, quantizer error)
// are this design's choices where the design gives no numbers.
module tb_adt_pkg;
  import adt_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s;
    for (int a = 0; a < 1024; a++) begin
      chk(int'(dds_entry(a, 10, 1'b0)) == int'($floor(32767.0 * $sin(2.0 * 3.141592653589793 * a / 1024.0) + 0.5)), "sin");
      chk(int'(dds_entry(a, 10, 1'b1)) == int'($floor(32767.0 * $cos(2.0 * 3.141592653589793 * a / 1024.0) + 0.5)), "cos");
    end
    for (int iv = -8; iv < 8; iv++)
      chk(int'(qerr_entry(iv & 15)) == iv - ((iv < 0) ? -1 : 1), $sformatf("qerr %0d", iv));
    for (int ph = 8; ph <= 64; ph *= 8) begin
      for (int j = 0; j < ph * 4; j++)
        chk(interp_coef(j, ph, 4) == interp_coef(ph * 4 - 1 - j, ph, 4), "tx symmetry");
      for (int p = 0; p < ph; p++) begin
        s = 0.0;
        for (int j = 0; j < 4; j++) s += real'(interp_coef(p + j * ph, ph, 4)) / 65536.0;
        chk(s > 0.97 && s < 1.03, $sformatf("tx branch gain %f", s));
      end
      s = 0.0;
      for (int j = 0; j < ph; j++) begin
        s += real'(decim_coef(j, ph, 1)) / 65536.0;
        chk(decim_coef(j, ph, 1) == decim_coef(ph - 1 - j, ph, 1), "rx symmetry");
      end
      chk(s > 0.999 && s < 1.001, $sformatf("rx gain %f", s));
    end
    chk(round_sat(1.0e6, 16) == 32767, "sat +");
    chk(round_sat(-1.0e6, 16) == -32768, "sat -");
    chk(round_sat(-2.5, 16) == -2, "round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
