// tb_dsm_core - self-checking test of one delta-sigma core.
//
// Two cores, H(z) = 2z^-2 + z^-4 (defaults) and H(z) = -2z^-1 + z^-2, are
// driven with a random-walk input within +-0.5 (Q5.11). A behavioural model
// in integer arithmetic (units of 2^-11) runs the same loop:
// v = x - H(e), y = (v < 0), e = v -/+ 1. Now and then `load` is raised with
// a random external state, which the model must then use in place of its
// own. Checked every clock: the output bit (one clock after its input) and
// the four state words. The model forms the error directly, not through the
// quantizer table, so the table is checked too.
// Provenance: the error-feedback loop and its filters follow the design; the word
// format is this design's.
module tb_dsm_core;
  import adt_pkg::*;
  localparam int NCYC = 20000;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, loads = 0;
  always #5 clk = ~clk;

  dsm_t x, st_in [4], so_a [4], so_b [4];
  logic load, ya, yb;

  dsm_core                              dut_a (.clk(clk), .x(x), .load(load), .st_in(st_in), .st_out(so_a), .y(ya));
  dsm_core #(.H1(-2), .H2(1), .H3(0), .H4(0)) dut_b (.clk(clk), .x(x), .load(load), .st_in(st_in), .st_out(so_b), .y(yb));

  int ea [4], eb [4];
  int exp_ya, exp_yb;

  function automatic void step_model(int xv, bit ld, const ref int sin_ [4], ref int e [4],
                                     input int h1, h2, h3, h4, output int y);
    int s [4];
    int v;
    for (int j = 0; j < 4; j++) s[j] = ld ? sin_[j] : e[j];
    v = xv - (h1 * s[0] + h2 * s[1] + h3 * s[2] + h4 * s[3]);
    y = (v < 0) ? 1 : 0;
    e[3] = s[2]; e[2] = s[1]; e[1] = s[0];
    e[0] = (v < 0) ? v + 2048 : v - 2048;
  endfunction

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, sv [4];
    xv = 0;
    // common start: load a zero state in the first clock
    for (int j = 0; j < 4; j++) begin st_in[j] = '0; sv[j] = 0; ea[j] = 0; eb[j] = 0; end
    for (int t = 0; t < NCYC; t++) begin
      bit ld;
      ld = (t == 0) || ($urandom_range(0, 99) < 3);
      xv += $urandom_range(0, 200) - 100;
      if (xv > 1024)  xv = 1024;
      if (xv < -1024) xv = -1024;
      for (int j = 0; j < 4; j++) sv[j] = $urandom_range(0, 4096) - 2048;
      x    = dsm_t'(xv);
      load = ld;
      for (int j = 0; j < 4; j++) st_in[j] = dsm_t'(sv[j]);
      if (ld) loads++;
      step_model(xv, ld, sv, ea, 0, 2, 0, 1, exp_ya);
      step_model(xv, ld, sv, eb, -2, 1, 0, 0, exp_yb);
      @(posedge clk); #1;
      checks += 2;
      if (ya !== exp_ya[0]) begin failures++; if (failures < 10) $display("t=%0d ya=%0b exp %0d", t, ya, exp_ya); end
      if (yb !== exp_yb[0]) begin failures++; if (failures < 10) $display("t=%0d yb=%0b exp %0d", t, yb, exp_yb); end
      for (int j = 0; j < 4; j++) begin
        checks += 2;
        if (int'(so_a[j]) != ea[j]) begin failures++; if (failures < 10) $display("t=%0d A st%0d=%0d exp %0d", t, j, so_a[j], ea[j]); end
        if (int'(so_b[j]) != eb[j]) begin failures++; if (failures < 10) $display("t=%0d B st%0d=%0d exp %0d", t, j, so_b[j], eb[j]); end
      end
    end
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
