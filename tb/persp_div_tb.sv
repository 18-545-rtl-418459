// persp_div_tb: random clip vectors (w of either sign) checked against real division
// rounded to single precision.
module persp_div_tb;
  import gl_pkg::*;
  import fp_ref_pkg::*;
  vec4_t clip;
  vec3_t ndc;
  int checks = 0, failures = 0;

  persp_div dut (.*);

  task automatic chk(float_t got, real e, string what);
    checks++;
    if (got !== from_real(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, from_real(e));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) clip[i] = rand_float(-6, 6);
      #1;
      chk(ndc.x, to_real(clip[0]) / to_real(clip[3]), "x");
      chk(ndc.y, to_real(clip[1]) / to_real(clip[3]), "y");
      chk(ndc.z, to_real(clip[2]) / to_real(clip[3]), "z");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
