// Self-checking test of fe_analog_model: pulse heights, threshold and
// calibration injection against the comparison worked out here.
module tb_fe_analog_model;
  import trk_pkg::*;
  int checks = 0, failures = 0;
  logic [NCH-1:0][7:0] amp;
  logic cal_strobe;
  logic [NCH-1:0] cal_mask, disc;
  logic [DAC_W-1:0] cal_dac, thr_dac;

  fe_analog_model dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int c = 0; c < NCH; c++) amp[c] = 8'($urandom % 160);
      cal_strobe = 1'($urandom);
      cal_mask   = {$urandom, $urandom};
      cal_dac    = 7'($urandom);
      thr_dac    = 7'($urandom);
      #5;
      for (int c = 0; c < NCH; c++) begin
        int q;
        q = amp[c] + ((cal_strobe && cal_mask[c]) ? cal_dac : 0);
        checks++;
        if (disc[c] != (q > thr_dac)) begin
          failures++;
          $display("FAIL ch %0d q=%0d thr=%0d disc=%b", c, q, thr_dac, disc[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
