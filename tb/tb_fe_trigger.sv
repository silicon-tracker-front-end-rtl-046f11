// Self-checking test of fe_trigger: random discriminator patterns, masks
// and neighbour triggers against the OR chain worked out here.
module tb_fe_trigger;
  import trk_pkg::*;
  int checks = 0, failures = 0;
  logic [NCH-1:0] disc, trig_mask;
  logic trig_in_l, trig_in_r, trig_local, trig_out_l, trig_out_r;

  fe_trigger dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      bit exp_local;
      disc      = {$urandom, $urandom};
      trig_mask = {$urandom, $urandom};
      // sparse patterns so that both outcomes occur
      if (i % 2) disc = NCH'(1) << ($urandom % NCH);
      if (i % 3 == 0) trig_mask = ~(NCH'(1) << ($urandom % NCH));
      trig_in_l = 1'($urandom);
      trig_in_r = 1'($urandom);
      #1;
      exp_local = 1'b0;
      for (int c = 0; c < NCH; c++) if (disc[c] && trig_mask[c]) exp_local = 1'b1;
      checks += 3;
      if (trig_local != exp_local)              begin failures++; $display("FAIL local"); end
      if (trig_out_r != (exp_local | trig_in_l)) begin failures++; $display("FAIL out_r"); end
      if (trig_out_l != (exp_local | trig_in_r)) begin failures++; $display("FAIL out_l"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
