// tb_hqc_param_rom: checks the parameter ROM against the HQC parameter
// table for all three sets, including the derived word count ceil(p/128)
// and the relation n_e = k_e + 2t.
module tb_hqc_param_rom;
  import hqc_pkg::*;
  sec_t sec;
  params_t prm;
  int checks = 0, failures = 0;

  hqc_param_rom dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [3]  = '{17669, 35851, 57637};
    int w [3]  = '{66, 100, 131};
    int wr [3] = '{75, 114, 149};
    int ne [3] = '{46, 56, 90};
    int ke [3] = '{16, 24, 32};
    int mm [3] = '{3, 5, 5};
    for (int s = 0; s < 3; s++) begin
      sec = sec_t'(s);
      #1;
      chk(prm.p == 16'(p[s]), "p");
      chk(prm.words == 10'((p[s] + 127) / 128), "words");
      chk(prm.w == 8'(w[s]), "w");
      chk(prm.wr == 8'(wr[s]), "w_r");
      chk(prm.ne == 7'(ne[s]), "n_e");
      chk(prm.ke == 6'(ke[s]), "k_e");
      chk(int'(prm.ne) == int'(prm.ke) + 2 * int'(prm.t), "n_e = k_e + 2t");
      chk(prm.rm_mult == 3'(mm[s]), "RM multiplicity");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
