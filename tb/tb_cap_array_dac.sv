// Self-checking testbench of the split capacitor array model. With the ideal
// bridge capacitor, moving the bottom plate of bit i from Vcm to VDD must
// raise the comparator-side top node by (2^i / 1024) * (VDD - Vcm) and moving
// it to GND must lower it by (2^i / 1024) * Vcm; several switched bits add
// up. The expected values use these binary weights directly, not the
// two-node charge solution of the model.
module tb_cap_array_dac;
  import sar_adc_pkg::*;
  real vsp = 0.7, vsn = 1.1, vcm = 0.9;
  sw_sel_t [9:0] con_p, con_n;
  real vpos, vneg, exp_p, exp_n;
  int checks = 0, failures = 0;

  cap_array_dac dut (.vsp(vsp), .vsn(vsn), .vcm(vcm), .con_p(con_p), .con_n(con_n),
                     .vpos(vpos), .vneg(vneg));

  function automatic real step(sw_sel_t s);
    if (s == SW_VDD) return 1.8 - vcm;
    if (s == SW_GND) return -vcm;
    return 0.0;
  endfunction

  task automatic check_all(input string what);
    exp_p = vsp; exp_n = vsn;
    for (int i = 0; i < 10; i++) begin
      exp_p += real'(1 << i) / 1024.0 * step(con_p[i]);
      exp_n += real'(1 << i) / 1024.0 * step(con_n[i]);
    end
    #1 checks++;
    if (vpos - exp_p > 1e-9 || exp_p - vpos > 1e-9 || vneg - exp_n > 1e-9 || exp_n - vneg > 1e-9) begin
      failures++;
      $display("FAIL %s vpos=%.9f exp %.9f vneg=%.9f exp %.9f", what, vpos, exp_p, vneg, exp_n);
    end
  endtask

  initial begin
    for (int i = 0; i < 10; i++) begin con_p[i] = SW_VCM; con_n[i] = SW_VCM; end
    check_all("all at Vcm");
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 10; j++) begin con_p[j] = SW_VCM; con_n[j] = SW_VCM; end
      con_p[i] = SW_VDD; con_n[i] = SW_GND;
      check_all("single bit");
      con_p[i] = SW_GND; con_n[i] = SW_VDD;
      check_all("single bit reversed");
    end
    for (int k = 0; k < 200; k++) begin
      vcm = 0.85 + real'($urandom_range(100)) * 1.0e-3;
      vsp = real'($urandom_range(1800)) * 1.0e-3;
      vsn = real'($urandom_range(1800)) * 1.0e-3;
      for (int j = 0; j < 10; j++) begin
        con_p[j] = sw_sel_t'($urandom_range(2));
        con_n[j] = sw_sel_t'($urandom_range(2));
      end
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
