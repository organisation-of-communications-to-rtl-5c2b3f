// tb_acmb_bus: self-checking test of the wired-OR bus model.
//
// Drives random control-unit and module line values and checks every
// resolved line against an OR worked out in the testbench; AD takes only the
// values of stations that enable their drivers (one at a time, as the bus
// rule requires). With no station driving, every line must be inactive.
module tb_acmb_bus;
  import acmb_pkg::*;
  localparam int unsigned N = 3;

  acmb_ctrl_drv_t ctrl;
  acmb_mem_drv_t  mem [N];
  acmb_bus_t      bus;
  int             checks = 0, failures = 0;

  acmb_bus #(.NUM_MODULES(N)) dut (.rst_n(1'b1), .ctrl, .mem, .bus);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AD_WIDTH-1:0] exp_ad;
    logic exp_adok, exp_doutc, exp_oflo, exp_perr;
    int drv_sel;
    ctrl = '0;
    foreach (mem[i]) mem[i] = '0;
    #1;
    check(bus == '0, "idle bus is all inactive");
    for (int t = 0; t < 500; t++) begin
      drv_sel = $urandom_range(0, N + 1);  // N+1: nobody drives AD
      ctrl = acmb_ctrl_drv_t'({$urandom, $urandom});
      ctrl.ad_oe = (drv_sel == N);
      exp_ad = ctrl.ad_oe ? ctrl.ad : '0;
      exp_adok = 0; exp_doutc = 0; exp_oflo = 0; exp_perr = 0;
      for (int i = 0; i < N; i++) begin
        mem[i] = acmb_mem_drv_t'({$urandom, $urandom});
        mem[i].adok  = (drv_sel == i) && mem[i].adok;  // at most one ADOK
        mem[i].ad_oe = (drv_sel == i);
        if (mem[i].ad_oe) exp_ad = mem[i].ad;
        exp_adok  |= mem[i].adok;
        exp_doutc |= mem[i].doutc;
        exp_oflo  |= mem[i].oflo;
        exp_perr  |= mem[i].par_err;
      end
      #1;
      check(bus.ad == exp_ad, $sformatf("AD %h want %h", bus.ad, exp_ad));
      check(bus.adok == exp_adok && bus.doutc == exp_doutc &&
            bus.oflo == exp_oflo && bus.par_err == exp_perr, "module status lines");
      check(bus.c0 == ctrl.c0 && bus.c1 == ctrl.c1 && bus.clear == ctrl.clear &&
            bus.oflo_enb == ctrl.oflo_enb && bus.init == ctrl.init &&
            bus.adstr == ctrl.adstr && bus.dinc == ctrl.dinc, "control lines");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
