// acmb_bus: the shared 40-way cable between one control unit and
// NUM_MODULES memory modules.
//
// Every line is driven by open-collector sinks and pulled to the inactive
// level by a resistive termination at the control-unit end, so a line is
// asserted when any station asserts it and inactive when none does. In
// positive logic that is an OR over the stations; AD takes each station's
// value only while that station enables its AD drivers. The model is purely
// combinational (the specification bounds the cable's dispersion at 25 ns,
// which the stations' set-up delays cover).
//
// The address/data lines may have at most one driver at a time: the control
// unit drives them except in the data part of a READ, when the addressed
// module does. An assertion checks that rule, and that at most one module
// answers ADOK. rst_n only switches those checks off while the stations
// are in reset; the bus itself holds no state.
module acmb_bus
  import acmb_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 4
) (
  input  logic           rst_n,
  input  acmb_ctrl_drv_t ctrl,
  input  acmb_mem_drv_t  mem [NUM_MODULES],
  output acmb_bus_t      bus
);
  logic [NUM_MODULES:0] ad_drivers;

  always_comb begin
    bus          = '0;
    bus.c0       = ctrl.c0;
    bus.c1       = ctrl.c1;
    bus.clear    = ctrl.clear;
    bus.oflo_enb = ctrl.oflo_enb;
    bus.init     = ctrl.init;
    bus.adstr    = ctrl.adstr;
    bus.dinc     = ctrl.dinc;
    bus.ad       = ctrl.ad_oe ? ctrl.ad : '0;
    ad_drivers   = '0;
    ad_drivers[NUM_MODULES] = ctrl.ad_oe;
    for (int i = 0; i < NUM_MODULES; i++) begin
      if (mem[i].ad_oe) bus.ad = bus.ad | mem[i].ad;
      bus.adok    = bus.adok    | mem[i].adok;
      bus.doutc   = bus.doutc   | mem[i].doutc;
      bus.oflo    = bus.oflo    | mem[i].oflo;
      bus.par_err = bus.par_err | mem[i].par_err;
      ad_drivers[i] = mem[i].ad_oe;
    end
  end

  logic [NUM_MODULES-1:0] adok_drivers;
  always_comb
    for (int i = 0; i < NUM_MODULES; i++) adok_drivers[i] = mem[i].adok;

  always_comb begin
    if (rst_n) begin
      a_one_ad_driver: assert final ($onehot0(ad_drivers))
        else $error("acmb_bus: AD lines driven by more than one station");
      a_one_adok: assert final ($onehot0(adok_drivers))
        else $error("acmb_bus: ADOK from more than one module");
    end
  end
endmodule
