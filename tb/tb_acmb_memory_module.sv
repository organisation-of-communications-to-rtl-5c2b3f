// tb_acmb_memory_module: self-checking test of one memory module.
//
// The testbench plays the control unit, driving the bus lines through the
// wired-OR bus model, and keeps a reference copy of the module's memory.
// It checks:
//   * ADOK only for addresses inside the module and valid cycle codes,
//   * WRITE then READ returns the data; CLEAR zeroes a location,
//   * DMM adds the modifying data; on overflow with OFLO ENB clear the
//     location keeps its value and OFLO is reported, with OFLO ENB set it
//     wraps and OFLO stays low,
//   * a word stored with a bad parity bit gives PAR ERR on READ and on the
//     read part of DMM,
//   * read data is on AD more than 25 ns before DOUTC, and DOUTC stays up
//     until DINC goes away,
//   * an operation abandoned after ADOK gives way to the next address part,
//   * INIT in the middle of an operation returns the module to idle.
module tb_acmb_memory_module;
  import acmb_pkg::*;

  localparam int unsigned CLK_NS = 10;
  localparam int unsigned MAB    = 8;
  localparam logic [AD_WIDTH-MAB-1:0] SEL = 16'h0003;

  logic           clk = 1'b0, rst_n = 1'b0, par_inject = 1'b0;
  acmb_ctrl_drv_t ctrl;
  acmb_mem_drv_t  mem [1];
  acmb_bus_t      bus;

  int checks = 0, failures = 0;

  acmb_memory_module #(.MOD_ADDR_BITS(MAB), .CLK_NS(CLK_NS)) dut (
    .clk, .rst_n, .module_sel(SEL), .par_inject, .bus, .drv(mem[0])
  );
  acmb_bus #(.NUM_MODULES(1)) u_bus (.rst_n, .ctrl, .mem, .bus);

  always #(CLK_NS/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time from the module putting read data on AD to DOUTC (1 unit = 1 ns)
  // (sampled at falling clock edges; the module changes them on rising edges)
  time                 t_mem_ad;
  int                  read_setup;
  logic [AD_WIDTH-1:0] p_ad;
  logic                p_oe, p_doutc;
  initial begin
    {p_ad, p_oe, p_doutc} = '0;
    t_mem_ad = 0;
    forever begin
      @(negedge clk);
      if (mem[0].ad != p_ad || mem[0].ad_oe != p_oe) t_mem_ad = $time;
      if (mem[0].doutc && !p_doutc && mem[0].ad_oe) read_setup = int'($time - t_mem_ad);
      {p_ad, p_oe, p_doutc} = {mem[0].ad, mem[0].ad_oe, mem[0].doutc};
    end
  end

  // One bus operation as the control unit runs it. adok=0 if no module
  // answered within 40 cycles.
  task automatic bus_op(input logic [2:0] code, input logic [AD_WIDTH-1:0] addr,
                        input logic [AD_WIDTH-1:0] data, input logic oenb,
                        output bit adok, output logic [AD_WIDTH-1:0] rdata,
                        output logic perr, output logic oflo,
                        input bit abandon = 0);
    int n;
    @(negedge clk);
    ctrl.ad = addr; ctrl.ad_oe = 1;
    {ctrl.c0, ctrl.c1, ctrl.clear} = code;
    ctrl.oflo_enb = oenb;
    repeat (3) @(negedge clk);
    ctrl.adstr = 1;
    n = 0;
    while (!bus.adok && n < 40) begin @(negedge clk); n++; end
    adok = bus.adok;
    // address off; WRITE and DMM data take its place at once
    ctrl.adstr = 0;
    if (adok && !abandon && (code == 3'b100 || code == 3'b110)) ctrl.ad = data;
    else begin ctrl.ad_oe = 0; ctrl.ad = '0; end
    rdata = '0; perr = 0; oflo = 0;
    if (!adok) begin
      {ctrl.c0, ctrl.c1, ctrl.clear} = '0;
      return;
    end
    while (bus.adok) @(negedge clk);
    if (abandon) begin  // give up after the address part, as after a time-out
      {ctrl.c0, ctrl.c1, ctrl.clear} = '0;
      return;
    end
    repeat (3) @(negedge clk);
    ctrl.dinc = 1;
    n = 0;
    while (!bus.doutc && n < 100) begin @(negedge clk); n++; end
    check(bus.doutc, "DOUTC answers DINC");
    rdata = bus.ad; perr = bus.par_err; oflo = bus.oflo;
    repeat (5) @(negedge clk);
    check(bus.doutc, "DOUTC held while DINC is up");
    ctrl.dinc = 0; ctrl.ad_oe = 0; ctrl.ad = '0;
    n = 0;
    while (bus.doutc && n < 100) begin @(negedge clk); n++; end
    check(!bus.doutc && !bus.par_err && !bus.oflo && !mem[0].ad_oe,
          "module releases the bus after DINC goes away");
    {ctrl.c0, ctrl.c1, ctrl.clear} = '0;
    ctrl.oflo_enb = 0;
  endtask

  localparam logic [2:0] RD = 3'b000, WR = 3'b100, DMM = 3'b110, CLR = 3'b001, BAD = 3'b010;

  function automatic logic [AD_WIDTH-1:0] in_mod(int unsigned w);
    return {SEL, MAB'(w)};
  endfunction

  logic [AD_WIDTH-1:0] model [int];

  initial begin
    bit ok;
    logic [AD_WIDTH-1:0] rd, d, a;
    logic pe, of;
    logic [AD_WIDTH:0] s;

    ctrl = '0;
    mem[0] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // addressing
    bus_op(RD, {SEL + 16'd1, 8'h00}, '0, 0, ok, rd, pe, of);
    check(!ok, "no ADOK for another module's address");
    bus_op(RD, {16'h0000, 8'h05}, '0, 0, ok, rd, pe, of);
    check(!ok, "no ADOK for module 0's address");
    bus_op(BAD, in_mod(5), '0, 0, ok, rd, pe, of);
    check(!ok, "no ADOK for the unused cycle code");

    // clear every location, then write/read
    for (int w = 0; w < 2**MAB; w++) begin
      bus_op(CLR, in_mod(w), '0, 0, ok, rd, pe, of);
      check(ok, "ADOK on CLEAR");
      model[w] = '0;
    end
    for (int i = 0; i < 60; i++) begin
      int unsigned w = $urandom_range(0, 2**MAB - 1);
      d = AD_WIDTH'($urandom);
      bus_op(WR, in_mod(w), d, 0, ok, rd, pe, of);
      check(ok, "ADOK on WRITE");
      model[w] = d;
    end
    for (int w = 0; w < 2**MAB; w += 3) begin
      bus_op(RD, in_mod(w), '0, 0, ok, rd, pe, of);
      check(ok && rd == model[w] && !pe && !of,
            $sformatf("READ %0d got %h want %h pe=%b", w, rd, model[w], pe));
      check(read_setup > 25, $sformatf("read data %0d ns before DOUTC", read_setup));
    end

    // DMM without overflow
    for (int i = 0; i < 40; i++) begin
      int unsigned w = $urandom_range(0, 2**MAB - 1);
      d = AD_WIDTH'($urandom_range(0, 1000));
      s = {1'b0, model[w]} + {1'b0, d};
      bus_op(DMM, in_mod(w), d, s[AD_WIDTH] ? 1'b1 : 1'b0, ok, rd, pe, of);
      model[w] = s[AD_WIDTH-1:0];
      check(ok && !pe && !of, "DMM without OFLO");
      bus_op(RD, in_mod(w), '0, 0, ok, rd, pe, of);
      check(rd == model[w], $sformatf("after DMM got %h want %h", rd, model[w]));
    end

    // DMM overflow, OFLO ENB clear: location restored, OFLO reported
    bus_op(WR, in_mod(7), 24'hFF_FFF0, 0, ok, rd, pe, of);
    bus_op(DMM, in_mod(7), 24'h00_0020, 0, ok, rd, pe, of);
    check(ok && of && !pe, "OFLO on overflow with OFLO ENB clear");
    bus_op(RD, in_mod(7), '0, 0, ok, rd, pe, of);
    check(rd == 24'hFF_FFF0 && !of, "location keeps its value after OFLO");
    // DMM overflow, OFLO ENB set: wraps, no OFLO
    bus_op(DMM, in_mod(7), 24'h00_0020, 1, ok, rd, pe, of);
    check(ok && !of, "no OFLO with OFLO ENB set");
    bus_op(RD, in_mod(7), '0, 0, ok, rd, pe, of);
    check(rd == 24'h00_0010, $sformatf("location wrapped to %h", rd));
    // the OFLO ENB latch lasts one operation only
    bus_op(WR, in_mod(8), 24'hFF_FFFF, 0, ok, rd, pe, of);
    bus_op(DMM, in_mod(8), 24'h00_0001, 0, ok, rd, pe, of);
    check(of, "OFLO ENB latched afresh at each ADSTR");

    // parity
    par_inject = 1;
    bus_op(WR, in_mod(9), 24'h12_3456, 0, ok, rd, pe, of);
    par_inject = 0;
    bus_op(RD, in_mod(9), '0, 0, ok, rd, pe, of);
    check(pe && rd == 24'h12_3456, "PAR ERR on READ of a bad word");
    bus_op(DMM, in_mod(9), 24'h1, 0, ok, rd, pe, of);
    check(pe, "PAR ERR on the read part of DMM");
    bus_op(RD, in_mod(9), '0, 0, ok, rd, pe, of);
    check(!pe && rd == 24'h12_3457, "DMM rewrote the word with good parity");

    // an operation abandoned after ADOK: the next address part takes over
    bus_op(WR, in_mod(20), 24'h0B_ADBA, 0, ok, rd, pe, of, 1);
    check(ok, "ADOK on the abandoned WRITE");
    bus_op(RD, in_mod(21), '0, 0, ok, rd, pe, of);
    check(ok && rd == model[21] && !pe, "READ after an abandoned operation");
    bus_op(WR, in_mod(22), 24'h0B_ADBA, 0, ok, rd, pe, of, 1);
    bus_op(RD, {SEL + 16'd1, 8'h00}, '0, 0, ok, rd, pe, of);
    check(!ok, "another module's address part releases an abandoned operation");
    bus_op(RD, in_mod(22), '0, 0, ok, rd, pe, of);
    check(ok && rd == model[22], "abandoned WRITE left the location alone");

    // INIT in the middle of an operation
    @(negedge clk);
    ctrl.ad = in_mod(3); ctrl.ad_oe = 1;
    repeat (3) @(negedge clk);
    ctrl.adstr = 1;
    repeat (10) @(negedge clk);
    check(bus.adok, "ADOK before INIT");
    ctrl.init = 1;  // ADSTR stays up: only INIT can drop ADOK now
    repeat (110) @(negedge clk);
    check(!bus.adok && !bus.doutc && !mem[0].ad_oe, "INIT releases every line");
    ctrl = '0;
    repeat (5) @(negedge clk);
    bus_op(RD, in_mod(3), '0, 0, ok, rd, pe, of);
    check(ok && rd == model[3], "operation after INIT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
