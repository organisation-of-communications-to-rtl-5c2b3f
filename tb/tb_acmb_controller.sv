// tb_acmb_controller: self-checking test of the control unit's bus master.
//
// The testbench plays the memory module: it answers ADSTR with ADOK and
// DINC with DOUTC after random delays, keeps its own copy of memory, and
// records what it saw on the lines. It checks:
//   * the INIT pulse after reset and after init_req lasts more than 1 us,
//   * the cycle-type code on C0, C1, CLEAR and OFLO ENB for every operation,
//   * the address on AD at ADSTR and the data on AD at DINC (WRITE, DMM),
//   * AD set up for more than 25 ns before ADSTR and before DINC, and DINC
//     more than 25 ns after ADOK went away,
//   * that the AD lines are free during the data part of a READ,
//   * read data, PAR ERR and OFLO are handed to the host,
//   * a missing ADOK ends in a time-out after TIMEOUT_NS,
//   * init_req during an operation abandons it for an INIT pulse.
module tb_acmb_controller;
  import acmb_pkg::*;

  localparam int unsigned CLK_NS     = 10;
  localparam int unsigned TIMEOUT_NS = 2000;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                req_valid = 1'b0, req_ready, req_oflo_enb = 1'b0, init_req = 1'b0;
  acmb_cmd_e           req_cmd = CMD_READ;
  logic [AD_WIDTH-1:0] req_addr = '0, req_data = '0;
  logic                rsp_valid, rsp_par_err, rsp_oflo, rsp_timeout, busy;
  logic [AD_WIDTH-1:0] rsp_data;
  acmb_bus_t           bus;
  acmb_ctrl_drv_t      drv;
  acmb_mem_drv_t       mem [1];

  int checks = 0, failures = 0;

  acmb_controller #(.CLK_NS(CLK_NS), .TIMEOUT_NS(TIMEOUT_NS)) dut (.*);
  acmb_bus #(.NUM_MODULES(1)) u_bus (.rst_n, .ctrl(drv), .mem, .bus);

  always #(CLK_NS/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- responder: a behavioural memory module ----------------
  logic [AD_WIDTH-1:0] model [logic [AD_WIDTH-1:0]];
  bit                  respond = 1;     // 0: never give ADOK
  bit                  force_perr = 0;
  bit                  force_oflo = 0;
  logic [AD_WIDTH-1:0] seen_addr, seen_data;
  logic [2:0]          seen_lines;
  logic                seen_oflo_enb;
  int                  adok_gap_cycles;    // cycles from ADOK off to DINC
  int                  ad_setup_adstr, ad_setup_dinc;  // ns
  bit                  read_ad_driven;

  // Sample the lines at every falling clock edge (the controller changes
  // them on rising edges), time-stamp each change of AD and of ADOK, and
  // measure the set-up at each strobe's leading edge (1 time unit = 1 ns).
  time                 t_ad_change, t_adok_off;
  logic [AD_WIDTH-1:0] p_ad;
  logic                p_oe, p_adstr, p_dinc, p_adok;
  initial begin
    {p_ad, p_oe, p_adstr, p_dinc, p_adok} = '0;
    t_ad_change = 0;
    t_adok_off  = 0;
    forever begin
      @(negedge clk);
      if (drv.ad != p_ad || drv.ad_oe != p_oe) t_ad_change = $time;
      if (p_adok && !bus.adok) t_adok_off = $time;
      if (drv.adstr && !p_adstr) ad_setup_adstr = int'($time - t_ad_change);
      if (drv.dinc && !p_dinc) begin
        ad_setup_dinc   = int'($time - t_ad_change);
        adok_gap_cycles = int'($time - t_adok_off) / CLK_NS;
      end
      {p_ad, p_oe, p_adstr, p_dinc, p_adok} = {drv.ad, drv.ad_oe, drv.adstr, drv.dinc, bus.adok};
    end
  end

  initial begin
    mem[0] = '0;
    forever begin
      @(posedge clk);
      if (drv.adstr && respond) begin
        seen_addr      = bus.ad;
        seen_lines     = {bus.c0, bus.c1, bus.clear};
        seen_oflo_enb  = bus.oflo_enb;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        mem[0].adok = 1;
        wait (!drv.adstr);
        check(seen_lines[2] ? (drv.ad_oe && drv.ad == req_data) : !drv.ad_oe,
              "address removed with ADSTR (WRITE/DMM: data in its place)");
        repeat ($urandom_range(0, 4)) @(posedge clk);
        mem[0].adok = 0;
        while (!drv.dinc) @(posedge clk);
        seen_data = bus.ad;
        read_ad_driven = drv.ad_oe;
        repeat ($urandom_range(0, 6)) @(posedge clk);
        if (seen_lines == 3'b000) begin
          mem[0].ad    = model.exists(seen_addr) ? model[seen_addr] : '0;
          mem[0].ad_oe = 1;
        end else if (seen_lines == 3'b100) begin
          model[seen_addr] = seen_data;
        end
        mem[0].par_err = force_perr;
        mem[0].oflo    = force_oflo;
        repeat (3) @(posedge clk);
        mem[0].doutc = 1;
        wait (!drv.dinc);
        repeat ($urandom_range(0, 4)) @(posedge clk);
        mem[0] = '0;
      end
    end
  end

  // ---------------- host side ----------------
  task automatic do_op(input acmb_cmd_e cmd, input logic [AD_WIDTH-1:0] addr,
                       input logic [AD_WIDTH-1:0] data, input logic oenb,
                       output int cycles);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_cmd = cmd; req_addr = addr; req_data = data; req_oflo_enb = oenb;
    @(negedge clk);
    req_valid = 0;
    cycles = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      cycles++;
      if (cycles > 10000) break;
    end
  endtask

  task automatic check_init_pulse(input string when, input int already);
    int n = already;
    while (!drv.init) @(posedge clk);
    while (drv.init) begin
      @(posedge clk);
      n++;
    end
    check(n * CLK_NS > 1000, $sformatf("INIT %s lasted %0d ns", when, n * CLK_NS));
  endtask

  initial begin
    logic [AD_WIDTH-1:0] a, d;
    int cyc;
    acmb_cmd_e cmds[4] = '{CMD_READ, CMD_WRITE, CMD_DMM, CMD_CLEAR};
    logic [2:0] code[4] = '{3'b000, 3'b100, 3'b110, 3'b001};

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(drv.init, "INIT after reset");
    check_init_pulse("after reset", 1);  // one cycle already seen above

    // write then read back a set of locations
    for (int i = 0; i < 20; i++) begin
      a = AD_WIDTH'($urandom);
      d = AD_WIDTH'($urandom);
      do_op(CMD_WRITE, a, d, 0, cyc);
      check(seen_lines == 3'b100, "WRITE code on C0 C1 CLEAR");
      check(seen_addr == a, "WRITE address at ADSTR");
      check(seen_data == d, "WRITE data at DINC");
      check(ad_setup_adstr > 25, "address set-up before ADSTR");
      check(ad_setup_dinc > 25, "data set-up before DINC");
      check(adok_gap_cycles * CLK_NS > 25, "DINC more than 25 ns after ADOK removal");
      check(!rsp_timeout, "no time-out on WRITE");
      do_op(CMD_READ, a, '0, 0, cyc);
      check(seen_lines == 3'b000, "READ code on C0 C1 CLEAR");
      check(!read_ad_driven, "AD free in the data part of READ");
      check(rsp_data == d, $sformatf("READ data %h want %h", rsp_data, d));
    end

    // each cycle type's code and the OFLO ENB line
    for (int k = 0; k < 4; k++) begin
      for (int oe = 0; oe < 2; oe++) begin
        do_op(cmds[k], 24'h00_1234, 24'h00_0005, oe[0], cyc);
        check(seen_lines == code[k], $sformatf("code for cmd %0d", k));
        check(seen_oflo_enb == oe[0], "OFLO ENB line");
      end
    end

    // status from the module reaches the host
    force_perr = 1;
    do_op(CMD_READ, 24'h00_0010, '0, 0, cyc);
    check(rsp_par_err && !rsp_oflo, "PAR ERR reported");
    force_perr = 0; force_oflo = 1;
    do_op(CMD_DMM, 24'h00_0010, 24'h1, 0, cyc);
    check(rsp_oflo && !rsp_par_err, "OFLO reported");
    check(seen_data == 24'h1, "DMM modifying data at DINC");
    force_oflo = 0;
    do_op(CMD_READ, 24'h00_0010, '0, 0, cyc);
    check(!rsp_oflo && !rsp_par_err, "status clear on a clean cycle");

    // time-out when nobody answers
    respond = 0;
    do_op(CMD_READ, 24'hFF_0000, '0, 0, cyc);
    check(rsp_timeout, "time-out reported");
    check(cyc * CLK_NS >= TIMEOUT_NS && cyc * CLK_NS < TIMEOUT_NS + 200,
          $sformatf("time-out after %0d ns", cyc * CLK_NS));
    check(!drv.adstr && !drv.ad_oe, "bus released after time-out");
    respond = 1;
    do_op(CMD_READ, a, '0, 0, cyc);
    check(!rsp_timeout && rsp_data == d, "operation after a time-out");

    // INIT on request
    @(negedge clk);
    init_req = 1;
    @(negedge clk);
    init_req = 0;
    check_init_pulse("on request", 0);

    // INIT abandons an operation that is waiting for ADOK
    respond = 0;
    @(negedge clk);
    req_valid = 1; req_cmd = CMD_READ; req_addr = 24'h00_0001;
    @(negedge clk);
    req_valid = 0;
    repeat (20) @(negedge clk);
    check(drv.adstr, "operation waiting for ADOK");
    init_req = 1;
    @(negedge clk);
    init_req = 0;
    #1;
    check(drv.init && !drv.adstr && !drv.ad_oe, "INIT replaces the operation on the bus");
    cyc = 0;
    while (busy) begin
      @(negedge clk);
      cyc++;
      check(!rsp_valid, "no response for an abandoned operation");
    end
    check(cyc * CLK_NS > 1000, "INIT after abandoning lasts over 1 us");
    respond = 1;
    do_op(CMD_READ, a, '0, 0, cyc);
    check(!rsp_timeout && rsp_data == d, "operation after an abandoned one");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
