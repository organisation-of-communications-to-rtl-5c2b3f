// tb_acmb_top: end-to-end test of the whole bus system at its default size
// (one control unit, four memory modules of 64K words, 24-bit bus).
//
// The control unit and each module run from clocks of the same period but
// different phase. The host side issues a mix of operations that a
// histogramming memory sees: locations are cleared, written, read, and
// incremented with DIRECT MEMORY MODIFY, spread over all four modules. A
// reference model in the testbench predicts every read, every OFLO and every
// PAR ERR. The test also makes each mechanism of the bus happen and counts
// it: ADOK time-out on an unpopulated address, DMM overflow with the
// location restored (OFLO ENB clear) and with wrap-round (OFLO ENB set),
// parity error on READ and on DMM, INIT. A mechanism that never happened
// counts as a failure.
//
// Rate: the bus is meant to carry more than 2 x 10^6 transfers per second.
// The test times a run of back-to-back READs and back-to-back WRITEs and
// requires each to average no more than 500 ns per operation. Every DOUTC
// pulse must last at least 50 ns.
module tb_acmb_top;
  import acmb_pkg::*;

  localparam int unsigned NMOD = 4;
  localparam int unsigned MAB  = 16;
  localparam int unsigned NLOC = 48;  // locations used per module

  logic                clk_ctrl = 1'b0, rst_n = 1'b0;
  logic [NMOD-1:0]     clk_mem = '0;
  logic                req_valid = 1'b0, req_ready, req_oflo_enb = 1'b0, init_req = 1'b0;
  acmb_cmd_e           req_cmd = CMD_READ;
  logic [AD_WIDTH-1:0] req_addr = '0, req_data = '0;
  logic                rsp_valid, rsp_par_err, rsp_oflo, rsp_timeout, busy;
  logic [AD_WIDTH-1:0] rsp_data;
  logic [NMOD-1:0]     par_inject = '0;
  acmb_bus_t           bus;

  acmb_top dut (.*);

  always #5 clk_ctrl = ~clk_ctrl;
  // each module's clock: same period, its own phase (2, 4, 6, 8 ns late)
  for (genvar i = 0; i < NMOD; i++) begin : g_clk
    initial begin
      #(2 * (i + 1));
      forever #5 clk_mem[i] = ~clk_mem[i];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk_ctrl);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_read, n_write, n_clear, n_dmm, n_oflo_restore, n_oflo_wrap,
      n_perr_read, n_perr_dmm, n_timeout, n_init, n_modules_hit;
  bit hit [NMOD];

  // shortest DOUTC pulse seen on the bus (the specification calls 50 ns
  // sufficient for the data transfer), sampled every nanosecond
  int doutc_min = 1 << 30;
  initial begin
    int w = 0;
    forever begin
      #1;
      if (bus.doutc && rst_n) w++;
      else if (w != 0) begin
        if (w < doutc_min) doutc_min = w;
        w = 0;
      end
    end
  end

  // reference model: word and "stored with bad parity" flag per address
  logic [AD_WIDTH-1:0] model [int];
  bit                  bad_par [int];

  function automatic logic [AD_WIDTH-1:0] addr_of(int m, int w);
    return {(AD_WIDTH-MAB)'(m), MAB'(w * 1021)};  // spread over the module
  endfunction

  task automatic op(input acmb_cmd_e cmd, input logic [AD_WIDTH-1:0] addr,
                    input logic [AD_WIDTH-1:0] data, input logic oenb,
                    input logic inject, output int cycles);
    int m = int'(addr[AD_WIDTH-1:MAB]);
    @(negedge clk_ctrl);
    while (!req_ready) @(negedge clk_ctrl);
    req_valid = 1; req_cmd = cmd; req_addr = addr; req_data = data; req_oflo_enb = oenb;
    if (m < NMOD) par_inject[m] = inject;
    @(negedge clk_ctrl);
    req_valid = 0;
    cycles = 1;
    while (!rsp_valid && cycles < 2000) begin
      @(negedge clk_ctrl);
      cycles++;
    end
    par_inject = '0;
    check(rsp_valid, "operation finished");
  endtask

  // Run one operation and check its result against the model.
  task automatic op_checked(input acmb_cmd_e cmd, input int m, input int w,
                            input logic [AD_WIDTH-1:0] data, input logic oenb,
                            input logic inject);
    logic [AD_WIDTH-1:0] a = addr_of(m, w);
    int key = int'(a);
    int cyc;
    logic [AD_WIDTH:0] s;
    op(cmd, a, data, oenb, inject, cyc);
    check(!rsp_timeout, "no time-out on a populated address");
    if (!hit[m]) begin hit[m] = 1; n_modules_hit++; end
    unique case (cmd)
      CMD_CLEAR: begin
        model[key] = '0; bad_par[key] = inject;
        n_clear++;
        check(!rsp_par_err && !rsp_oflo, "CLEAR status");
      end
      CMD_WRITE: begin
        model[key] = data; bad_par[key] = inject;
        n_write++;
        check(!rsp_par_err && !rsp_oflo, "WRITE status");
      end
      CMD_READ: begin
        n_read++;
        check(rsp_data == model[key], $sformatf("READ %h got %h want %h", a, rsp_data, model[key]));
        check(rsp_par_err == bad_par[key], "READ PAR ERR");
        if (rsp_par_err) n_perr_read++;
        check(!rsp_oflo, "READ never reports OFLO");
      end
      CMD_DMM: begin
        n_dmm++;
        s = {1'b0, model[key]} + {1'b0, data};
        check(rsp_par_err == bad_par[key], "DMM PAR ERR on its read part");
        if (rsp_par_err) n_perr_dmm++;
        if (s[AD_WIDTH] && !oenb) begin
          check(rsp_oflo, "OFLO on overflow with OFLO ENB clear");
          n_oflo_restore++;
        end else begin
          check(!rsp_oflo, "no OFLO");
          if (s[AD_WIDTH]) n_oflo_wrap++;
          model[key] = s[AD_WIDTH-1:0];
          bad_par[key] = inject;
        end
      end
      default: ;
    endcase
  endtask

  initial begin
    int cyc, t0, t1, m, w, r;
    logic [AD_WIDTH-1:0] d;

    repeat (3) @(posedge clk_ctrl);
    rst_n = 1;
    while (busy) @(posedge clk_ctrl);  // power-on INIT
    n_init++;

    // clear the working set in every module
    for (m = 0; m < NMOD; m++)
      for (w = 0; w < NLOC; w++)
        op_checked(CMD_CLEAR, m, w, '0, 0, 0);

    // rate: back-to-back WRITEs, then back-to-back READs
    t0 = int'($time);
    for (w = 0; w < NLOC; w++) op_checked(CMD_WRITE, 1, w, AD_WIDTH'($urandom), 0, 0);
    t1 = int'($time);
    check((t1 - t0) / NLOC <= 500, $sformatf("WRITE takes %0d ns per operation", (t1 - t0) / NLOC));
    $display("rate: %0d ns per WRITE", (t1 - t0) / NLOC);
    t0 = int'($time);
    for (w = 0; w < NLOC; w++) op_checked(CMD_READ, 1, w, '0, 0, 0);
    t1 = int'($time);
    check((t1 - t0) / NLOC <= 500, $sformatf("READ takes %0d ns per operation", (t1 - t0) / NLOC));
    $display("rate: %0d ns per READ (%0d.%0d MHz)", (t1 - t0) / NLOC,
             1000 * NLOC / (t1 - t0), (10000 * NLOC / (t1 - t0)) % 10);

    // random mix, histogramming-like (mostly DMM increments)
    for (int i = 0; i < 1500; i++) begin
      m = $urandom_range(0, NMOD - 1);
      w = $urandom_range(0, NLOC - 1);
      r = $urandom_range(0, 99);
      if (r < 50)       op_checked(CMD_DMM,   m, w, AD_WIDTH'($urandom_range(1, 3)), 0, 0);
      else if (r < 60)  op_checked(CMD_DMM,   m, w, AD_WIDTH'($urandom), r[0], 0);
      else if (r < 75)  op_checked(CMD_READ,  m, w, '0, 0, 0);
      else if (r < 88)  op_checked(CMD_WRITE, m, w, AD_WIDTH'($urandom), 0, r == 80);
      else if (r < 93)  op_checked(CMD_WRITE, m, w, 24'hFF_FFFF - AD_WIDTH'($urandom_range(0, 2)), 0, 0);
      else              op_checked(CMD_CLEAR, m, w, '0, 0, 0);
    end

    // make sure each overflow case and each parity case happened
    op_checked(CMD_WRITE, 2, 0, 24'hFF_FFFE, 0, 0);
    op_checked(CMD_DMM,   2, 0, 24'h00_0005, 0, 0);  // restored, OFLO
    op_checked(CMD_READ,  2, 0, '0, 0, 0);
    op_checked(CMD_DMM,   2, 0, 24'h00_0005, 1, 0);  // wraps
    op_checked(CMD_READ,  2, 0, '0, 0, 0);
    op_checked(CMD_WRITE, 3, 1, 24'h0A_0A0A, 0, 1);  // stored with bad parity
    op_checked(CMD_READ,  3, 1, '0, 0, 0);
    op_checked(CMD_DMM,   3, 1, 24'h00_0001, 0, 0);
    op_checked(CMD_READ,  3, 1, '0, 0, 0);

    // time-out: an address beyond the populated modules
    op(CMD_READ, {(AD_WIDTH-MAB)'(NMOD), MAB'(0)}, '0, 0, 0, cyc);
    check(rsp_timeout, "time-out on an unpopulated address");
    if (rsp_timeout) n_timeout++;
    op(CMD_WRITE, 24'hFF_FFFF, 24'h1, 0, 0, cyc);
    check(rsp_timeout, "time-out at the top of the address space");
    if (rsp_timeout) n_timeout++;

    // INIT on request, then carry on
    @(negedge clk_ctrl);
    init_req = 1;
    @(negedge clk_ctrl);
    init_req = 0;
    check(bus.init || busy, "INIT started");
    while (busy) @(posedge clk_ctrl);
    n_init++;
    for (m = 0; m < NMOD; m++) op_checked(CMD_READ, m, 5, '0, 0, 0);

    $display("READ %0d WRITE %0d CLEAR %0d DMM %0d | OFLO restore %0d wrap %0d | PAR ERR read %0d dmm %0d | time-out %0d INIT %0d modules %0d",
             n_read, n_write, n_clear, n_dmm, n_oflo_restore, n_oflo_wrap,
             n_perr_read, n_perr_dmm, n_timeout, n_init, n_modules_hit);
    check(n_read > 0,          "READ happened");
    check(n_write > 0,         "WRITE happened");
    check(n_clear > 0,         "CLEAR happened");
    check(n_dmm > 0,           "DMM happened");
    check(n_oflo_restore > 0,  "overflow with restore happened");
    check(n_oflo_wrap > 0,     "overflow with wrap happened");
    check(n_perr_read > 0,     "PAR ERR on READ happened");
    check(n_perr_dmm > 0,      "PAR ERR on DMM happened");
    check(n_timeout > 0,       "ADOK time-out happened");
    check(n_init > 1,          "INIT on request happened");
    check(n_modules_hit == NMOD, "every module was addressed");
    check(doutc_min >= 50, $sformatf("shortest DOUTC %0d ns", doutc_min));
    $display("shortest DOUTC pulse: %0d ns", doutc_min);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
