// acmb_top: a complete auxiliary CAMAC memory bus system.
//
// One memory control unit and NUM_MODULES memory modules share the bus: 24
// time-multiplexed address/data lines and the control/status lines C0, C1,
// CLEAR, OFLO ENB, OFLO, PAR ERR, INIT, ADSTR, ADOK, DINC and DOUTC. The
// 24-bit bus address is split into a module number (upper bits) and a word
// within the module (lower MOD_ADDR_BITS bits); module i answers module
// number i. With the default 4 modules of 64K words the populated space is
// 0x000000-0x03FFFF; an operation to any other address gets no ADOK and ends
// in the controller's time-out.
//
// The control unit and each module run from clocks of their own (clk_ctrl,
// clk_mem[i]), as the bus is an interlocked handshake with no common clock;
// all are nominally CLK_NS but need not be in phase.
// Assertions watch the handshake order on the resolved bus: ADOK only
// while ADSTR is up, DINC only after ADOK has gone and never with ADSTR,
// DOUTC only while DINC is up.
// Host requests and responses follow acmb_controller; par_inject[i] is
// module i's parity-fault test input; bus shows the resolved lines.
// The module count and size are this design's choice: the bus specification
// allows up to 16M locations of up to 24 bits and leaves module capacity to
// the implementer.
module acmb_top
  import acmb_pkg::*;
#(
  parameter int unsigned NUM_MODULES   = 4,
  parameter int unsigned MOD_ADDR_BITS = 16,
  parameter int unsigned CLK_NS        = 10,
  parameter int unsigned TIMEOUT_NS    = 2000
) (
  input  logic                   clk_ctrl,
  input  logic [NUM_MODULES-1:0] clk_mem,
  input  logic                   rst_n,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  acmb_cmd_e              req_cmd,
  input  logic [AD_WIDTH-1:0]    req_addr,
  input  logic [AD_WIDTH-1:0]    req_data,
  input  logic                   req_oflo_enb,
  input  logic                   init_req,
  output logic                   rsp_valid,
  output logic [AD_WIDTH-1:0]    rsp_data,
  output logic                   rsp_par_err,
  output logic                   rsp_oflo,
  output logic                   rsp_timeout,
  output logic                   busy,
  input  logic [NUM_MODULES-1:0] par_inject,
  output acmb_bus_t              bus
);
  acmb_ctrl_drv_t ctrl_drv;
  acmb_mem_drv_t  mem_drv [NUM_MODULES];

  acmb_controller #(.CLK_NS(CLK_NS), .TIMEOUT_NS(TIMEOUT_NS)) u_ctrl (
    .clk(clk_ctrl), .rst_n,
    .req_valid, .req_ready, .req_cmd, .req_addr, .req_data, .req_oflo_enb,
    .init_req, .rsp_valid, .rsp_data, .rsp_par_err, .rsp_oflo, .rsp_timeout,
    .busy, .bus, .drv(ctrl_drv)
  );

  for (genvar i = 0; i < NUM_MODULES; i++) begin : g_mod
    acmb_memory_module #(.MOD_ADDR_BITS(MOD_ADDR_BITS), .CLK_NS(CLK_NS)) u_mod (
      .clk(clk_mem[i]), .rst_n,
      .module_sel((AD_WIDTH-MOD_ADDR_BITS)'(i)),
      .par_inject(par_inject[i]),
      .bus, .drv(mem_drv[i])
    );
  end

  acmb_bus #(.NUM_MODULES(NUM_MODULES)) u_bus (
    .rst_n, .ctrl(ctrl_drv), .mem(mem_drv), .bus
  );

  // Handshake rules of the bus, watched on the control unit's clock.
  a_strobes_apart: assert property (@(posedge clk_ctrl) disable iff (!rst_n || bus.init)
    !(bus.adstr && bus.dinc));
  a_adok_under_adstr: assert property (@(posedge clk_ctrl) disable iff (!rst_n || bus.init)
    $rose(bus.adok) |-> bus.adstr);
  a_doutc_under_dinc: assert property (@(posedge clk_ctrl) disable iff (!rst_n || bus.init)
    $rose(bus.doutc) |-> bus.dinc);
  a_dinc_after_adok: assert property (@(posedge clk_ctrl) disable iff (!rst_n || bus.init)
    $rose(bus.dinc) |-> !bus.adok);
endmodule
