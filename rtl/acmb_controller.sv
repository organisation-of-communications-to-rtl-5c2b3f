// acmb_controller: the memory control unit's end of the auxiliary memory bus.
//
// A host (in the real system, the CAMAC side of the control unit) hands over
// one request at a time: a cycle type (READ, WRITE, CLEAR or DIRECT MEMORY
// MODIFY), a 24-bit address, 24 bits of write or modifying data and the
// overflow-enable bit. The controller then runs one bus operation:
//
//   1. address part: drive the address on AD and the cycle type on C0, C1,
//      CLEAR and OFLO ENB; after more than SETUP_NS raise ADSTR; wait for
//      ADOK from the addressed module; drop ADSTR and take the address off
//      AD (for WRITE and DMM the data replaces it at once, for READ and
//      CLEAR AD is released); wait for ADOK to go away. No ADOK within
//      TIMEOUT_NS ends the operation with rsp_timeout.
//   2. data part: more than SETUP_NS after ADOK went away raise DINC; wait
//      for DOUTC. On the leading edge of
//      DOUTC latch AD (read data), PAR ERR and OFLO and drop DINC and AD; the
//      operation ends when the module removes DOUTC.
//
// C0, C1, CLEAR and OFLO ENB stay valid for the whole operation. An INIT
// pulse longer than INIT_NS goes out after reset and on init_req; init_req
// during an operation abandons it (no response is given for it), so INIT
// also recovers from a module that never answers DINC.
//
// Interface: req_valid/req_ready handshake (a request is taken in a cycle
// where both are 1); rsp_valid pulses for one cycle with the results. Bus
// lines come in as the resolved acmb_bus_t and go out as acmb_ctrl_drv_t.
// ADOK and DOUTC pass through a STAGES-deep synchroniser, since the memory
// modules run from their own clocks.
//
// From the bus specification: the order of events, data following the
// address directly on WRITE and DMM (its WRITE and DMM timing diagrams), AD
// released for READ, the >25 ns set-up before each strobe, INIT longer than 1 us, a time-out on ADOK, DOUTC's leading
// edge as the read-data strobe. This design's own: the clock (CLK_NS), the
// time-out length, the host interface, no time-out on DOUTC (the
// specification asks for one on ADOK only), and INIT abandoning an operation.
module acmb_controller
  import acmb_pkg::*;
#(
  parameter int unsigned CLK_NS      = 10,
  parameter int unsigned SETUP_NS    = 25,
  parameter int unsigned INIT_NS     = 1000,
  parameter int unsigned TIMEOUT_NS  = 2000,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // host side
  input  logic                req_valid,
  output logic                req_ready,
  input  acmb_cmd_e           req_cmd,
  input  logic [AD_WIDTH-1:0] req_addr,
  input  logic [AD_WIDTH-1:0] req_data,
  input  logic                req_oflo_enb,
  input  logic                init_req,
  output logic                rsp_valid,
  output logic [AD_WIDTH-1:0] rsp_data,
  output logic                rsp_par_err,
  output logic                rsp_oflo,
  output logic                rsp_timeout,
  output logic                busy,
  // bus side
  input  acmb_bus_t           bus,
  output acmb_ctrl_drv_t      drv
);
  localparam int unsigned SETUP_CYC   = cycles_over(SETUP_NS, CLK_NS);
  localparam int unsigned INIT_CYC    = cycles_over(INIT_NS, CLK_NS);
  localparam int unsigned TIMEOUT_CYC = TIMEOUT_NS / CLK_NS;
  localparam int unsigned CW = $clog2(INIT_CYC + TIMEOUT_CYC + SETUP_CYC + 1);

  typedef enum logic [2:0] {
    S_INIT,       // INIT on the bus
    S_IDLE,
    S_ASETUP,     // address on AD, waiting out the set-up time
    S_WADOK,      // ADSTR up, waiting for ADOK
    S_WADOK_OFF,  // ADSTR down, waiting for ADOK to go away
    S_DSETUP,     // data on AD (WRITE, DMM), waiting out the set-up time
    S_WDOUTC,     // DINC up, waiting for DOUTC
    S_WDOUTC_OFF  // DINC down, waiting for DOUTC to go away
  } state_e;

  state_e              state;
  logic [CW-1:0]       cnt;
  acmb_cmd_e           cmd;
  logic [AD_WIDTH-1:0] data;
  logic                adok_s, doutc_s;

  acmb_sync #(.STAGES(SYNC_STAGES)) u_sync_adok  (.clk, .rst_n, .d(bus.adok),  .q(adok_s));
  acmb_sync #(.STAGES(SYNC_STAGES)) u_sync_doutc (.clk, .rst_n, .d(bus.doutc), .q(doutc_s));

  assign req_ready = (state == S_IDLE) && !init_req;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      cnt         <= CW'(INIT_CYC - 1);
      cmd         <= CMD_READ;
      data        <= '0;
      drv         <= '0;
      drv.init    <= 1'b1;
      rsp_valid   <= 1'b0;
      rsp_data    <= '0;
      rsp_par_err <= 1'b0;
      rsp_oflo    <= 1'b0;
      rsp_timeout <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (init_req && state != S_INIT) begin
        // INIT, also cutting short an operation in progress (no response)
        drv      <= '0;
        drv.init <= 1'b1;
        cnt      <= CW'(INIT_CYC - 1);
        state    <= S_INIT;
      end else unique case (state)
        S_INIT: begin
          if (cnt == 0) begin
            drv.init <= 1'b0;
            state    <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_IDLE: begin
          if (req_valid) begin
            cmd          <= req_cmd;
            data         <= req_data;
            drv.ad       <= req_addr;
            drv.ad_oe    <= 1'b1;
            {drv.c0, drv.c1, drv.clear} <= cmd_to_lines(req_cmd);
            drv.oflo_enb <= req_oflo_enb;
            cnt          <= CW'(SETUP_CYC - 1);
            state        <= S_ASETUP;
          end
        end
        S_ASETUP: begin
          if (cnt == 0) begin
            drv.adstr <= 1'b1;
            cnt       <= CW'(TIMEOUT_CYC - 1);
            state     <= S_WADOK;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WADOK: begin
          if (adok_s) begin
            // the address goes; WRITE and DMM data take its place at once
            drv.adstr <= 1'b0;
            if (cmd == CMD_WRITE || cmd == CMD_DMM) begin
              drv.ad    <= data;
            end else begin
              drv.ad_oe <= 1'b0;
              drv.ad    <= '0;
            end
            state     <= S_WADOK_OFF;
          end else if (cnt == 0) begin
            // nobody answered: give up and release the bus
            drv         <= '0;
            rsp_valid   <= 1'b1;
            rsp_data    <= '0;
            rsp_par_err <= 1'b0;
            rsp_oflo    <= 1'b0;
            rsp_timeout <= 1'b1;
            state       <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WADOK_OFF: begin
          if (!adok_s) begin
            cnt   <= CW'(SETUP_CYC - 1);
            state <= S_DSETUP;
          end
        end
        S_DSETUP: begin
          if (cnt == 0) begin
            drv.dinc <= 1'b1;
            state    <= S_WDOUTC;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WDOUTC: begin
          if (doutc_s) begin
            rsp_data    <= (cmd == CMD_READ) ? bus.ad : '0;
            rsp_par_err <= bus.par_err;
            rsp_oflo    <= bus.oflo;
            rsp_timeout <= 1'b0;
            drv.dinc    <= 1'b0;
            drv.ad_oe   <= 1'b0;
            drv.ad      <= '0;
            state       <= S_WDOUTC_OFF;
          end
        end
        S_WDOUTC_OFF: begin
          if (!doutc_s) begin
            drv       <= '0;
            rsp_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The strobes of one operation never overlap: DINC only after ADSTR is
  // gone, and the address lines are never driven while DINC waits for a READ.
  a_strobes_apart: assert property (@(posedge clk) disable iff (!rst_n)
    !(drv.adstr && drv.dinc));
  a_read_ad_free: assert property (@(posedge clk) disable iff (!rst_n)
    (drv.dinc && cmd == CMD_READ) |-> !drv.ad_oe);
endmodule
