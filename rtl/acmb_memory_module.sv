// acmb_memory_module: one "dumb" memory module on the auxiliary memory bus.
//
// The module holds 2**MOD_ADDR_BITS words of 24 data bits plus a parity bit
// and answers the control unit's bus operations:
//
//   * On the leading edge of ADSTR it latches the address from AD and the
//     cycle type from C0, C1, CLEAR and OFLO ENB. If the upper address bits
//     equal module_sel (the module's address switches) it raises ADOK and
//     drops it again when ADSTR goes away; other modules stay silent.
//   * On DINC it starts the memory cycle. WRITE stores the data on AD;
//     CLEAR stores zero; READ drives the stored word on AD; DIRECT MEMORY
//     MODIFY (DMM) reads the word, adds the modifying data taken from AD and
//     writes the sum back. When more than SETUP_NS have passed since its
//     outputs settled it raises DOUTC, and drops DOUTC and releases AD when
//     DINC goes away.
//   * PAR ERR goes up with DOUTC when the word read by a READ or by the read
//     part of a DMM fails its parity check.
//   * A DMM whose sum does not fit in 24 bits overflows. If OFLO ENB was set
//     for the operation the location wraps round; if not, the location keeps
//     its original value and OFLO goes up with DOUTC.
//   * A module that has given ADOK but sees a new ADSTR instead of DINC
//     drops the old operation and decodes the new address, so a module that
//     answered too late for the controller's time-out cannot take part in
//     the next operation's data part.
//   * INIT returns all control state to idle and clears the latched control
//     bits; it does not clear the array.
//
// ADSTR, DINC and INIT are synchronised into clk; AD and the control lines
// are stable whenever a synchronised strobe is acted on, as the bus
// specification requires them to be set up >25 ns before each strobe.
// par_inject is a test input: a word stored while it is 1 gets the wrong
// parity bit.
//
// From the bus specification: the cycle types and their code, the strobe
// order, ADOK only from the addressed module, the OFLO ENB latch, OFLO and
// PAR ERR meanings. This design's own: the module size and address decode,
// that DMM adds, odd parity, that CLEAR zeroes the addressed location, that
// INIT leaves the array alone, abandoning an operation on a new ADSTR, that
// a module ignores the unused cycle code (no ADOK), and the clock.
module acmb_memory_module
  import acmb_pkg::*;
#(
  parameter int unsigned MOD_ADDR_BITS = 16,
  parameter int unsigned CLK_NS        = 10,
  parameter int unsigned SETUP_NS      = 25,
  parameter int unsigned SYNC_STAGES   = 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [AD_WIDTH-MOD_ADDR_BITS-1:0] module_sel,
  input  logic                              par_inject,
  input  acmb_bus_t                         bus,
  output acmb_mem_drv_t                     drv
);
  localparam int unsigned SETUP_CYC = cycles_over(SETUP_NS, CLK_NS);
  localparam int unsigned CW        = $clog2(SETUP_CYC + 1);
  localparam int unsigned WORD_W    = AD_WIDTH + 1;  // parity in the top bit

  typedef enum logic [2:0] {
    S_IDLE,
    S_ACK,        // ADOK up, waiting for ADSTR to go away
    S_WDINC,      // waiting for DINC
    S_RD,         // read data from the array is valid
    S_OSETUP,     // outputs settled, waiting out the set-up time
    S_WDINC_OFF   // DOUTC up, waiting for DINC to go away
  } state_e;

  state_e                     state;
  logic [CW-1:0]              cnt;
  acmb_cmd_e                  cmd;
  logic                       oflo_enb_l;
  logic [MOD_ADDR_BITS-1:0]   addr;
  logic [AD_WIDTH-1:0]        mdata;
  logic                       adstr_s, adstr_d, dinc_s, init_s;

  acmb_sync #(.STAGES(SYNC_STAGES)) u_sync_adstr (.clk, .rst_n, .d(bus.adstr), .q(adstr_s));
  acmb_sync #(.STAGES(SYNC_STAGES)) u_sync_dinc  (.clk, .rst_n, .d(bus.dinc),  .q(dinc_s));
  acmb_sync #(.STAGES(SYNC_STAGES)) u_sync_init  (.clk, .rst_n, .d(bus.init),  .q(init_s));

  // RAM port
  logic                     ram_en, ram_we;
  logic [MOD_ADDR_BITS-1:0] ram_addr;
  logic [WORD_W-1:0]        ram_wdata, ram_rdata;

  acmb_ram #(.ADDR_BITS(MOD_ADDR_BITS), .WIDTH(WORD_W)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr),
    .wdata(ram_wdata), .rdata(ram_rdata)
  );

  // this module is addressed by a new address part, with a valid cycle code
  logic new_hit;
  assign new_hit = adstr_s && !adstr_d &&
                   bus.ad[AD_WIDTH-1:MOD_ADDR_BITS] == module_sel &&
                   lines_valid(bus.c0, bus.c1, bus.clear);

  // DMM arithmetic on the word just read
  logic [AD_WIDTH:0]   sum;
  logic                overflow, rd_par_bad;
  logic [AD_WIDTH-1:0] store_data;

  always_comb begin
    sum        = {1'b0, ram_rdata[AD_WIDTH-1:0]} + {1'b0, mdata};
    overflow   = sum[AD_WIDTH];
    rd_par_bad = ~^ram_rdata;  // data plus parity must hold an odd count of ones

    // what goes into the array in this cycle
    ram_en     = 1'b0;
    ram_we     = 1'b0;
    ram_addr   = addr;
    store_data = '0;
    if (state == S_WDINC && dinc_s) begin
      ram_en = 1'b1;
      unique case (cmd)
        CMD_WRITE: begin ram_we = 1'b1; store_data = bus.ad; end
        CMD_CLEAR: begin ram_we = 1'b1; store_data = '0;     end
        default:   ram_we = 1'b0;  // READ, DMM: read the location
      endcase
    end else if (state == S_RD && cmd == CMD_DMM && !(overflow && !oflo_enb_l)) begin
      ram_en     = 1'b1;
      ram_we     = 1'b1;
      store_data = sum[AD_WIDTH-1:0];
    end
    ram_wdata = {odd_parity(store_data) ^ par_inject, store_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      cmd        <= CMD_READ;
      oflo_enb_l <= 1'b0;
      addr       <= '0;
      mdata      <= '0;
      adstr_d    <= 1'b0;
      drv        <= '0;
    end else if (init_s) begin
      state      <= S_IDLE;
      cnt        <= '0;
      cmd        <= CMD_READ;
      oflo_enb_l <= 1'b0;
      adstr_d    <= adstr_s;
      drv        <= '0;
    end else begin
      adstr_d <= adstr_s;
      unique case (state)
        S_IDLE: begin
          if (new_hit) begin
            addr       <= bus.ad[MOD_ADDR_BITS-1:0];
            cmd        <= lines_to_cmd(bus.c0, bus.c1, bus.clear);
            oflo_enb_l <= bus.oflo_enb;
            drv.adok   <= 1'b1;
            state      <= S_ACK;
          end
        end
        S_ACK: begin
          if (!adstr_s) begin
            drv.adok <= 1'b0;
            state    <= S_WDINC;
          end
        end
        S_WDINC: begin
          if (adstr_s && !adstr_d) begin
            // a new address part before DINC: the controller gave up on
            // this operation (e.g. after its time-out); decode afresh
            if (new_hit) begin
              addr       <= bus.ad[MOD_ADDR_BITS-1:0];
              cmd        <= lines_to_cmd(bus.c0, bus.c1, bus.clear);
              oflo_enb_l <= bus.oflo_enb;
              drv.adok   <= 1'b1;
              state      <= S_ACK;
            end else begin
              state      <= S_IDLE;
            end
          end else if (dinc_s) begin
            mdata <= bus.ad;
            if (cmd == CMD_READ || cmd == CMD_DMM) begin
              state <= S_RD;
            end else begin
              cnt   <= CW'(SETUP_CYC - 1);
              state <= S_OSETUP;
            end
          end
        end
        S_RD: begin
          drv.par_err <= rd_par_bad;
          if (cmd == CMD_READ) begin
            drv.ad    <= ram_rdata[AD_WIDTH-1:0];
            drv.ad_oe <= 1'b1;
          end else begin
            drv.oflo  <= overflow && !oflo_enb_l;
          end
          cnt   <= CW'(SETUP_CYC - 1);
          state <= S_OSETUP;
        end
        S_OSETUP: begin
          if (cnt == 0) begin
            drv.doutc <= 1'b1;
            state     <= S_WDINC_OFF;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WDINC_OFF: begin
          if (!dinc_s) begin
            drv   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The module never drives AD while it is acknowledging an address.
  a_no_ad_in_addr_part: assert property (@(posedge clk) disable iff (!rst_n)
    drv.adok |-> !drv.ad_oe);
  // DOUTC only answers DINC.
  a_doutc_after_dinc: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(drv.doutc) |-> dinc_s);
endmodule
