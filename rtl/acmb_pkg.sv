// acmb_pkg: shared types and constants of the auxiliary CAMAC memory bus.
//
// The bus joins one memory control unit (in a CAMAC crate) to one or more
// "dumb" memory modules over a 40-way ribbon cable: 24 time-multiplexed
// address/data lines AD01-AD24, 11 control/status lines and 5 ground lines.
// Everything here is in positive logic (1 = asserted). On the cable the lines
// are TTL negative logic (low voltage = logic 1) driven by open-collector
// sinks, so several stations asserting a line OR together; the bus module
// models that.
//
// The cycle-type code on C0, C1 and CLEAR, the line names and the connector
// contact numbers follow the bus specification. The struct grouping of the
// lines by driver and the host request codes are this design's own.
package acmb_pkg;

  localparam int unsigned AD_WIDTH = 24;  // AD01-AD24

  // Cycle type as carried on C0, C1 and CLEAR (CLEAR set overrides C0/C1).
  //   C0 C1 CLEAR
  //    0  0  0   READ
  //    1  0  0   WRITE
  //    0  1  0   not used
  //    1  1  0   DIRECT MEMORY MODIFY (DMM)
  //    x  x  1   CLEAR
  typedef enum logic [1:0] {
    CMD_READ  = 2'd0,
    CMD_WRITE = 2'd1,
    CMD_DMM   = 2'd2,
    CMD_CLEAR = 2'd3
  } acmb_cmd_e;

  // Lines driven by the control unit.
  typedef struct packed {
    logic [AD_WIDTH-1:0] ad;        // address or write/modify data
    logic                ad_oe;     // control unit drives AD
    logic                c0;
    logic                c1;
    logic                clear;
    logic                oflo_enb;  // OFLO ENB
    logic                init;      // INIT
    logic                adstr;     // address strobe
    logic                dinc;      // data-in strobe / start of data part
  } acmb_ctrl_drv_t;

  // Lines driven by a memory module.
  typedef struct packed {
    logic [AD_WIDTH-1:0] ad;        // read data
    logic                ad_oe;     // module drives AD
    logic                adok;      // valid address
    logic                doutc;     // memory cycle complete
    logic                oflo;      // OFLO: overflow took place
    logic                par_err;   // PAR ERR
  } acmb_mem_drv_t;

  // Resolved state of the bus lines as every station sees them.
  typedef struct packed {
    logic [AD_WIDTH-1:0] ad;
    logic                c0;
    logic                c1;
    logic                clear;
    logic                oflo_enb;
    logic                oflo;
    logic                par_err;
    logic                init;
    logic                adstr;
    logic                adok;
    logic                dinc;
    logic                doutc;
  } acmb_bus_t;

  // Encode a cycle type onto C0, C1, CLEAR.
  function automatic logic [2:0] cmd_to_lines(acmb_cmd_e cmd);  // {c0, c1, clear}
    unique case (cmd)
      CMD_READ:  return 3'b000;
      CMD_WRITE: return 3'b100;
      CMD_DMM:   return 3'b110;
      default:   return 3'b001;  // CMD_CLEAR
    endcase
  endfunction

  // Decode C0, C1, CLEAR into a cycle type (the unused code reads as WRITE;
  // lines_valid() flags it).
  function automatic acmb_cmd_e lines_to_cmd(logic c0, logic c1, logic clear);
    if (clear)          return CMD_CLEAR;
    else if (c0 && c1)  return CMD_DMM;
    else if (c0)        return CMD_WRITE;
    else                return CMD_READ;
  endfunction

  function automatic logic lines_valid(logic c0, logic c1, logic clear);
    return clear || !(c1 && !c0);
  endfunction

  // Contact numbers on the 40-way IDC connector (0 V on 1, 10, 20, 28, 36).
  // AD01 is on contact 2; AD02-AD08 on 3-9; AD09-AD17 on 11-19;
  // AD18-AD24 on 21-27.
  localparam int unsigned PIN_OFLO_ENB = 29;
  localparam int unsigned PIN_DINC     = 30;
  localparam int unsigned PIN_C1       = 31;
  localparam int unsigned PIN_PAR_ERR  = 32;
  localparam int unsigned PIN_C0       = 33;
  localparam int unsigned PIN_ADSTR    = 34;
  localparam int unsigned PIN_INIT     = 35;
  localparam int unsigned PIN_ADOK     = 37;
  localparam int unsigned PIN_DOUTC    = 38;
  localparam int unsigned PIN_OFLO     = 39;
  localparam int unsigned PIN_CLEAR    = 40;

  function automatic int unsigned ad_pin(int unsigned n);  // n = 1..24
    if (n <= 8)       return n + 1;
    else if (n <= 17) return n + 2;
    else              return n + 3;
  endfunction

  // Odd parity: the stored parity bit makes data plus parity hold an odd
  // number of ones, so an all-zero word with a zero parity bit is an error.
  function automatic logic odd_parity(logic [AD_WIDTH-1:0] d);
    return ~^d;
  endfunction

  // Clock cycles strictly longer than a time in ns.
  function automatic int unsigned cycles_over(int unsigned ns, int unsigned clk_ns);
    return ns / clk_ns + 1;
  endfunction

endpackage
