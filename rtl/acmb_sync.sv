// acmb_sync: multi-stage synchroniser for one asynchronous bus strobe.
//
// The memory bus is an interlocked handshake between stations that run from
// unrelated clocks, so every strobe a station receives (ADSTR, ADOK, DINC,
// DOUTC, INIT) passes through STAGES flip-flops before its logic looks at it.
// The output lags the input by STAGES rising edges of clk. The stage count is
// this design's choice; the bus specification defines no clock at all.
module acmb_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[STAGES-2:0], d};
  end

  assign q = sr[STAGES-1];
endmodule
