// rev_hci_top: the reversible combinational units side by side, as a set of
// building blocks for the control path of a brain-computer interface.
// The units do not share signals; each has its own ports, named by unit:
//   mux_*   4x1 multiplexer (three R gates)
//   dmx_*   1x4 demultiplexer (three R gates)
//   dec_*   3-to-8 decoder
//   enc_*   8-to-3 one-hot encoder
//   mul_*   5x5 signed multiplier (Toffoli partial products, DPG/PG adder)
//   as_*    4-bit adder/subtractor (four chained double Peres gates)
// Every *_g port carries the unit's garbage lines, the outputs that a
// reversible circuit produces besides its result; they are brought out so
// that each unit keeps as many outputs as inputs plus constants. Purely
// combinational: no clock and no reset. The units are the published ones;
// placing them side by side, with no shared signals, is this design's
// choice.
module rev_hci_top
  import rev_pkg::*;
(
  input  logic [3:0]               mux_i,
  input  logic [1:0]               mux_s,
  output logic                     mux_y,
  output logic [MUX_GW-1:0]        mux_g,

  input  logic                     dmx_d,
  input  logic [1:0]               dmx_s,
  output logic [3:0]               dmx_y,
  output logic [DEMUX_GW-1:0]      dmx_g,

  input  logic [2:0]               dec_s,
  output logic [7:0]               dec_y,
  output logic [DEC_GW-1:0]        dec_g,

  input  logic [7:0]               enc_i,
  output logic [2:0]               enc_y,
  output logic [ENC_GW-1:0]        enc_g,

  input  logic signed [MUL_W-1:0]  mul_x,
  input  logic signed [MUL_W-1:0]  mul_y,
  output logic signed [MUL_PW-1:0] mul_p,
  output logic [MUL_GW-1:0]        mul_g,

  input  logic [ADD_W-1:0]         as_a,
  input  logic [ADD_W-1:0]         as_b,
  input  logic                     as_sub,
  output logic [ADD_W-1:0]         as_s,
  output logic                     as_cout,
  output logic [2*ADD_W-1:0]       as_g
);
  rmux     u_mux (.i(mux_i), .s(mux_s), .y(mux_y), .g(mux_g));
  rdemux   u_dmx (.d(dmx_d), .s(dmx_s), .y(dmx_y), .g(dmx_g));
  rdecoder u_dec (.s(dec_s), .y(dec_y), .g(dec_g));
  rencoder u_enc (.i(enc_i), .y(enc_y), .g(enc_g));
  rm       u_mul (.x(mul_x), .y(mul_y), .prod(mul_p), .garbage(mul_g));
  ras #(.N(ADD_W)) u_as (
    .a(as_a), .b(as_b), .sub(as_sub), .s(as_s), .cout(as_cout), .garbage(as_g)
  );
endmodule
