// switch_box: 2x2 exchange element of the MultiRing switch fabric.
//
// Two data inputs I0/I1, one control input C, two data outputs O0/O1.
// C = 0 connects I0->O0 and I1->O1 (straight); C = 1 connects I0->O1 and
// I1->O0 (crossed). Purely combinational, no clock; a link is WIDTH bits wide
// and every bit is switched by the same C.
//
// Two gate structures of the same function are offered, as in the published
// design:
//   SB_AND_OR : four AND, two OR, one NOT (seven gates per bit)
//   SB_XOR    : two AND, one OR, one NOT, two XOR (six gates per bit),
//               O0 is the AND/OR multiplexer and O1 = I0 ^ I1 ^ O0
// The XOR equation for O1 is this design's reading of the six-gate form;
// it gives the same outputs as the seven-gate form for every input.
// SB_XOR is the default because it is the form the gate-count comparison uses.
module switch_box
  import mr_pkg::*;
#(
  parameter int unsigned WIDTH = 1,
  parameter sb_impl_e    IMPL  = SB_XOR
) (
  input  logic [WIDTH-1:0] i0,
  input  logic [WIDTH-1:0] i1,
  input  logic             c,
  output logic [WIDTH-1:0] o0,
  output logic [WIDTH-1:0] o1
);

  logic [WIDTH-1:0] cw, cw_n;

  assign cw   = {WIDTH{c}};
  assign cw_n = ~cw;

  always_comb begin
    o0 = (i0 & cw_n) | (i1 & cw);
    if (IMPL == SB_AND_OR) o1 = (i0 & cw) | (i1 & cw_n);
    else                   o1 = i0 ^ i1 ^ o0;
  end

endmodule
