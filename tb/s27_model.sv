// s27_model: behavioural model of the combinational part of the ISCAS'89
// benchmark s27 (4 inputs G0..G3, one output G17, three flip-flops G5, G6,
// G7), used as the circuit under test in the system testbenches. The
// flip-flops themselves are the secure scan chain: state[0] = G5,
// state[1] = G6, state[2] = G7, and next = {G13, G11, G10} are their D inputs.
module s27_model (
  input  logic [3:0] pi,
  input  logic [2:0] state,
  output logic [2:0] next,
  output logic       g17
);
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  always_comb begin
    g14 = ~pi[0];
    g12 = ~(pi[1] | state[2]);
    g8  = g14 & state[1];
    g15 = g12 | g8;
    g16 = pi[3] | g8;
    g9  = ~(g16 & g15);
    g11 = ~(state[0] | g9);
    g10 = ~(g14 | g11);
    g13 = ~(pi[2] | g12);
    g17 = ~g11;
    next = {g13, g11, g10};
  end
endmodule
