// glad_adder: behavioural model of a one-bit full adder built from two
// ganged-CMOS nodes (a transistor-level circuit).
//
// Carry node: three equal inverters driven by a, b and cin are ganged; its
// encoding inverter switches when at least two inputs are high, giving the
// majority, cout. Sum node: inverters driven by a, b, cin (strength 1) and
// by the inverted carry (strength 2) are ganged; the node falls below the
// switching point when a + b + cin + 2*(not cout) >= 3, which is exactly
// the odd-parity sum. Both nodes are modelled with gcmos_gate.
// Combinational; no delay is modelled.
//
// Follows the document: a full adder from two ganged nodes whose input and
// output inverters are weighted for different functions. The weights and
// the use of the inverted carry in the sum node are this model's own: the
// document's circuit details are not available.
module glad_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic       ncout;
  logic [6:0] vg_c, vg_s;

  gcmos_gate #(
    .N(3), .KN('{1, 1, 1, 0}), .KP('{1, 1, 1, 0}), .VSW_PCT(50)
  ) u_carry (
    .in     ({cin, b, a}),
    .out    (cout),
    .vg_pct (vg_c)
  );

  assign ncout = ~cout;

  gcmos_gate #(
    .N(4), .KN('{1, 1, 1, 2}), .KP('{1, 1, 1, 2}), .VSW_PCT(50)
  ) u_sum (
    .in     ({ncout, cin, b, a}),
    .out    (sum),
    .vg_pct (vg_s)
  );
endmodule
