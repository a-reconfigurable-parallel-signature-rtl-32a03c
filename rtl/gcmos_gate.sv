// gcmos_gate: behavioural model of a ganged-CMOS (GCMOS) gate, a
// transistor-level circuit, not synthesizable logic in its real form.
//
// N CMOS inverters, one per input, have their outputs shorted together on
// the ganged node G; a CMOS encoding inverter buffers G and is the output.
// An inverter whose input is high pulls G down with the strength of its
// n-transistor (KN[i]); one whose input is low pulls G up with the strength
// of its p-transistor (KP[i]). The model treats the transistors as
// conductances in a ratioed divider:
//     V(G) / VDD = sum(KP of low inputs) / (sum(KP of low) + sum(KN of high))
// in per-cent, and the output is high when V(G) is below the encoding
// inverter's switching point VSW_PCT (per cent of VDD). Choosing the widths
// chooses the function; with three inputs:
//     OR     KN = 4,4,4  KP = 1,1,1  VSW 50: one high input drags G low
//     AND    KN = 1,1,1  KP = 4,4,4  VSW 50: all three needed
//     A.B+C  KN = 1,1,2  KP = 1,1,2  VSW 55: the C inverter twice as strong
// Up to four inputs; entries of KN/KP beyond N are unused.
// Combinational; no delay is modelled.
//
// Follows the document: the structure, the role of the widths, the three
// functions and the doubled C inverter. The widths other than that 2:1
// ratio, the divider model and the switching points are this model's own.
module gcmos_gate #(
  parameter int unsigned N          = 3,   // inputs used, at most 4
  parameter int unsigned KN [4]     = '{4, 4, 4, 0},
  parameter int unsigned KP [4]     = '{1, 1, 1, 0},
  parameter int unsigned VSW_PCT    = 50
) (
  input  logic [N-1:0] in,
  output logic         out,
  output logic [6:0]   vg_pct   // ganged-node level, per cent of VDD
);
  int unsigned up, down;

  always_comb begin
    up   = 0;
    down = 0;
    for (int i = 0; i < N; i++) begin
      if (in[i]) down += KN[i];
      else       up   += KP[i];
    end
    vg_pct = 7'((100 * up) / (up + down));
  end

  assign out = (vg_pct < 7'(VSW_PCT));
endmodule
