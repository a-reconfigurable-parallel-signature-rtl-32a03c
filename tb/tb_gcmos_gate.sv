// tb_gcmos_gate: the ganged-CMOS gate model sized as OR, AND and A.B+C,
// all eight input combinations each; the ganged-node level must lie on the
// right side of the switching point with a margin, as the encoding inverter
// needs.
module tb_gcmos_gate;
  logic [2:0] in;
  logic       o_or, o_and, o_abc;
  logic [6:0] v_or, v_and, v_abc;
  int checks = 0, failures = 0;

  gcmos_gate #(.N(3), .KN('{4, 4, 4, 0}), .KP('{1, 1, 1, 0}), .VSW_PCT(50))
    u_or  (.in, .out(o_or),  .vg_pct(v_or));
  gcmos_gate #(.N(3), .KN('{1, 1, 1, 0}), .KP('{4, 4, 4, 0}), .VSW_PCT(50))
    u_and (.in, .out(o_and), .vg_pct(v_and));
  gcmos_gate #(.N(3), .KN('{1, 1, 2, 0}), .KP('{1, 1, 2, 0}), .VSW_PCT(55))
    u_abc (.in, .out(o_abc), .vg_pct(v_abc));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit far(logic [6:0] v, int sw);
    return (int'(v) > sw + 4) || (int'(v) < sw - 4);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      check(o_or  == (in[0] | in[1] | in[2]), $sformatf("OR %b", in));
      check(o_and == (in[0] & in[1] & in[2]), $sformatf("AND %b", in));
      check(o_abc == ((in[0] & in[1]) | in[2]), $sformatf("A.B+C %b", in));
      check(far(v_or, 50) && far(v_and, 50) && far(v_abc, 55), "node margin");
    end
    in = 3'b000;
    #1;
    check(v_or == 7'd100, "all inputs low: node at VDD");
    in = 3'b111;
    #1;
    check(v_and == 7'd0, "all inputs high: node at ground");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
