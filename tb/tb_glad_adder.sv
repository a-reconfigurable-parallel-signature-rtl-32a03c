// tb_glad_adder: the two-node ganged-CMOS full adder against a + b + cin,
// all eight input combinations.
module tb_glad_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  glad_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cin, b, a} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL: %b + %b + %b gave %b%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
