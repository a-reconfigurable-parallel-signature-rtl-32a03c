// tb_parity_update: all eight combinations of data-in, stored cell and
// stored parity; the parity must flip exactly on a transition write.
module tb_parity_update;
  logic din, dout_buf, par_buf, transition, par_new;
  int checks = 0, failures = 0;

  parity_update dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {din, dout_buf, par_buf} = 3'(v);
      #1;
      checks += 2;
      if (transition != (din != dout_buf)) begin
        failures++; $display("FAIL: transition for %b", 3'(v));
      end
      if (par_new != (din != dout_buf ? !par_buf : par_buf)) begin
        failures++; $display("FAIL: parity for %b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
