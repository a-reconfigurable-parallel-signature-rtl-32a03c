// tb_dram_array: 8 word lines of 5 cells. Random whole-row writes and reads
// against a model; a read shows the row after one edge and holds it while
// re=0; a write and read of different rows in one cycle are independent.
module tb_dram_array;
  localparam int ROWS = 8, M = 5;
  logic         clk = 1'b0, re = 1'b0, we = 1'b0;
  logic [2:0]   addr = '0;
  logic [M-1:0] wdata = '0, rdata;
  logic [M-1:0] model [ROWS];
  int checks = 0, failures = 0;

  dram_array #(.ROWS(ROWS), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] held;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      we = 1'b1; addr = 3'(r); wdata = M'($urandom); model[r] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int k = 0; k < 300; k++) begin
      int r = $urandom_range(ROWS - 1);
      case ($urandom_range(2))
        0: begin
          we = 1'b1; re = 1'b0; addr = 3'(r); wdata = M'($urandom); model[r] = wdata;
          @(negedge clk);
          we = 1'b0;
        end
        1: begin
          re = 1'b1; addr = 3'(r);
          @(negedge clk);
          re = 1'b0;
          check(rdata == model[r], $sformatf("read row %0d", r));
          held = rdata;
          addr = 3'($urandom);
          @(negedge clk);
          check(rdata == held, "row latch holds without re");
        end
        default: @(negedge clk);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
