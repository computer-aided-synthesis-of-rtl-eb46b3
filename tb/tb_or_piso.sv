// tb_or_piso: loads random vectors into the output register and shifts
// them out with the chip's timing (two clocks per element, the next load
// in the same clock as the last shift), checking each element in order.
module tb_or_piso;
  localparam int N = 8, OW = 14, CPP = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic signed [OW-1:0] din [N];
  logic signed [OW-1:0] dout;
  logic signed [OW-1:0] cur [N];

  or_piso #(.N(N), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int j = 0; j < N; j++) din[j] = OW'($urandom);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int v = 0; v < 50; v++) begin
      cur = din;
      for (int j = 0; j < N; j++) din[j] = OW'($urandom);
      for (int c = 0; c < N * CPP; c++) begin
        checks++;
        if (dout != cur[c / CPP]) begin
          failures++;
          $display("FAIL: element %0d = %0d expected %0d", c / CPP, dout, cur[c / CPP]);
        end
        shift = (c % CPP) == CPP - 1;
        load  = (c == N * CPP - 1);
        @(negedge clk);
        shift = 0;
        load  = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
