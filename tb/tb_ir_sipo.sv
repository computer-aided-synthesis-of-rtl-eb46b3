// tb_ir_sipo: shifts random pixels into the input register, some clocks
// without a shift, and checks after every clock that vec[m] is the m-th
// of the last 8 pixels shifted in, and before every clock that vec_next
// already shows what vec will be after it.
module tb_ir_sipo;
  localparam int N = 8, IW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0;
  logic signed [IW-1:0] din = '0;
  logic signed [IW-1:0] vec [N];
  logic signed [IW-1:0] vec_next [N];
  logic signed [IW-1:0] hist [$];

  ir_sipo #(.N(N), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) hist.push_back('0);
    for (int t = 0; t < 400; t++) begin
      shift = ($urandom % 4) != 0;
      din = IW'($urandom);
      if (shift) begin
        hist.push_back(din);
        void'(hist.pop_front());
      end
      #1;
      for (int m = 0; m < N; m++) begin
        checks++;
        if (vec_next[m] != hist[m]) begin
          failures++;
          $display("FAIL: vec_next[%0d] = %0d expected %0d", m, vec_next[m], hist[m]);
        end
      end
      @(negedge clk);
      for (int m = 0; m < N; m++) begin
        checks++;
        if (vec[m] != hist[m]) begin
          failures++;
          $display("FAIL: vec[%0d] = %0d expected %0d", m, vec[m], hist[m]);
        end
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
