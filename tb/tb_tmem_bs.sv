// tb_tmem_bs: random stimulus on the bidirectional shift cell; checks that
// it takes the horizontal input when dir = 0, the vertical one when
// dir = 1, and holds when not shifting.
module tb_tmem_bs;
  localparam int W = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0, dir = 0;
  logic [W-1:0] inp_h = '0, inp_v = '0, q, model;

  tmem_bs #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int nh, nv;
    nh = 0;
    nv = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      shift = 1'($urandom); dir = 1'($urandom);
      inp_h = W'($urandom); inp_v = W'($urandom);
      if (shift) begin
        model = dir ? inp_v : inp_h;
        if (dir) nv++; else nh++;
      end
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL: q = %0h expected %0h", q, model);
      end
    end
    checks++;
    if (nh == 0 || nv == 0) failures++;
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
