// tb_token_fifo: random pushes and pops against a queue model; checks data
// order, full/empty/count and that a full FIFO refuses pushes.
module tb_token_fifo;
  localparam int W = 8, D = 3;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  token_fifo #(.W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(dout == model[0], "data order");
      push = ($urandom % 3) != 0;
      pop  = ($urandom % 2) != 0;
      din  = W'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at each edge with the values sampled before it
  always @(posedge clk) if (rst_n) begin
    automatic bit p = push && model.size() < D;
    automatic bit q = pop && model.size() > 0;
    if (q) void'(model.pop_front());
    if (p) model.push_back(din);
  end
endmodule
