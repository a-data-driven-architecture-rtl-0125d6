// tb_data_buffer: queue mode (ordering, hold for reuse, busy when full,
// initial tokens) and register-file mode (initial words, read by address,
// write-back, input closed).
module tb_data_buffer;
  logic clk = 0, rst_n = 0;
  logic rf_mode, in_send, in_busy, avail, pop, wb_en, init_we, init_push;
  logic [15:0] in_data, head, wb_data, init_data;
  logic [1:0] rd_addr, wb_addr, init_addr;
  int checks = 0, failures = 0;

  data_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick; @(posedge clk); #1; endtask

  initial begin
    {rf_mode, in_send, pop, wb_en, init_we, init_push} = '0;
    {in_data, wb_data, init_data, rd_addr, wb_addr, init_addr} = '0;
    tick; rst_n = 1; tick;
    // ---- queue mode
    check(!avail && !in_busy, "empty queue");
    for (int i = 0; i < 4; i++) begin
      in_send = 1; in_data = 16'h100 + 16'(i); tick;
    end
    in_send = 0;
    check(in_busy, "busy when full");
    check(avail && head == 16'h100, "head");
    // hold: read without pop
    pop = 0; tick; check(head == 16'h100, "held head");
    for (int i = 0; i < 4; i++) begin
      check(head == 16'h100 + 16'(i), "queue order");
      pop = 1; tick;
    end
    pop = 0;
    check(!avail, "drained");
    // push while full is refused
    for (int i = 0; i < 5; i++) begin in_send = 1; in_data = 16'(i); tick; end
    in_send = 0;
    for (int i = 0; i < 4; i++) begin check(head == 16'(i), "no overwrite when full"); pop = 1; tick; end
    pop = 0;
    // initial token
    init_push = 1; init_data = 16'hBEEF; tick; init_push = 0;
    check(avail && head == 16'hBEEF, "initial token");
    pop = 1; tick; pop = 0;
    // ---- register-file mode
    rf_mode = 1;
    for (int j = 0; j < 4; j++) begin init_we = 1; init_addr = 2'(j); init_data = 16'hC00 + 16'(j); tick; end
    init_we = 0;
    check(in_busy && avail, "rf flags");
    for (int j = 0; j < 4; j++) begin rd_addr = 2'(j); #1; check(head == 16'hC00 + 16'(j), "rf read"); end
    wb_en = 1; wb_addr = 2; wb_data = 16'h7777; tick; wb_en = 0;
    rd_addr = 2; #1; check(head == 16'h7777, "write-back");
    rd_addr = 1; #1; check(head == 16'hC01, "other word kept");
    in_send = 1; in_data = 16'hDEAD; tick; in_send = 0;
    rd_addr = 0; #1; check(head == 16'hC00, "input closed in rf mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
