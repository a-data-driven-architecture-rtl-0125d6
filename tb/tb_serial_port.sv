// tb_serial_port: shifts random frames in, with pauses and one aborted
// frame, and checks each configuration write and its timing.
module tb_serial_port;
  import np_pkg::*;
  logic clk = 0, rst_n = 0, ser_en, ser_dat;
  cfg_t cfg;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  logic [FRAME-1:0] sent[$];
  int got = 0;

  serial_port dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cfg.we) begin
    checks++;
    if (sent.size() == 0 || {cfg.target, cfg.addr, cfg.data} != sent[0]) begin
      failures++; $display("FAIL frame %0d", got);
    end
    if (sent.size() > 0) void'(sent.pop_front());
    got++;
  end

  task automatic send_frame(logic [FRAME-1:0] f, int stop_after);
    for (int i = FRAME - 1; i >= 0 && (FRAME - 1 - i) < stop_after; i--) begin
      @(negedge clk); ser_en = 1; ser_dat = f[i];
    end
    @(negedge clk); ser_en = 0;
  endtask

  initial begin
    ser_en = 0; ser_dat = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      automatic logic [FRAME-1:0] f = {3'($urandom), 32'($urandom), 32'($urandom)};
      if (n == 10) send_frame(f, 30);     // aborted: no write expected
      sent.push_back(f);
      send_frame(f, FRAME);
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (got != 40 || frames != 16'd40 || sent.size() != 0) begin failures++; $display("FAIL count %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
