// tb_ctrl_store: writes all eight 50-bit words and reads them back.
module tb_ctrl_store;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] waddr, raddr;
  logic [49:0] wdata, rdata;
  logic [49:0] ref_w [8];
  int checks = 0, failures = 0;

  ctrl_store dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i); #1;
      checks++; if (rdata != '0) failures++;
    end
    for (int i = 0; i < 8; i++) begin
      ref_w[i] = {18'($urandom), 32'($urandom)};
      we = 1; waddr = 3'(i); wdata = ref_w[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 7; i >= 0; i--) begin
      raddr = 3'(i); #1;
      checks++;
      if (rdata != ref_w[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
