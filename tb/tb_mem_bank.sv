// tb_mem_bank: random writes and reads through the three input channels
// with random gaps and back-pressure, against an array model; checks that a
// write waits for its data token, that reads come back in order, and that a
// stream of reads is served at one per cycle.
module tb_mem_bank;
  localparam int WORDS = 128;
  logic clk = 0, rst_n = 0;
  logic addr_send, addr_busy, wdata_send, wdata_busy, rw_send, rw_data, rw_busy;
  logic rdata_send, rdata_busy, fire_rd, fire_wr;
  logic [15:0] addr_data, wdata_data, rdata_data;
  int checks = 0, failures = 0;
  int rate = 100, brate = 0;

  mem_bank dut (.*);
  always #5 clk = ~clk;

  logic [15:0] q_a[$], q_d[$], exp_r[$], got_r[$];
  logic        q_rw[$];
  logic [15:0] model[WORDS];
  int cyc = 0, t_first = -1, t_last = -1;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    addr_send  <= q_a.size() > 0 && ($urandom % 100) < rate;
    addr_data  <= q_a.size() > 0 ? q_a[0] : '0;
    wdata_send <= q_d.size() > 0 && ($urandom % 100) < rate;
    wdata_data <= q_d.size() > 0 ? q_d[0] : '0;
    rw_send    <= q_rw.size() > 0 && ($urandom % 100) < rate;
    rw_data    <= q_rw.size() > 0 ? q_rw[0] : 1'b0;
    rdata_busy <= ($urandom % 100) < brate;
  end

  always @(posedge clk) if (rst_n) begin
    if (addr_send && !addr_busy) void'(q_a.pop_front());
    if (wdata_send && !wdata_busy) void'(q_d.pop_front());
    if (rw_send && !rw_busy) void'(q_rw.pop_front());
    if (rdata_send && !rdata_busy) begin
      got_r.push_back(rdata_data);
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
    end
  end

  task automatic drain(int n);
    int g = 0;
    while (got_r.size() < n && g < 5000) begin @(posedge clk); g++; end
  endtask

  initial begin
    {addr_send, wdata_send, rw_send, rdata_busy} = '0;
    addr_data = 0; wdata_data = 0; rw_data = 0;
    for (int i = 0; i < WORDS; i++) model[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill every word
    rate = 100;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = 16'($urandom);
      q_a.push_back(16'(i)); q_rw.push_back(1'b1); q_d.push_back(model[i]);
    end
    while (q_a.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    // read stream at full rate: one word per cycle
    for (int i = 0; i < 32; i++) begin q_a.push_back(16'(i * 3)); q_rw.push_back(1'b0); exp_r.push_back(model[i * 3]); end
    drain(32);
    checks++; if (got_r != exp_r) begin failures++; $display("FAIL read stream data"); end
    checks++; if (t_last - t_first != 31) begin failures++; $display("FAIL read rate %0d", t_last - t_first); end
    got_r.delete(); exp_r.delete();
    // random mix under back-pressure; data tokens arrive only with writes
    rate = 60; brate = 40;
    for (int i = 0; i < 400; i++) begin
      automatic int a = $urandom % WORDS;
      automatic logic w = 1'($urandom);
      q_a.push_back(16'(a) | 16'h3F00);      // upper address bits are ignored
      q_rw.push_back(w);
      if (w) begin model[a] = 16'($urandom); q_d.push_back(model[a]); end
      else exp_r.push_back(model[a]);
    end
    drain(exp_r.size());
    checks++; if (got_r.size() != exp_r.size()) begin failures++; $display("FAIL mixed count"); end
    foreach (exp_r[i]) begin
      checks++; if (i >= got_r.size() || got_r[i] != exp_r[i]) begin failures++; $display("FAIL mixed read %0d", i); end
    end
    // a write with no data token waits
    got_r.delete();
    q_a.push_back(16'd5); q_rw.push_back(1'b1);
    repeat (20) @(posedge clk);
    checks++; if (q_a.size() != 0 || dut.u_a.empty) begin failures++; $display("FAIL write did not wait"); end
    q_d.push_back(16'hABCD);
    q_a.push_back(16'd5); q_rw.push_back(1'b0);
    drain(1);
    checks++; if (got_r.size() != 1 || got_r[0] != 16'hABCD) begin failures++; $display("FAIL late data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
