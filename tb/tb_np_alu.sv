// tb_np_alu: random operands for every operation against a reference model,
// shifter distances 0..4 both ways, and Booth multiplication: eight steps
// give the upper half of a 16 x 16 product, and a multiplier handed over
// through MBRD/MBLDC after four steps gives the same result.
module tb_np_alu;
  import np_pkg::*;
  logic clk = 0, rst_n = 0, en, sh_right, n, z, c;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic [2:0] sh_amt;
  int checks = 0, failures = 0;

  np_alu dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d a=%h b=%h y=%h", what, op, a, b, y); end
  endtask

  function automatic logic [15:0] model(alu_op_e o, logic [15:0] x, logic [15:0] v);
    case (o)
      OP_PASSA: return x;
      OP_PASSB: return v;
      OP_ADD:   return x + v;
      OP_SUB:   return x - v;
      OP_AND:   return x & v;
      OP_OR:    return x | v;
      OP_XOR:   return x ^ v;
      OP_NOT:   return ~x;
      OP_MIN:   return ($signed(x) < $signed(v)) ? x : v;
      OP_MAX:   return ($signed(x) < $signed(v)) ? v : x;
      OP_CMP:   return x;
      OP_ABSD:  begin
                  automatic int d = int'($signed(x)) - int'($signed(v));
                  return 16'(d < 0 ? -d : d);
                end
      default:  return x;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(alu_op_e o, logic [15:0] x, logic [15:0] v);
    op = o; a = x; b = v; en = 1;
    @(posedge clk); #1; en = 0;
  endtask

  initial begin
    en = 0; op = OP_PASSA; a = 0; b = 0; sh_right = 0; sh_amt = 0;
    @(posedge clk); #1 rst_n = 1;
    // plain operations
    for (int i = 0; i < 3000; i++) begin
      automatic alu_op_e o;
      automatic logic [15:0] r;
      automatic int sa = $urandom % 8;
      automatic int eff = sa > 4 ? 4 : sa;
      automatic bit rt = 1'($urandom);
      do o = alu_op_e'($urandom % 16); while (o inside {OP_BOOTH, OP_MBLD, OP_MBLDC, OP_MBRD});
      op = o; a = 16'($urandom); b = 16'($urandom); sh_amt = 3'(sa); sh_right = rt; #1;
      r = model(o, a, b);
      r = rt ? 16'($signed(r) >>> eff) : 16'(r << eff);
      check(y == r, "result");
      check(n == ($signed(a) < $signed(b)), "n flag");
      check(z == (r == 0), "z flag");
      if (o == OP_ADD) check(c == (({1'b0, a} + {1'b0, b}) > 17'hFFFF), "carry");
    end
    sh_amt = 0; sh_right = 0;
    // Booth multiplication, 8 steps in one unit
    for (int i = 0; i < 500; i++) begin
      automatic logic [15:0] m = 16'($urandom), mc = 16'($urandom);
      automatic logic [15:0] acc = 0;
      automatic longint p = longint'($signed(m)) * longint'($signed(mc));
      if (i == 0) begin m = 16'h8000; mc = 16'h8000; p = 64'sd1073741824; end
      step(OP_MBLD, 0, m);
      for (int s = 0; s < 8; s++) begin
        op = OP_BOOTH; a = acc; b = mc; #1; acc = y; step(OP_BOOTH, acc == y ? a : a, mc);
      end
      check(acc == 16'(p >>> 16), "booth product high half");
    end
    // hand-over after four steps (two pipeline stages)
    for (int i = 0; i < 200; i++) begin
      automatic logic [15:0] m = 16'($urandom), mc = 16'($urandom), acc = 0, mr;
      automatic longint p = longint'($signed(m)) * longint'($signed(mc));
      step(OP_MBLD, 0, m);
      for (int s = 0; s < 4; s++) begin op = OP_BOOTH; a = acc; b = mc; #1; acc = y; step(OP_BOOTH, a, mc); end
      op = OP_MBRD; #1; mr = y;
      step(OP_MBLD, 0, 16'h1234);   // disturb the register
      step(OP_MBLDC, 0, mr);
      for (int s = 0; s < 4; s++) begin op = OP_BOOTH; a = acc; b = mc; #1; acc = y; step(OP_BOOTH, a, mc); end
      check(acc == 16'(p >>> 16), "booth product with hand-over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
