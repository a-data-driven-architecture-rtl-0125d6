// np_alu: 16-bit ALU of a nanoprocessor, with a shifter and a modified-Booth
// multiplication step.
//
// The arithmetic/logic result passes through a shifter that moves it by 0 to
// 4 bit positions, left or arithmetic right. Flags: n = (a < b) signed, from
// a - b, which drives compare-and-select; z = shifted result is zero; c =
// carry out of ADD, or no-borrow of SUB/CMP.
//
// Booth step: a 17-bit multiplier register MBR holds the multiplier with one
// extra bit below it. OP_BOOTH forms the radix-4 digit d in {-2..2} from
// MBR[2:0] and returns (a + d*b) >>> 2 while MBR shifts right by two. Eight
// steps starting from a = 0 and MBR = {m, 0} return the upper 16 bits of the
// 32-bit product m*b exactly (floor of P / 2^16); four steps on an 8-bit m
// return P >>> 8. OP_MBRD / OP_MBLDC hand a partly used multiplier to a
// neighbour, so the steps of one product can be spread over a chain of
// nanoprocessors (a pipelined multiplier over one 4-processor cluster).
//
// Timing: y and the flags are combinational; MBR changes at the clock edge
// when 'en' (the instruction fires) is high. The 16-bit width, the 4-bit
// shifter and the Booth step follow the architecture; the operation set, the
// flag definitions and the MBR hand-over are this design's own.
module np_alu
  import np_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sh_right,
  input  logic [2:0]   sh_amt,
  output logic [W-1:0] y,
  output logic         n,
  output logic         z,
  output logic         c
);
  logic [W:0]    mbr;          // {multiplier bits, previous bit}
  logic [W:0]    sum, dif;     // with carry / borrow
  logic signed [W+1:0] bsum;   // Booth partial sum
  logic signed [W+1:0] dmul;
  logic [W-1:0]  r;
  logic          lt;
  logic [2:0]    amt;

  assign sum = {1'b0, a} + {1'b0, b};
  assign dif = {1'b0, a} - {1'b0, b};
  assign lt  = $signed(a) < $signed(b);

  always_comb begin
    unique case (mbr[2:0])
      3'b001, 3'b010: dmul = {{2{b[W-1]}}, b};
      3'b011:         dmul = {b[W-1], b, 1'b0};
      3'b100:         dmul = -{b[W-1], b, 1'b0};
      3'b101, 3'b110: dmul = -{{2{b[W-1]}}, b};
      default:        dmul = '0;
    endcase
    bsum = $signed({{2{a[W-1]}}, a}) + dmul;
  end

  always_comb begin
    c = 1'b0;
    unique case (op)
      OP_PASSA: r = a;
      OP_PASSB: r = b;
      OP_ADD:   begin r = sum[W-1:0]; c = sum[W]; end
      OP_SUB:   begin r = dif[W-1:0]; c = !dif[W]; end
      OP_AND:   r = a & b;
      OP_OR:    r = a | b;
      OP_XOR:   r = a ^ b;
      OP_NOT:   r = ~a;
      OP_MIN:   r = lt ? a : b;
      OP_MAX:   r = lt ? b : a;
      OP_CMP:   begin r = a; c = !dif[W]; end
      OP_BOOTH: r = bsum[W+1:2];
      OP_MBLD:  r = b;
      OP_MBLDC: r = b;
      OP_MBRD:  r = mbr[W-1:0];
      OP_ABSD:  r = lt ? (b - a) : (a - b);
      default:  r = a;
    endcase
  end

  // shifter: 0..4 positions
  assign amt = (sh_amt > 3'd4) ? 3'd4 : sh_amt;
  assign y   = sh_right ? W'($signed(r) >>> amt) : (r << amt);
  assign z   = (y == '0);
  assign n   = lt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mbr <= '0;
    else if (en) begin
      unique case (op)
        OP_BOOTH: mbr <= {mbr[W], mbr[W], mbr[W:2]};
        OP_MBLD:  mbr <= {b, 1'b0};
        OP_MBLDC: mbr <= {b[W-1], b};
        default:  mbr <= mbr;
      endcase
    end
  end

endmodule
