// serial_port: start-up configuration port.
//
// All programmable state of the chip (instruction words, level-1 and
// level-2 switch settings, data-buffer contents and modes, initial tokens,
// I/O port modes) is downloaded serially. While ser_en is high one bit is
// taken from ser_dat per clock, most significant first. After FRAME bits the
// frame {target[6:0], address[9:0], data[49:0]} is issued as a one-cycle
// write on the cfg bus, which every configurable block watches. Dropping
// ser_en in the middle of a frame discards the partial frame.
//
// Timing: cfg.we is high for the cycle after the last bit of a frame.
// A serial download port follows the architecture; the frame format and the
// addressed configuration bus are this design's own.
module serial_port
  import np_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ser_en,
  input  logic ser_dat,
  output cfg_t cfg,
  output logic [15:0] frames   // frames received since reset
);
  localparam int unsigned CW = $clog2(FRAME + 1);

  logic [FRAME-2:0] sh;
  logic [CW-1:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      cnt    <= '0;
      cfg    <= '0;
      frames <= '0;
    end else begin
      cfg.we <= 1'b0;
      if (!ser_en) begin
        cnt <= '0;
      end else if (cnt == CW'(FRAME - 1)) begin
        cnt        <= '0;
        cfg.we     <= 1'b1;
        {cfg.target, cfg.addr, cfg.data} <= {sh[FRAME-2:0], ser_dat};
        frames     <= frames + 1'b1;
      end else begin
        sh  <= {sh[FRAME-3:0], ser_dat};
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
