// txu: transmission unit.
//
// Collects what leaves the chip and sends it over one 320 Mb/s line. In the
// 20 MHz domain, register-readback words from the control unit (24-bit
// hitcmd) and 35-bit pixel words from the trigger unit enter the dual-clock
// FIFO; readback has priority, pixel words wait (pix_ready low). A pixel word
// is stored as five bytes of {select, 7 data bits}, the select bit set on
// the first byte of the hit. The framer reads the FIFO at 32 MHz and emits
// 10-bit 8b/10b symbols; the serializer shifts them out with both edges of
// the 160 MHz clock. A readback word arriving while the FIFO is full is lost
// and flagged on cmd_drop. The FIFO / framing / serializer chain and the
// three clocks follow the transmission-unit diagram; the write priority and
// the meaning of the select bits are this design's own.
module txu
  import obelix_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk20,
  input  logic              rst20_n,
  input  logic              clk32,
  input  logic              rst32_n,
  input  logic              clk160,
  input  logic              rst160_n,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  pix_word_t         pix_data,
  input  logic              hitcmd_valid,
  input  logic [CMDF_W-1:0] hitcmd,
  output logic              cmd_drop,
  output logic              tx_out,
  output logic [9:0]        sym,
  output logic              hit_sent
);
  // pixel word -> 5 x {select, 7 bits}
  function automatic logic [PIXF_W-1:0] pix_bytes(input logic [PIX_W-1:0] p);
    logic [PIXF_W-1:0] r;
    for (int b = 0; b < 5; b++) begin
      r[PIXF_W-1 - 8*b -: 8] = {(b == 0), p[PIX_W-1 - 7*b -: 7]};
    end
    return r;
  endfunction

  logic      wfull, wen, rempty, ren;
  txf_word_t wword, rword;

  always_comb begin
    wen   = 1'b0;
    wword = '{is_cmd: 1'b0, data: pix_bytes(pix_data)};
    if (hitcmd_valid) begin
      wword = '{is_cmd: 1'b1, data: PIXF_W'(hitcmd)};
      wen   = !wfull;
    end else if (pix_valid) begin
      wen   = !wfull;
    end
  end
  assign pix_ready = !wfull && !hitcmd_valid;
  assign cmd_drop  = hitcmd_valid && wfull;

  async_fifo #(.W($bits(txf_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk20), .wrst_n(rst20_n), .wen(wen), .wdata(wword), .wfull(wfull),
    .rclk(clk32), .rrst_n(rst32_n), .ren(ren), .rdata(rword), .rempty(rempty)
  );

  frame_gen u_frame (
    .clk(clk32), .rst_n(rst32_n), .fifo_rdata(rword), .fifo_empty(rempty), .fifo_ren(ren),
    .sym(sym), .sym_byte(), .sym_k(), .hit_sent(hit_sent)
  );

  serializer u_ser (.clk(clk160), .rst_n(rst160_n), .din(sym), .tx_out(tx_out), .load());

endmodule
