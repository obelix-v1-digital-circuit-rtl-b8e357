// obelix_top: digital periphery of the OBELIX pixel sensor.
//
// Wires the four units of the digital top:
//   SCU  - divides the 160 MHz main clock into 32 MHz and 20 MHz clocks and
//          aligns the serial command stream into 16-bit words;
//   CRU  - decodes the commands, issues triggers with trigger IDs, holds the
//          configuration registers and answers register reads;
//   TRU  - 112 trigger groups store the time-stamped hits of the 448 double
//          columns and pick out those matched by a trigger;
//   TXU  - buffers readback and pixel words, frames them into 8b/10b symbols
//          and serializes them at 320 Mb/s.
// The pixel matrix is outside: each double column delivers hits with a
// valid/ready handshake on the 20 MHz clock (clk20, brought out together
// with the BCID for the matrix's timestamps). The structure and the clock
// domains (160 MHz line, 32 MHz framing, 20 MHz control and trigger logic)
// follow the data-path and clock-path diagrams; the handshakes, widths not
// given there and the status outputs are this design's own.
module obelix_top
  import obelix_pkg::*;
#(
  parameter int unsigned N_TRG    = 112,
  parameter int unsigned NUM_REGS = 16
) (
  input  logic               clk160,
  input  logic               rstb,
  input  logic               rx_dat,
  input  logic [3:0]         chip_id,
  // double-column hit interfaces
  input  logic [4*N_TRG-1:0] dc_valid,
  output logic [4*N_TRG-1:0] dc_ready,
  input  dc_hit_t            dc_hit [4*N_TRG],
  // clocks and timestamp toward the matrix
  output logic               clk20,
  output logic [BCID_W-1:0]  bcid,
  // serial output
  output logic               tx_out,
  // periphery and status
  output logic               sync_locked_out,
  output logic               glb_pulse,
  output logic               cal,
  output logic [19:0]        cal_data,
  output logic               trigger,
  output logic               s1_expired,
  output logic               status_err   // symbol error, trigger collision, overflow or lost readback
);
  logic clk32, rst160_n, rst20_n, rst32_n;
  logic [15:0] rx_sync_data;
  logic        rx_sync_valid;

  scu u_scu (
    .clk160(clk160), .rstb(rstb), .rx_dat(rx_dat),
    .clk20(clk20), .clk32(clk32), .rst160_n(rst160_n), .rst20_n(rst20_n), .rst32_n(rst32_n),
    .rx_sync_data(rx_sync_data), .rx_sync_valid(rx_sync_valid), .sync_locked_out(sync_locked_out)
  );

  logic [TRIG_ID_W-1:0] trig_id;
  logic [8:0]           latency;
  logic                 hit_en, clear, sym_err, collision;
  logic [CMDF_W-1:0]    hitcmd;
  logic                 hitcmd_valid;

  cru #(.NUM_REGS(NUM_REGS)) u_cru (
    .clk(clk20), .rst_n(rst20_n), .rx_sync_data(rx_sync_data), .rx_sync_valid(rx_sync_valid),
    .chip_id(chip_id), .trigger(trigger), .trig_id(trig_id), .trig_latency(latency),
    .hit_en(hit_en), .clear(clear), .glb_pulse(glb_pulse), .cal(cal), .cal_data(cal_data),
    .hitcmd(hitcmd), .hitcmd_valid(hitcmd_valid), .sym_err(sym_err), .trig_collision(collision)
  );

  logic      pix_valid, pix_ready, rq_overflow;
  pix_word_t pix_data;

  tru #(.N_TRG(N_TRG)) u_tru (
    .clk(clk20), .rst_n(rst20_n), .clear(clear), .hit_en(hit_en), .latency(latency),
    .dc_valid(dc_valid), .dc_ready(dc_ready), .dc_hit(dc_hit),
    .trigger(trigger), .trig_id(trig_id),
    .pix_valid(pix_valid), .pix_ready(pix_ready), .pix_data(pix_data),
    .bcid(bcid), .s1_expired(s1_expired), .rq_overflow(rq_overflow)
  );

  logic cmd_drop;
  txu u_txu (
    .clk20(clk20), .rst20_n(rst20_n), .clk32(clk32), .rst32_n(rst32_n),
    .clk160(clk160), .rst160_n(rst160_n),
    .pix_valid(pix_valid), .pix_ready(pix_ready), .pix_data(pix_data),
    .hitcmd_valid(hitcmd_valid), .hitcmd(hitcmd), .cmd_drop(cmd_drop),
    .tx_out(tx_out), .sym(), .hit_sent()
  );

  assign status_err = sym_err || collision || rq_overflow || cmd_drop;

endmodule
