// cru: control unit.
//
// Receives the aligned 16-bit command words from the SCU and drives the rest
// of the chip: the command decoder matches trigger frames and executes
// register and periphery commands, the trigger arbiter turns trigger frames
// into the one-bit trigger with its trigger ID for the trigger unit, and the
// global configuration registers hold the trigger latency and control bits.
// A RdReg command produces a 24-bit readback word {addr[7:0], data[15:0]}
// (8-bit cmd_addr + 16-bit register value) with a one-cycle hitcmd_valid,
// two cycles after the command's last word. Everything runs on the 20 MHz
// clock. The split into CMD match / CMD FSM / TriggerAbtri / GCR follows
// the control-unit block diagram.
module cru
  import obelix_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          rx_sync_data,
  input  logic                 rx_sync_valid,
  input  logic [3:0]           chip_id,
  output logic                 trigger,
  output logic [TRIG_ID_W-1:0] trig_id,
  output logic [8:0]           trig_latency,
  output logic                 hit_en,
  output logic                 clear,
  output logic                 glb_pulse,
  output logic                 cal,
  output logic [19:0]          cal_data,
  output logic [CMDF_W-1:0]    hitcmd,
  output logic                 hitcmd_valid,
  output logic                 sym_err,
  output logic                 trig_collision
);
  logic        t_valid;
  logic [3:0]  t_pat;
  logic [4:0]  t_tag;
  logic        wr_en, rd_en, trig_en;
  logic [8:0]  wr_addr, rd_addr;
  logic [15:0] wr_data, rd_data;

  cmd_decoder u_cmd (
    .clk(clk), .rst_n(rst_n), .rx_data(rx_sync_data), .rx_valid(rx_sync_valid), .chip_id(chip_id),
    .trig_valid(t_valid), .trig_pat(t_pat), .trig_tag(t_tag),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data), .rd_en(rd_en), .rd_addr(rd_addr),
    .clear(clear), .glb_pulse(glb_pulse), .cal(cal), .cal_data(cal_data), .sym_err(sym_err)
  );

  trigger_arbiter u_trig (
    .clk(clk), .rst_n(rst_n), .trig_valid(t_valid), .trig_pat(t_pat), .trig_tag(t_tag),
    .trig_en(trig_en), .trigger(trigger), .trig_id(trig_id), .collision(trig_collision)
  );

  gcr #(.NUM_REGS(NUM_REGS)) u_gcr (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_addr(rd_addr), .rd_data(rd_data), .trig_latency(trig_latency), .trig_en(trig_en), .hit_en(hit_en)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hitcmd       <= '0;
      hitcmd_valid <= 1'b0;
    end else begin
      hitcmd_valid <= rd_en;
      if (rd_en) hitcmd <= {rd_addr[7:0], rd_data};
    end
  end

endmodule
