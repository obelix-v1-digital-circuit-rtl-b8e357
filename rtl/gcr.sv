// gcr: global configuration registers of the control unit.
//
// A small register file addressed with the 9-bit register address of the
// command protocol, 16 bits per register. The command decoder writes it
// (wr_en) and reads it (rd_addr, combinational rd_data). Register 0 holds
// the trigger latency in BCID cycles and register 1 the control bits (bit 0
// trigger enable, bit 1 hit enable); both are also driven out to the units
// that use them. Addresses at or above NUM_REGS read 0 and ignore writes.
// The 9-bit address and 16-bit data follow the data-path diagram; the
// register map, the reset values and the size are this design's own.
module gcr
  import obelix_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [8:0]  wr_addr,
  input  logic [15:0] wr_data,
  input  logic [8:0]  rd_addr,
  output logic [15:0] rd_data,
  output logic [8:0]  trig_latency,
  output logic        trig_en,
  output logic        hit_en
);
  logic [15:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) begin
        regs[i] <= (i == REG_LATENCY) ? LATENCY_DEFAULT :
                   (i == REG_CTRL)    ? CTRL_DEFAULT    : 16'h0000;
      end
    end else if (wr_en && wr_addr < 9'(NUM_REGS)) begin
      regs[wr_addr[$clog2(NUM_REGS)-1:0]] <= wr_data;
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr < 9'(NUM_REGS)) rd_data = regs[rd_addr[$clog2(NUM_REGS)-1:0]];
  end

  assign trig_latency = regs[REG_LATENCY][8:0];
  assign trig_en      = regs[REG_CTRL][0];
  assign hit_en       = regs[REG_CTRL][1];

endmodule
