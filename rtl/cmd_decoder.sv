// cmd_decoder: command matcher and command state machine of the control unit.
//
// Works on the aligned 16-bit command words, one rx_valid cycle per word, in
// the 20 MHz domain. The protocol is RD53B: each word holds two 8-bit
// symbols. A word whose first symbol is one of the 15 trigger symbols is a
// trigger (4-bit bunch-crossing pattern plus a 5-bit tag in the second
// symbol) and is matched at once, even between the data words of another
// command. Sync, PLL-lock and Noop words are ignored. Any other word starts
// a command: the first symbol is the command, the second the chip ID
// (bit 4 = broadcast, bits 3:0 compared with chip_id). Multi-word commands
// then collect 10 payload bits (two 5-bit data symbols) per word:
//   WrReg  0x66: 3 words, {mode, addr[8:0], data[15:0], 4 pad bits}
//   RdReg  0x65: 1 word,  {0, addr[8:0]}
//   Cal    0x63: 2 words, 20 calibration bits
//   Clear  0x5A, GlobalPulse 0x5C: no payload.
// A symbol that is not a valid data symbol aborts the command (sym_err).
// All outputs are registered one-cycle pulses, one cycle after the last word.
// The document prescribes RD53B and the 9-bit address / 16-bit data to the
// register file; symbol values and payload layout come from RD53B, and the
// chip-ID rule and error handling are this design's own.
module cmd_decoder
  import obelix_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] rx_data,
  input  logic        rx_valid,
  input  logic [3:0]  chip_id,
  // trigger frames
  output logic        trig_valid,
  output logic [3:0]  trig_pat,
  output logic [4:0]  trig_tag,
  // register access
  output logic        wr_en,
  output logic [8:0]  wr_addr,
  output logic [15:0] wr_data,
  output logic        rd_en,
  output logic [8:0]  rd_addr,
  // periphery pulses
  output logic        clear,
  output logic        glb_pulse,
  output logic        cal,
  output logic [19:0] cal_data,
  output logic        sym_err
);
  typedef enum logic [1:0] {S_IDLE, S_PAYLOAD} state_t;
  typedef enum logic [1:0] {C_WRREG, C_RDREG, C_CAL} cmd_t;

  state_t      state;
  cmd_t        cmd;
  logic        id_ok;
  logic [1:0]  words_left;
  logic [19:0] payload;  // last 20 payload bits

  logic [7:0] hi, lo;
  logic [3:0] pat;
  logic [5:0] dhi, dlo;
  logic       id_match;
  assign hi  = rx_data[15:8];
  assign lo  = rx_data[7:0];
  assign pat = trig_symbol(hi);
  assign dhi = data_symbol(hi);
  assign dlo = data_symbol(lo);
  assign id_match = dlo[5] && (dlo[4] || dlo[3:0] == chip_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd        <= C_WRREG;
      id_ok      <= 1'b0;
      words_left <= '0;
      payload    <= '0;
      trig_valid <= 1'b0;
      trig_pat   <= '0;
      trig_tag   <= '0;
      wr_en      <= 1'b0;
      wr_addr    <= '0;
      wr_data    <= '0;
      rd_en      <= 1'b0;
      rd_addr    <= '0;
      clear      <= 1'b0;
      glb_pulse  <= 1'b0;
      cal        <= 1'b0;
      cal_data   <= '0;
      sym_err    <= 1'b0;
    end else begin
      trig_valid <= 1'b0;
      wr_en      <= 1'b0;
      rd_en      <= 1'b0;
      clear      <= 1'b0;
      glb_pulse  <= 1'b0;
      cal        <= 1'b0;
      sym_err    <= 1'b0;
      if (rx_valid) begin
        if (pat != 4'd0) begin
          // CMD match: trigger frame
          trig_valid <= dlo[5];
          sym_err    <= !dlo[5];
          trig_pat   <= pat;
          trig_tag   <= dlo[4:0];
        end else if (rx_data == SYNC_WORD || rx_data == PLL_LOCK || rx_data == NOOP_WORD) begin
          // link maintenance words: nothing to do
        end else if (state == S_IDLE) begin
          unique case (hi)
            CMD_CLEAR:  clear     <= id_match;
            CMD_GPULSE: glb_pulse <= id_match;
            CMD_WRREG: begin state <= S_PAYLOAD; cmd <= C_WRREG; words_left <= 2'd3; end
            CMD_RDREG: begin state <= S_PAYLOAD; cmd <= C_RDREG; words_left <= 2'd1; end
            CMD_CAL:   begin state <= S_PAYLOAD; cmd <= C_CAL;   words_left <= 2'd2; end
            default:   sym_err <= 1'b1;
          endcase
          id_ok   <= id_match;
          payload <= '0;
        end else begin
          // S_PAYLOAD: two data symbols per word
          if (!dhi[5] || !dlo[5]) begin
            sym_err <= 1'b1;
            state   <= S_IDLE;
          end else begin
            logic [29:0] p;
            p = {payload[19:0], dhi[4:0], dlo[4:0]};
            payload    <= p[19:0];
            words_left <= words_left - 2'd1;
            if (words_left == 2'd1) begin
              state <= S_IDLE;
              unique case (cmd)
                C_WRREG: begin
                  wr_en   <= id_ok;
                  wr_addr <= p[28:20];
                  wr_data <= p[19:4];
                end
                C_RDREG: begin
                  rd_en   <= id_ok;
                  rd_addr <= p[8:0];
                end
                default: begin
                  cal      <= id_ok;
                  cal_data <= p[19:0];
                end
              endcase
            end
          end
        end
      end
    end
  end

endmodule
