// scu_sync: serial-to-parallel conversion and word alignment of the command
// input (the 'Sync' part of the SCU).
//
// The command stream arrives one bit per 160 MHz cycle, MSB first. A 16-bit
// shift register (SIPO) is compared every cycle with the Sync word
// 10000001_01111110. A free-running 4-bit phase counter records at which
// phase a Sync was seen. After LOCK_SYNCS (5) Syncs at the same phase the
// link is locked: from then on the shift register is taken as a word each
// time the phase counter reaches the locked phase, so the first word after
// the fifth Sync is the first meaningful one. A Sync at another phase before
// lock restarts the count; after lock it, or LOSS_FRAMES (64) words without
// any Sync, drops the lock. These rules follow the specification.
//
// Data Sync (own scheme): a taken word is held 16 fast cycles and its valid
// flag exactly 8 fast cycles. The 20 MHz clock is clk160/8 from the same
// source, so exactly one of its rising edges falls inside the window: the
// 20 MHz side registers word and flag and sees one valid cycle per word.
// div8_rst pulses on each detected Sync to align the 20 MHz clock phase.
// Lock status is passed to the 20 MHz domain through two flip-flops.
module scu_sync #(
  parameter logic [15:0] SYNC_WORD   = 16'h817E,
  parameter int unsigned LOCK_SYNCS  = 5,
  parameter int unsigned LOSS_FRAMES = 64
) (
  input  logic        clk160,
  input  logic        rst_n,         // 160 MHz domain reset, active low
  input  logic        rx_dat,
  output logic        div8_rst,
  input  logic        clk20,
  input  logic        rst20_n,
  output logic [15:0] rx_sync_data,  // 20 MHz domain
  output logic        rx_sync_valid, // one 20 MHz cycle per word
  output logic        sync_locked_out
);
  logic [15:0] sipo;
  logic [3:0]  phase_cnt, phase_last_sync;
  logic [3:0]  sync_cnt;
  logic        locked;
  logic [6:0]  nosync_cnt;
  logic [15:0] word_q;
  logic [2:0]  vld_cnt;      // remaining cycles of the valid window
  logic        word_vld;

  // bits shifted in so far include a full Sync at the next edge?
  logic [15:0] sipo_next;
  logic        sync_hit;
  assign sipo_next = {sipo[14:0], rx_dat};
  assign sync_hit  = (sipo == SYNC_WORD);
  assign div8_rst  = sync_hit;

  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) begin
      sipo            <= '0;
      phase_cnt       <= '0;
      phase_last_sync <= '0;
      sync_cnt        <= '0;
      locked          <= 1'b0;
      nosync_cnt      <= '0;
      word_q          <= '0;
      vld_cnt         <= '0;
    end else begin
      sipo      <= sipo_next;
      phase_cnt <= phase_cnt + 4'd1;
      if (vld_cnt != 3'd0) vld_cnt <= vld_cnt - 3'd1;

      if (!locked) begin
        if (sync_hit) begin
          phase_last_sync <= phase_cnt;
          if (sync_cnt != 4'd0 && phase_cnt == phase_last_sync) begin
            if (sync_cnt == 4'(LOCK_SYNCS - 1)) begin
              locked     <= 1'b1;
              nosync_cnt <= '0;
            end
            sync_cnt <= sync_cnt + 4'd1;
          end else begin
            sync_cnt <= 4'd1;
          end
        end
      end else if (phase_cnt == phase_last_sync) begin
        // word boundary of the locked link
        word_q  <= sipo;
        vld_cnt <= 3'd7;    // this cycle plus 7 more = 8 fast cycles
        if (sync_hit) begin
          nosync_cnt <= '0;
        end else if (nosync_cnt == 7'(LOSS_FRAMES - 1)) begin
          locked   <= 1'b0;
          sync_cnt <= '0;
        end else begin
          nosync_cnt <= nosync_cnt + 7'd1;
        end
      end else if (sync_hit) begin
        // Sync at a phase that does not match the lock
        locked   <= 1'b0;
        sync_cnt <= '0;
      end
    end
  end

  // valid window: set in the cycle the word is taken, lasts 8 fast cycles
  logic vld_win;
  always_ff @(posedge clk160 or negedge rst_n) begin
    if (!rst_n) vld_win <= 1'b0;
    else        vld_win <= (locked && phase_cnt == phase_last_sync) || (vld_cnt != 3'd0);
  end
  assign word_vld = vld_win;

  // ---- Data Sync into the 20 MHz domain ----
  logic [1:0] lock_s;
  always_ff @(posedge clk20 or negedge rst20_n) begin
    if (!rst20_n) begin
      rx_sync_data  <= '0;
      rx_sync_valid <= 1'b0;
      lock_s        <= '0;
    end else begin
      rx_sync_valid <= word_vld;
      if (word_vld) rx_sync_data <= word_q;
      lock_s <= {lock_s[0], locked};
    end
  end
  assign sync_locked_out = lock_s[1];

endmodule
