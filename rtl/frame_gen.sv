// frame_gen: frame generation of the transmission unit.
//
// Reads the transmit FIFO (first-word-fall-through) and emits one 8b/10b
// symbol per 32 MHz cycle, which at 10 bits per symbol is the 320 Mb/s line
// rate. Four kinds of byte are sent: the IDLE character K28.1, the package
// keywords (SOF/EOF of command and hit packages), command data and pixel
// data. Packages:
//   command: IDLE, SOF_C, cmd_addr, data[15:8], data[7:0], EOF_C, IDLE
//   pixel:   IDLE, SOF_H, 5 bytes per hit (repeated while hits follow), EOF_H, IDLE
// A pixel FIFO word is already split into five bytes of {select bit, 7 data
// bits}, most significant first. A FIFO word is popped when its SOF, or for
// a following hit its first byte, is chosen. The symbol register 'sym'
// changes on the rising edge of clk and holds for the whole cycle. The
// package layouts, the 4 data types and K28.1 idle follow the
// specification; the K-code choices for SOF/EOF (SOF_C K28.2, EOF_C K28.3,
// SOF_H K28.6, EOF_H K28.4) and hit chaining are this design's own.
module frame_gen
  import obelix_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  txf_word_t fifo_rdata,
  input  logic      fifo_empty,
  output logic      fifo_ren,
  output logic [9:0] sym,
  output logic [7:0] sym_byte,  // unencoded byte of sym, for observation
  output logic       sym_k,
  output logic       hit_sent   // pulses when the last byte of a hit is chosen
);
  typedef enum logic [2:0] {ST_IDLE, ST_SOFC, ST_CDAT, ST_EOFC, ST_SOFH, ST_HDAT, ST_EOFH} st_t;

  st_t               st;
  logic [PIXF_W-1:0] buf_q;
  logic [2:0]        cnt;
  logic              rd;

  logic [7:0] byte_n;
  logic       k_n;
  st_t        st_n;
  logic       load;
  logic [2:0] cnt_n;

  always_comb begin
    st_n     = st;
    cnt_n    = cnt;
    load     = 1'b0;
    byte_n   = K28_1;
    k_n      = 1'b1;
    hit_sent = 1'b0;
    unique case (st)
      ST_IDLE: begin
        if (!fifo_empty) st_n = fifo_rdata.is_cmd ? ST_SOFC : ST_SOFH;
      end
      ST_SOFC: begin byte_n = K28_2; load = 1'b1; cnt_n = '0; st_n = ST_CDAT; end
      ST_CDAT: begin
        k_n    = 1'b0;
        byte_n = buf_q[CMDF_W-1 - 8*cnt -: 8];
        cnt_n  = cnt + 3'd1;
        if (cnt == 3'd2) st_n = ST_EOFC;
      end
      ST_EOFC: begin byte_n = K28_3; st_n = ST_IDLE; end
      ST_SOFH: begin byte_n = K28_6; load = 1'b1; cnt_n = '0; st_n = ST_HDAT; end
      ST_HDAT: begin
        k_n    = 1'b0;
        byte_n = buf_q[PIXF_W-1 - 8*cnt -: 8];
        cnt_n  = cnt + 3'd1;
        if (cnt == 3'd4) begin
          hit_sent = 1'b1;
          cnt_n    = '0;
          if (!fifo_empty && !fifo_rdata.is_cmd) load = 1'b1;
          else                                   st_n = ST_EOFH;
        end
      end
      default: begin byte_n = K28_4; st_n = ST_IDLE; end  // ST_EOFH
    endcase
  end
  assign fifo_ren = load;

  logic [9:0] code_n;
  logic       rd_n;
  enc8b10b u_enc (.din(byte_n), .k(k_n), .rd_in(rd), .code(code_n), .rd_out(rd_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= ST_IDLE;
      cnt      <= '0;
      buf_q    <= '0;
      rd       <= 1'b0;
      sym      <= 10'b0;
      sym_byte <= '0;
      sym_k    <= 1'b0;
    end else begin
      st       <= st_n;
      cnt      <= cnt_n;
      if (load) buf_q <= fifo_rdata.data;
      rd       <= rd_n;
      sym      <= code_n;
      sym_byte <= byte_n;
      sym_k    <= k_n;
    end
  end

endmodule
