// enc8b10b: 8b/10b line encoder (combinational).
//
// Encodes one byte, or a control character when k is high, into a 10-bit
// DC-balanced symbol with the standard 5b/6b and 3b/4b tables and the
// running disparity rd_in (0 = negative, 1 = positive). code[0] is bit 'a',
// the first bit on the line, up to code[9] = 'j'. rd_out is the disparity
// after the symbol. Only the K28.y control characters are needed by the
// framer; other k values encode as the data byte. The line code is this
// design's reading of the 10-bit symbols and the K28.1 idle character of
// the specification.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  // 5b/6b codes for negative running disparity, written abcdei (a = MSB)
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;  5'd2:  return 6'b101101;
      5'd3:  return 6'b110001;  5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;  5'd8:  return 6'b111001;
      5'd9:  return 6'b100101;  5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;  5'd14: return 6'b011100;
      5'd15: return 6'b010111;  5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;  5'd20: return 6'b001011;
      5'd21: return 6'b101010;  5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;  5'd26: return 6'b010110;
      5'd27: return 6'b110110;  5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b codes for negative running disparity, written fghj (f = MSB)
  function automatic logic [3:0] tab4d(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;  3'd2: return 4'b0101;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction
  function automatic logic [3:0] tab4k(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;  3'd2: return 4'b1010;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  always_comb begin
    logic [4:0] x;
    logic [2:0] y;
    logic       kk, rd_mid;
    logic [5:0] c6;
    logic [3:0] c4;
    x  = din[4:0];
    y  = din[7:5];
    kk = k && (x == 5'd28);
    // 6b sub-block
    c6 = kk ? 6'b001111 : tab6(x);
    if (rd_in && ($countones(c6) != 3 || x == 5'd7)) c6 = ~c6;
    rd_mid = ($countones(c6) == 3) ? rd_in : ($countones(c6) > 3);
    // 4b sub-block
    if (kk) begin
      c4 = tab4k(y);
    end else if (y == 3'd7 && ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                               ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)))) begin
      c4 = 4'b0111;  // alternate D.x.A7
    end else begin
      c4 = tab4d(y);
    end
    if (rd_mid && ($countones(c4) != 2 || (!kk && y == 3'd3) || kk)) c4 = ~c4;
    rd_out = ($countones(c4) == 2) ? rd_mid : ($countones(c4) > 2);
    code   = {<<{c6, c4}};  // a..j -> code[0]..code[9]
  end

endmodule
