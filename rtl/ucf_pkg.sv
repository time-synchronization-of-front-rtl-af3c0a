// ucf_pkg: types, constants and 8b/10b code tables shared by the UCF link
// transmit and receive logic.
//
// The link carries one 16-bit word per 155.52 MHz clock, sent as two 8b/10b
// symbols (20 bits, 3.1104 Gb/s). Byte 0 of a word is sent first. A 10-bit
// symbol is held with bit 0 = code bit 'a', the first bit on the line; a
// 20-bit word holds byte 0's symbol in bits [9:0].
//
// The link rate, the 8b/10b code and the 64 streams per link follow the
// UCF description. The framing below (idle word, packet start, TCS command
// byte) is this design's own choice, since the UCF packet format itself is
// not given:
//   idle word    : {D21.5, K28.5}     K28.5 (comma) in byte 0
//   packet start : {stream id, K28.2} stream 0 is the TCS stream
//   TCS payload  : {~flags, flags}    flags = {trigger, reset, sync}
package ucf_pkg;

  localparam int unsigned N_STREAMS_MAX = 64;
  localparam int unsigned STREAM_W      = $clog2(N_STREAMS_MAX);

  localparam logic [7:0] K28_5 = 8'hBC;   // comma, word alignment
  localparam logic [7:0] K28_2 = 8'h5C;   // start of packet
  localparam logic [7:0] D21_5 = 8'hB5;   // idle filler
  localparam logic [STREAM_W-1:0] TCS_STREAM = '0;

  // 10-bit forms of K28.5 in transmit order (bit 0 first), both disparities.
  localparam logic [9:0] K28_5_RDN = 10'h17C;
  localparam logic [9:0] K28_5_RDP = 10'h283;

  // TCS commands carried in the TCS stream payload.
  typedef struct packed {
    logic trigger;
    logic reset;
    logic sync;
  } tcs_cmd_t;

  // One UCF word before encoding / after decoding.
  typedef struct packed {
    logic [15:0] data;
    logic [1:0]  charisk;
  } ucf_word_t;

  // 5b/6b code for running disparity negative, written abcdei (a = MSB).
  function automatic logic [5:0] code6_rdn(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  function automatic logic [2:0] ones6(input logic [5:0] c);
    return 3'(c[0]) + 3'(c[1]) + 3'(c[2]) + 3'(c[3]) + 3'(c[4]) + 3'(c[5]);
  endfunction

  function automatic logic [2:0] ones4(input logic [3:0] c);
    return 3'(c[0]) + 3'(c[1]) + 3'(c[2]) + 3'(c[3]);
  endfunction

  // 6-bit sub-block for EDCBA = x at running disparity rd (1 = positive).
  // k selects K28 (only K28.y control symbols are used on this link).
  function automatic logic [5:0] enc6(input logic [4:0] x, input logic k, input logic rd);
    logic [5:0] c;
    c = k ? 6'b001111 : code6_rdn(x);
    if (rd && (ones6(c) != 3'd3 || (!k && x == 5'd7))) c = ~c;
    return c;
  endfunction

  // 4-bit sub-block fghj for HGF = y, given the 5-bit part x and the running
  // disparity rd after the 6-bit sub-block.
  function automatic logic [3:0] enc4(input logic [2:0] y, input logic [4:0] x,
                                      input logic k, input logic rd);
    logic [3:0] c;
    if (k) begin
      case (y)
        3'd0: c = 4'b1011; 3'd1: c = 4'b0110; 3'd2: c = 4'b1010; 3'd3: c = 4'b1100;
        3'd4: c = 4'b1101; 3'd5: c = 4'b0101; 3'd6: c = 4'b1001; default: c = 4'b0111;
      endcase
      if (rd) c = ~c;
    end else begin
      case (y)
        3'd0: c = 4'b1011; 3'd1: c = 4'b1001; 3'd2: c = 4'b0101; 3'd3: c = 4'b1100;
        3'd4: c = 4'b1101; 3'd5: c = 4'b1010; 3'd6: c = 4'b0110;
        default: begin
          // alternate D.x.A7 avoids a run of five equal bits across sub-blocks
          if ((!rd && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd && (x == 5'd11 || x == 5'd13 || x == 5'd14)))
            c = 4'b0111;
          else
            c = 4'b1110;
        end
      endcase
      if (rd && (ones4(c) != 3'd2 || y == 3'd3)) c = ~c;
    end
    return c;
  endfunction

  // Running disparity after a sub-block with the given number of ones.
  function automatic logic rd_after(input logic rd, input logic [2:0] ones, input logic [2:0] half);
    if (ones > half) return 1'b1;
    if (ones < half) return 1'b0;
    return rd;
  endfunction

  // Reverse a 10-bit abcdeifghj code (a = MSB) into transmit order (a = bit 0).
  function automatic logic [9:0] to_line(input logic [9:0] c);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = c[9-i];
    return r;
  endfunction

endpackage
