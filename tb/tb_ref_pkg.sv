// tb_ref_pkg: reference models for the testbenches of the RMS/Hamming link.
//
// These are written independently of rms_pkg. The modulators use signed
// integer arithmetic on constellation points: symbol value times carrier
// sample, where the carrier sample is -1 on even slots and +1 on odd
// slots. The Hamming code uses an explicit table of the message positions
// and a syndrome computed from the parity-check matrix (column p of H is
// the binary value of p).
package tb_ref_pkg;

  // Positions (1..15) that carry message bits 0..10.
  localparam int MSG_POS [11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};

  function automatic int carrier(input int slot);
    return (slot % 2 == 0) ? -1 : 1;
  endfunction

  // Selection table: 86..173 BPSK(0), >173 QPSK(1), <86 QAM(2).
  function automatic logic [1:0] ref_glitter(input logic [7:0] lvl);
    int v;
    v = int'(lvl);
    if (v > 173) return 2'd1;
    if (v < 86)  return 2'd2;
    return 2'd0;
  endfunction

  // Gray pair -> amplitude: 00:-3 01:-1 11:+1 10:+3
  function automatic int gray_level(input logic b1, input logic b0);
    case ({b1, b0})
      2'b00: return -3;
      2'b01: return -1;
      2'b11: return 1;
      default: return 3;
    endcase
  endfunction

  function automatic logic [7:0] ref_mod(input logic [7:0] d, input logic [1:0] mode);
    logic [7:0] r;
    int s, li, lq;
    r = '0;
    case (mode)
      2'd1: begin // QPSK: dibit k = {I,Q} = d[2k+1:2k]
        for (int k = 0; k < 4; k++) begin
          s = (d[2*k+1] ? 1 : -1) * carrier(k);
          r[2*k+1] = (s > 0);
          s = (d[2*k] ? 1 : -1) * carrier(k);
          r[2*k] = (s > 0);
        end
      end
      2'd2: begin // 16-QAM: nibble k, I = d[4k+3:4k+2], Q = d[4k+1:4k]
        for (int k = 0; k < 2; k++) begin
          li = gray_level(d[4*k+3], d[4*k+2]) * carrier(k);
          lq = gray_level(d[4*k+1], d[4*k])   * carrier(k);
          r[4*k+2 +: 2] = 2'((li + 3) / 2);
          r[4*k   +: 2] = 2'((lq + 3) / 2);
        end
      end
      default: begin // BPSK (code 11 too)
        for (int n = 0; n < 8; n++) begin
          s = (d[n] ? 1 : -1) * carrier(n);
          r[n] = (s > 0);
        end
      end
    endcase
    return r;
  endfunction

  function automatic logic [3:0] syndrome15(input logic [15:0] c);
    logic [3:0] s;
    s = '0;
    for (int p = 1; p <= 15; p++) if (c[p-1]) s ^= 4'(p);
    return s;
  endfunction

  function automatic logic [15:0] ref_encode(input logic [10:0] m);
    logic [15:0] c;
    logic [3:0] s;
    c = '0;
    for (int j = 0; j < 11; j++) c[MSG_POS[j]-1] = m[j];
    // choose parity bits so that the syndrome of the data alone is cancelled
    s = syndrome15(c);
    c[0] = s[0];  // position 1
    c[1] = s[1];  // position 2
    c[3] = s[2];  // position 4
    c[7] = s[3];  // position 8
    c[15] = ^c[14:0];
    return c;
  endfunction

  function automatic logic [10:0] ref_extract(input logic [15:0] c);
    logic [10:0] m;
    for (int j = 0; j < 11; j++) m[j] = c[MSG_POS[j]-1];
    return m;
  endfunction

  // Full transmit mapping of one word: select, modulate, pad, encode.
  function automatic logic [15:0] ref_tx(input logic [7:0] d);
    return ref_encode({3'b000, ref_mod(d, ref_glitter(d))});
  endfunction

endpackage
