// qpsk_ref_pkg: reference model used by the transmitter testbenches.
//
// Written independently of the RTL: it builds the expected serial packet
// stream (26-bit preamble = 13-bit Barker code with every bit doubled, then
// 174 data bits "Hello world mmm" in 7-bit ASCII padded with zeros, scrambled
// with 1 + z^-1 + z^-2 + z^-4 across packets), the expected QPSK symbols
// (Gray, pi/4 offset, amplitude 23170/32768), and RRC taps from the closed
// form, for comparison with the fixed tap table.
package qpsk_ref_pkg;

  localparam int PRE  = 26;
  localparam int DAT  = 174;
  localparam int PKT  = PRE + DAT;
  localparam int AMP  = 23170;

  // Preamble written out in full.
  localparam bit [25:0] PREAMBLE_BITS = 26'b11_11_11_11_11_00_00_11_11_00_11_00_11;

  // Unscrambled data bit pos of message msg.
  function automatic bit raw_data_bit(int msg, int pos);
    string s;
    byte   ch;
    s = $sformatf("Hello world %03d", msg);
    if (pos >= 7 * s.len()) return 1'b0;
    ch = s[pos / 7];
    return ch[6 - pos % 7];
  endfunction

  // Expected serial stream from reset: npkt packets.
  // scr_flag[n] is set where scrambling changed a data bit.
  function automatic void build_stream(int num_msg, int npkt, ref bit s[$], ref bit scr_flag[$]);
    bit [3:0] hist;  // hist[0] = last scrambled bit
    bit d, o;
    s.delete();
    scr_flag.delete();
    hist = '0;
    for (int p = 0; p < npkt; p++) begin
      for (int i = 0; i < PRE; i++) begin
        s.push_back(PREAMBLE_BITS[25 - i]);
        scr_flag.push_back(1'b0);
      end
      for (int i = 0; i < DAT; i++) begin
        d = raw_data_bit(p % num_msg, i);
        o = d ^ hist[0] ^ hist[1] ^ hist[3];
        hist = {hist[2:0], o};
        s.push_back(o);
        scr_flag.push_back(o != d);
      end
    end
  endfunction

  // Ideal QPSK symbol (I, Q) for the bit pair (first, second).
  function automatic void map_pair(bit first, bit second, output int i, output int q);
    case ({second, first})
      2'd0: begin i =  AMP; q =  AMP; end
      2'd1: begin i = -AMP; q =  AMP; end
      2'd3: begin i = -AMP; q = -AMP; end
      default: begin i =  AMP; q = -AMP; end
    endcase
  endfunction

  // Closed-form RRC tap n of 41 (roll-off 0.5, 4 samples/symbol), not yet normalised.
  function automatic real rrc_raw(int n);
    real pi, b, t, den;
    pi = 3.14159265358979;
    b  = 0.5;
    t  = (n - 20) / 4.0;
    if (n == 20) return 1.0 - b + 4.0 * b / pi;
    den = 1.0 - (4.0 * b * t) ** 2;
    if (den < 1e-9 && den > -1e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * b)) +
                               (1.0 - 2.0 / pi) * $cos(pi / (4.0 * b)));
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b))) / (pi * t * den);
  endfunction

endpackage
