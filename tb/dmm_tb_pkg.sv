// dmm_tb_pkg: reference models shared by the multimeter testbenches.
//
// Everything here is written independently of the RTL: segment patterns are
// built from the names of the lit segments, readings are computed with the
// scaling written out per meter and explicit sign handling, and decimal
// digits come from formatting the number as text.
package dmm_tb_pkg;

  // Active-low 7-bit pattern, bit 6 = a ... bit 0 = g, from lit segment names
  function automatic logic [6:0] seg_lit(input string lit);
    logic [6:0] p;
    p = 7'b1111111;
    for (int i = 0; i < lit.len(); i++) begin
      p[6 - (lit[i] - "a")] = 1'b0;
    end
    return p;
  endfunction

  function automatic logic [6:0] digit_pattern(input int d);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    return seg_lit(lit[d]);
  endfunction

  // Digit shown by a pattern: 0-9, 10 for minus, 15 for blank, -1 otherwise
  function automatic int digit_of(input logic [6:0] p);
    for (int d = 0; d < 10; d++)
      if (digit_pattern(d) == p) return d;
    if (p == seg_lit("g")) return 10;
    if (p == 7'b1111111)   return 15;
    return -1;
  endfunction

  // Meter reading for an ADC code: code*inc/100 truncated toward zero, minus
  // the offset. sel is one-hot {beta, ohm, amp, volt}; anything else reads 0.
  function automatic void ref_reading(input logic [3:0] sel, input logic [15:0] code,
                                      output int mag, output bit neg);
    int c, inc, off, prod, q;
    c = int'($signed(code));
    case (sel)
      4'b0001: begin inc = 61; off = 0;  end
      4'b0010: begin inc = 75; off = 16; end
      4'b0100: begin inc = 61; off = 0;  end
      4'b1000: begin inc = 61; off = 0;  end
      default: begin inc = 0;  off = 0;  end
    endcase
    prod = c * inc;
    if (prod < 0) q = -((-prod) / 100);
    else          q = prod / 100;
    q = q - off;
    neg = (q < 0);
    mag = neg ? -q : q;
  endfunction

  function automatic logic [2:0] ref_mode(input logic [3:0] sel);
    case (sel)
      4'b0001: return 3'b000;
      4'b0010: return 3'b001;
      4'b0100: return 3'b010;
      4'b1000: return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  function automatic logic [13:0] ref_unit(input logic [3:0] sel);
    case (sel)
      4'b0001: return 14'b10000101110010;                 // "dc"
      4'b0010: return 14'b11010100001000;                 // "nA"
      4'b0100: return {seg_lit("cdeg"), seg_lit("cefg")}; // "oh"
      4'b1000: return {seg_lit("cdefg"), seg_lit("adefg")}; // "bE"
      default: return 14'h3FFF;
    endcase
  endfunction

  // Decimal digit k (0 = least significant) of v
  function automatic int dec_digit(input int v, input int k);
    string s;
    s = $sformatf("%06d", v);
    return int'(s[5 - k]) - 48;
  endfunction

endpackage
