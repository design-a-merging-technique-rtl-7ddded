// edac_ref_pkg: reference model for the link's testbenches.
//
// The encoders are written out as explicit parity equations (H1..H5 over the
// data bits D1..D12, D1 = most significant data bit, position 1 = most
// significant codeword bit). The decoders do not compute a syndrome at all:
// they search every possible data word for the codeword at Hamming distance 0
// or 1 from the received word. A distance-1 hit on a data bit yields the
// corrected data; a hit on a parity bit, or no hit, yields all zeros, which is
// the link's rule for a syndrome that does not name a data bit.
// The checksum is the 12-bit two's complement of the byte sum; RETRANS is
// (sum implied by the checksum) - (sum of received bytes), 13 bits.
package edac_ref_pkg;

  function automatic logic [11:0] ref_enc8(input logic [7:0] d);
    logic d1, d2, d3, d4, d5, d6, d7, d8;
    {d1, d2, d3, d4, d5, d6, d7, d8} = d;
    return {d1^d2^d4^d5^d7, d1^d3^d4^d6^d7, d1, d2^d3^d4^d8, d2, d3, d4,
            d5^d6^d7^d8, d5, d6, d7, d8};
  endfunction

  function automatic logic [16:0] ref_enc12(input logic [11:0] d);
    logic d1, d2, d3, d4, d5, d6, d7, d8, d9, d10, d11, d12;
    {d1, d2, d3, d4, d5, d6, d7, d8, d9, d10, d11, d12} = d;
    return {d1^d2^d4^d5^d7^d9^d11^d12,          // H1  (pos 1)
            d1^d3^d4^d6^d7^d10^d11,             // H2  (pos 2)
            d1,                                 // pos 3
            d2^d3^d4^d8^d9^d10^d11,             // H3  (pos 4)
            d2, d3, d4,                         // pos 5-7
            d5^d6^d7^d8^d9^d10^d11,             // H4  (pos 8)
            d5, d6, d7, d8, d9, d10, d11,       // pos 9-15
            d12,                                // H5  (pos 16)
            d12};                               // pos 17
  endfunction

  // Position-16 parity covers only position 17, so H5 == D12.

  function automatic bit is_pow2(input int p);
    return (p > 0) && ((p & (p - 1)) == 0);
  endfunction

  // Nearest-codeword decoder for 12-bit byte codewords.
  function automatic logic [7:0] ref_dec8(input logic [11:0] c);
    for (int d = 0; d < 256; d++) begin
      logic [11:0] diff;
      diff = c ^ ref_enc8(8'(d));
      if (diff == '0) return 8'(d);
      if ($countones(diff) == 1) begin
        int p;
        for (int b = 0; b < 12; b++) if (diff[b]) p = 12 - b;
        return is_pow2(p) ? 8'h00 : 8'(d);
      end
    end
    return 8'h00;
  endfunction

  // Nearest-codeword decoder for the 17-bit checksum codeword.
  function automatic logic [11:0] ref_dec12(input logic [16:0] c);
    for (int d = 0; d < 4096; d++) begin
      logic [16:0] diff;
      diff = c ^ ref_enc12(12'(d));
      if (diff == '0) return 12'(d);
      if ($countones(diff) == 1) begin
        int p;
        for (int b = 0; b < 17; b++) if (diff[b]) p = 17 - b;
        return is_pow2(p) ? 12'h000 : 12'(d);
      end
    end
    return 12'h000;
  endfunction

  function automatic logic [11:0] ref_checksum(input logic [7:0] b1, b2, b3, b4);
    int s;
    s = int'(b1) + int'(b2) + int'(b3) + int'(b4);
    return 12'((4096 - s) % 4096);
  endfunction

  function automatic logic [12:0] ref_retrans(input logic [7:0] b1, b2, b3, b4,
                                              input logic [11:0] cs);
    int expected, received;
    expected = (4096 - int'(cs)) % 4096;
    received = int'(b1) + int'(b2) + int'(b3) + int'(b4);
    return 13'((expected - received + 8192) % 8192);
  endfunction

endpackage
