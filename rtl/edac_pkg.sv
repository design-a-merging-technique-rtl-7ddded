// edac_pkg: sizes and helper functions shared by the merged Hamming + checksum
// error detection and correction (EDAC) link.
//
// The link carries one 32-bit word as four bytes. Each byte travels as its own
// 12-bit Hamming codeword, and a 12-bit checksum of the four bytes travels as a
// 17-bit Hamming codeword. The widths below are the ones of the transmitter and
// receiver pin tables (8-bit bytes, 12-bit byte codewords, 17-bit checksum
// codeword, 10-bit and 11-bit "zero" seed pins, 13-bit RETRANS output).
//
// parity_count() is the usual Hamming rule: the smallest r with
// 2**r >= m + r + 1, where m is the number of data bits.
package edac_pkg;

  localparam int unsigned NUM_BYTES  = 4;   // 32-bit word split into four groups
  localparam int unsigned BYTE_W     = 8;   // datain1..datain4 width
  localparam int unsigned SUM_W      = 10;  // byte-sum width, also ZERO10 width
  localparam int unsigned CS_W       = 12;  // checksum width before Hamming coding
  localparam int unsigned SEED_W     = 11;  // ZERO11 width
  localparam int unsigned RETRANS_W  = 13;  // RETRANS output width

  // Smallest number of Hamming parity bits r for m data bits: 2**r >= m + r + 1.
  function automatic int unsigned parity_count(input int unsigned m);
    int unsigned r;
    r = 1;
    while ((1 << r) < (m + r + 1)) r++;
    return r;
  endfunction

  // True when codeword position p (1-based) is a parity position (a power of two).
  function automatic bit is_parity_pos(input int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

  // Codeword position (1-based) of data bit D(k+1), k = 0 .. m-1: the k-th
  // position that is not a power of two.
  function automatic int unsigned data_pos(input int unsigned k);
    int unsigned p, n;
    n = 0;
    p = 1;
    while (1) begin
      if (!is_parity_pos(p)) begin
        if (n == k) return p;
        n++;
      end
      p++;
    end
  endfunction

  // Mask over the data word (bit m-1 = D1) of the data bits covered by
  // parity bit H(i+1), i.e. those whose position has bit i set.
  function automatic logic [63:0] parity_data_mask(input int unsigned m, input int unsigned i);
    logic [63:0] mask;
    mask = '0;
    for (int unsigned k = 0; k < m; k++)
      if (((data_pos(k) >> i) & 1) == 1) mask[m-1-k] = 1'b1;
    return mask;
  endfunction

  // Mask over a codeword of width w (bit w-1 = position 1) of every position
  // whose index has bit i set: the positions checked by syndrome bit i.
  function automatic logic [63:0] syndrome_mask(input int unsigned w, input int unsigned i);
    logic [63:0] mask;
    mask = '0;
    for (int unsigned p = 1; p <= w; p++)
      if (((p >> i) & 1) == 1) mask[w-p] = 1'b1;
    return mask;
  endfunction

  localparam int unsigned BYTE_CW_W = BYTE_W + parity_count(BYTE_W);  // 12
  localparam int unsigned CS_CW_W   = CS_W + parity_count(CS_W);      // 17

endpackage
