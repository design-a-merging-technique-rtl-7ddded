// hamming_dec: Hamming decoder with single-bit correction, combinational.
//
// Takes a CODE_W-bit codeword laid out as hamming_enc writes it (position 1 =
// most significant bit, parity at power-of-two positions) and recovers the
// DATA_W data bits. The syndrome is the XOR of the indices of all positions
// holding a 1; it is zero for a clean word and equals the position of the
// flipped bit when exactly one bit is wrong.
//
// Syndrome handling:
//   * zero                        -> data passed through unchanged
//   * a data position             -> that data bit is inverted (corrected_o = 1)
//   * a parity position, or an index beyond CODE_W
//                                 -> nonzero_o = 1, corrected_o = 0; with
//                                    ZERO_ON_NON_DATA_SYNDROME = 1 the data
//                                    output is forced to all zeros.
// Forcing zeros for a non-data syndrome reproduces the link's reference
// results (received 12'hAB1 and 12'hAFD both decode to 8'h00); it is this
// decoder's default. With the parameter at 0 a parity-position syndrome leaves
// the data as received, the textbook behaviour. Either way the checksum
// receiver downstream sees the byte as wrong and raises RETRANS.
//
// Interface: code_i in; data_o, syndrome_o, corrected_o (a data bit was
// flipped back), nonzero_o (syndrome was not zero) out. No clock.
module hamming_dec
  import edac_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter bit ZERO_ON_NON_DATA_SYNDROME = 1'b1,
  localparam int unsigned R      = parity_count(DATA_W),
  localparam int unsigned CODE_W = DATA_W + R
) (
  input  logic [CODE_W-1:0] code_i,
  output logic [DATA_W-1:0] data_o,
  output logic [R-1:0]      syndrome_o,
  output logic              corrected_o,
  output logic              nonzero_o
);

  logic [R-1:0]      syn;
  logic [DATA_W-1:0] raw;    // data bits as received
  logic [DATA_W-1:0] flip;   // one-hot: the data bit the syndrome names

  // Syndrome bit i: parity over every position whose index has bit i set.
  for (genvar i = 0; i < R; i++) begin : g_syndrome
    localparam logic [CODE_W-1:0] MASK = CODE_W'(syndrome_mask(CODE_W, i));
    assign syn[i] = ^(code_i & MASK);
  end

  // Data bit D(k+1) sits at position data_pos(k); it is inverted when the
  // syndrome equals that position.
  for (genvar k = 0; k < DATA_W; k++) begin : g_data
    localparam int unsigned P = data_pos(k);
    assign raw[DATA_W-1-k]  = code_i[CODE_W-P];
    assign flip[DATA_W-1-k] = (syn == R'(P));
  end

  always_comb begin
    syndrome_o  = syn;
    nonzero_o   = (syn != '0);
    corrected_o = (flip != '0);
    if (nonzero_o && !corrected_o && ZERO_ON_NON_DATA_SYNDROME)
      data_o = '0;
    else
      data_o = raw ^ flip;
  end

endmodule
