// merge_edac_top: the complete link, transmitter and receiver joined by a
// channel that can flip bits.
//
// The transmitter (edac_tx) turns four data bytes into four 12-bit Hamming
// codewords and a 17-bit Hamming-protected checksum. The five words cross the
// channel, where each received bit is the sent bit XOR the matching bit of
// err1..err5 (all zero for a clean line). The receiver (edac_rx) corrects up to
// one bit per byte, checks the corrected bytes against the checksum and raises
// the 13-bit retrans output when the checksum disagrees.
//
// The sent words (tx_dout1..tx_dout5) are brought out so the line can be
// watched; the error-pattern inputs are this design's way of modelling channel
// noise. Seed pins zero10/zero11 feed both ends and must be zero.
//
// Purely combinational, no clock or reset.
module merge_edac_top
  import edac_pkg::*;
(
  input  logic [BYTE_W-1:0]    datain1,
  input  logic [BYTE_W-1:0]    datain2,
  input  logic [BYTE_W-1:0]    datain3,
  input  logic [BYTE_W-1:0]    datain4,
  input  logic [SUM_W-1:0]     zero10,
  input  logic [SEED_W-1:0]    zero11,
  input  logic [BYTE_CW_W-1:0] err1,
  input  logic [BYTE_CW_W-1:0] err2,
  input  logic [BYTE_CW_W-1:0] err3,
  input  logic [BYTE_CW_W-1:0] err4,
  input  logic [CS_CW_W-1:0]   err5,
  output logic [BYTE_CW_W-1:0] tx_dout1,
  output logic [BYTE_CW_W-1:0] tx_dout2,
  output logic [BYTE_CW_W-1:0] tx_dout3,
  output logic [BYTE_CW_W-1:0] tx_dout4,
  output logic [CS_CW_W-1:0]   tx_dout5,
  output logic [BYTE_W-1:0]    dout1,
  output logic [BYTE_W-1:0]    dout2,
  output logic [BYTE_W-1:0]    dout3,
  output logic [BYTE_W-1:0]    dout4,
  output logic [RETRANS_W-1:0] retrans
);

  edac_tx u_tx (
    .datain1 (datain1),
    .datain2 (datain2),
    .datain3 (datain3),
    .datain4 (datain4),
    .zero10  (zero10),
    .zero11  (zero11),
    .dout1   (tx_dout1),
    .dout2   (tx_dout2),
    .dout3   (tx_dout3),
    .dout4   (tx_dout4),
    .dout5   (tx_dout5)
  );

  edac_rx u_rx (
    .datain1 (tx_dout1 ^ err1),
    .datain2 (tx_dout2 ^ err2),
    .datain3 (tx_dout3 ^ err3),
    .datain4 (tx_dout4 ^ err4),
    .datain5 (tx_dout5 ^ err5),
    .zero10  (zero10),
    .zero11  (zero11),
    .dout1   (dout1),
    .dout2   (dout2),
    .dout3   (dout3),
    .dout4   (dout4),
    .retrans (retrans)
  );

endmodule
