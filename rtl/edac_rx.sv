// edac_rx: receiver of the merged Hamming + checksum link.
//
// Four 12-bit byte codewords (datain1..datain4) each pass through an 8-bit
// Hamming decoder, which corrects one flipped bit per byte; the corrected bytes
// are dout1..dout4. The 17-bit checksum codeword datain5 passes through a
// 12-bit Hamming decoder. The checksum checker then compares the sum of the
// corrected bytes with the sum implied by the checksum and drives the 13-bit
// RETRANS output: zero means the four bytes are good, anything else means more
// errors arrived than the Hamming stage could repair and the word must be sent
// again. Examples: bytes EEE EE7 EEB EED with checksum word 05208 -> four
// bytes FF and RETRANS 0 (four single-bit errors corrected, one per byte);
// AB1 EE7 CDE AFD with 05208 -> 00 FF 6E 00 and RETRANS 13'h028F.
//
// A decoder whose syndrome does not point at a data bit outputs a zero byte
// (hamming_dec, ZERO_ON_NON_DATA_SYNDROME = 1, the default), which the checksum
// then flags.
//
// Purely combinational, no clock or reset.
module edac_rx
  import edac_pkg::*;
(
  input  logic [BYTE_CW_W-1:0] datain1,
  input  logic [BYTE_CW_W-1:0] datain2,
  input  logic [BYTE_CW_W-1:0] datain3,
  input  logic [BYTE_CW_W-1:0] datain4,
  input  logic [CS_CW_W-1:0]   datain5,
  input  logic [SUM_W-1:0]     zero10,
  input  logic [SEED_W-1:0]    zero11,
  output logic [BYTE_W-1:0]    dout1,
  output logic [BYTE_W-1:0]    dout2,
  output logic [BYTE_W-1:0]    dout3,
  output logic [BYTE_W-1:0]    dout4,
  output logic [RETRANS_W-1:0] retrans
);

  localparam int unsigned BYTE_R = parity_count(BYTE_W);
  localparam int unsigned CS_R   = parity_count(CS_W);

  logic [NUM_BYTES-1:0][BYTE_CW_W-1:0] codes;
  logic [NUM_BYTES-1:0][BYTE_W-1:0]    bytes;
  logic [NUM_BYTES-1:0][BYTE_R-1:0]    byte_syn;
  logic [NUM_BYTES-1:0]                byte_corr, byte_nz;
  logic [CS_W-1:0]                     checksum;
  logic [CS_R-1:0]                     cs_syn;
  logic                                cs_corr, cs_nz;

  assign codes = {datain4, datain3, datain2, datain1};

  for (genvar b = 0; b < NUM_BYTES; b++) begin : g_byte_dec
    hamming_dec #(.DATA_W(BYTE_W)) u_dec (
      .code_i      (codes[b]),
      .data_o      (bytes[b]),
      .syndrome_o  (byte_syn[b]),
      .corrected_o (byte_corr[b]),
      .nonzero_o   (byte_nz[b])
    );
  end

  hamming_dec #(.DATA_W(CS_W)) u_cs_dec (
    .code_i      (datain5),
    .data_o      (checksum),
    .syndrome_o  (cs_syn),
    .corrected_o (cs_corr),
    .nonzero_o   (cs_nz)
  );

  checksum_rx u_checksum (
    .data_i     (bytes),
    .checksum_i (checksum),
    .zero10_i   (zero10),
    .zero11_i   (zero11),
    .retrans_o  (retrans)
  );

  assign dout1 = bytes[0];
  assign dout2 = bytes[1];
  assign dout3 = bytes[2];
  assign dout4 = bytes[3];

  // Decoder status is only observed internally (no pins for it on the receiver).
  logic unused_status;
  assign unused_status = ^{byte_syn, byte_corr, byte_nz, cs_syn, cs_corr, cs_nz};

endmodule
