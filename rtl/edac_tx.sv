// edac_tx: transmitter of the merged Hamming + checksum link (pin names TX).
//
// A 32-bit word arrives as four bytes, datain1..datain4. Each byte goes through
// its own 8-bit Hamming encoder and leaves as a 12-bit codeword (dout1..dout4),
// so every byte can have one bit corrected on its own. In parallel the
// checksum generator forms the 12-bit two's-complement of the byte sum, and a
// 12-bit Hamming encoder protects it as the 17-bit word dout5.
// Reference vectors: four bytes 8'hFF -> dout1..4 = 12'hEEF, dout5 = 17'h05208;
// byte 8'h1A -> 12'h92A.
//
// zero10 (10 bits) and zero11 (11 bits) are the link's "always zero" pins; here
// they seed the checksum adder and subtractor (see checksum_tx).
//
// Purely combinational, no clock or reset: outputs follow inputs after the
// adder and XOR-tree delays.
module edac_tx
  import edac_pkg::*;
(
  input  logic [BYTE_W-1:0]    datain1,
  input  logic [BYTE_W-1:0]    datain2,
  input  logic [BYTE_W-1:0]    datain3,
  input  logic [BYTE_W-1:0]    datain4,
  input  logic [SUM_W-1:0]     zero10,
  input  logic [SEED_W-1:0]    zero11,
  output logic [BYTE_CW_W-1:0] dout1,
  output logic [BYTE_CW_W-1:0] dout2,
  output logic [BYTE_CW_W-1:0] dout3,
  output logic [BYTE_CW_W-1:0] dout4,
  output logic [CS_CW_W-1:0]   dout5
);

  logic [NUM_BYTES-1:0][BYTE_W-1:0]    bytes;
  logic [NUM_BYTES-1:0][BYTE_CW_W-1:0] codes;
  logic [SUM_W-1:0]                    sum;
  logic [CS_W-1:0]                     checksum;

  assign bytes = {datain4, datain3, datain2, datain1};

  for (genvar b = 0; b < NUM_BYTES; b++) begin : g_byte_enc
    hamming_enc #(.DATA_W(BYTE_W)) u_enc (
      .data_i (bytes[b]),
      .code_o (codes[b])
    );
  end

  checksum_tx u_checksum (
    .data_i     (bytes),
    .zero10_i   (zero10),
    .zero11_i   (zero11),
    .sum_o      (sum),
    .checksum_o (checksum)
  );

  hamming_enc #(.DATA_W(CS_W)) u_cs_enc (
    .data_i (checksum),
    .code_o (dout5)
  );

  assign dout1 = codes[0];
  assign dout2 = codes[1];
  assign dout3 = codes[2];
  assign dout4 = codes[3];

  // The byte sum is only observed internally.
  logic unused_sum;
  assign unused_sum = ^sum;

endmodule
