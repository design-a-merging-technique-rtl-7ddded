// checksum_rx: checksum checker of the receiver, producing RETRANS.
//
// Recovers the byte sum the transmitter saw, expected = (zero11_i - checksum_i)
// mod 2**C_W, adds the received (already Hamming-corrected) bytes into a
// S_W-bit sum seeded with zero10_i, and outputs
//     retrans_o = expected - received   (R_W = 13 bits, two's complement).
// RETRANS is zero exactly when the two sums agree; any other value asks the
// sender to retransmit. With the reference burst-error case (checksum 12'hC04,
// bytes 00 FF 6E 00) it gives 13'h028F.
//
// The width of RETRANS (13 bits) and the example values are the link's own; the
// subtraction that produces them is this design's reconstruction. The seed pins
// play the same role as in checksum_tx.
//
// Interface: data_i (corrected bytes, index 0 = dout1), checksum_i, zero10_i,
// zero11_i in; retrans_o out. No clock.
module checksum_rx
  import edac_pkg::*;
#(
  parameter int unsigned N_BYTES = NUM_BYTES,
  parameter int unsigned B_W     = BYTE_W,
  parameter int unsigned S_W     = SUM_W,
  parameter int unsigned C_W     = CS_W,
  parameter int unsigned Z_W     = SEED_W,
  parameter int unsigned R_W     = RETRANS_W
) (
  input  logic [N_BYTES-1:0][B_W-1:0] data_i,
  input  logic [C_W-1:0]              checksum_i,
  input  logic [S_W-1:0]              zero10_i,
  input  logic [Z_W-1:0]              zero11_i,
  output logic [R_W-1:0]              retrans_o
);

  always_comb begin
    logic [S_W-1:0] acc;
    logic [C_W-1:0] expected;
    acc = zero10_i;
    for (int unsigned b = 0; b < N_BYTES; b++)
      acc = acc + S_W'(data_i[b]);
    expected  = C_W'(zero11_i) - checksum_i;
    retrans_o = R_W'(expected) - R_W'(acc);
  end

  always_comb
    assert (zero10_i == '0 && zero11_i == '0)
      else $error("checksum_rx: seed pins must be zero");

endmodule
