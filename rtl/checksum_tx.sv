// checksum_tx: checksum generator of the transmitter.
//
// Adds the NUM_BYTES input bytes into a SUM_W-bit sum seeded with zero10_i and
// returns checksum_o = (zero11_i - sum) mod 2**CS_W. With both seed pins at zero
// (their only intended value) this is the two's complement of the byte sum, so
// the byte sum plus the checksum is a multiple of 2**CS_W: four bytes of 8'hFF
// (sum 1020) give 12'hC04.
//
// The seed pins exist because the link's pin tables list them (ZERO10, 10 bits,
// and ZERO11, 11 bits, "always equal to zero"); using them as the start values
// of the byte adder and of the subtraction is this design's reading of them.
// An assertion reports a non-zero seed in simulation.
//
// Interface: data_i (NUM_BYTES bytes, index 0 = datain1), zero10_i, zero11_i
// in; checksum_o out; sum_o (the seeded byte sum) out for observation. No clock.
module checksum_tx
  import edac_pkg::*;
#(
  parameter int unsigned N_BYTES = NUM_BYTES,
  parameter int unsigned B_W     = BYTE_W,
  parameter int unsigned S_W     = SUM_W,
  parameter int unsigned C_W     = CS_W,
  parameter int unsigned Z_W     = SEED_W
) (
  input  logic [N_BYTES-1:0][B_W-1:0] data_i,
  input  logic [S_W-1:0]              zero10_i,
  input  logic [Z_W-1:0]              zero11_i,
  output logic [S_W-1:0]              sum_o,
  output logic [C_W-1:0]              checksum_o
);

  always_comb begin
    logic [S_W-1:0] acc;
    acc = zero10_i;
    for (int unsigned b = 0; b < N_BYTES; b++)
      acc = acc + S_W'(data_i[b]);
    sum_o      = acc;
    checksum_o = C_W'(zero11_i) - C_W'(acc);
  end

  always_comb
    assert (zero10_i == '0 && zero11_i == '0)
      else $error("checksum_tx: seed pins must be zero");

endmodule
