// hamming_enc: single-error-correcting Hamming encoder, combinational.
//
// DATA_W data bits become a CODE_W = DATA_W + R bit codeword, R being the
// smallest count with 2**R >= DATA_W + R + 1 (8 -> 12 bits, 12 -> 17 bits).
// Codeword positions are numbered 1..CODE_W; parity bit H_i sits at position
// 2**(i-1) and the data bits D1, D2, ... fill the remaining positions in order.
// Parity H_i makes the XOR over all positions whose index has bit i-1 set equal
// to zero (even parity), so a clean word has a zero syndrome at the receiver.
//
// Bit order: position 1 is the codeword's most significant bit and D1 is the
// data word's most significant bit. This order reproduces the link's reference
// vectors (byte 8'hFF -> 12'hEEF, byte 8'h1A -> 12'h92A).
//
// Interface: data_i (DATA_W) in, code_o (CODE_W) out, no clock; the output
// follows the input after the XOR-tree delay. The link uses one instance with
// DATA_W = 8 per byte and one with DATA_W = 12 for the checksum.
module hamming_enc
  import edac_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned R      = parity_count(DATA_W),
  localparam int unsigned CODE_W = DATA_W + R
) (
  input  logic [DATA_W-1:0] data_i,
  output logic [CODE_W-1:0] code_o
);

  // Data bit D(k+1) = data_i[DATA_W-1-k] goes to position data_pos(k).
  for (genvar k = 0; k < DATA_W; k++) begin : g_data
    localparam int unsigned P = data_pos(k);
    assign code_o[CODE_W-P] = data_i[DATA_W-1-k];
  end

  // Parity bit H(i+1) at position 2**i: even parity over the data bits whose
  // positions have bit i set.
  for (genvar i = 0; i < R; i++) begin : g_parity
    localparam logic [DATA_W-1:0] MASK = DATA_W'(parity_data_mask(DATA_W, i));
    assign code_o[CODE_W-(1<<i)] = ^(data_i & MASK);
  end

endmodule
