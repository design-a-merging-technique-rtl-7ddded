// hamming_dec_tb: checks the Hamming decoder.
//
// Byte decoder (DATA_W = 8): every byte with no error and with each single-bit
// error, and random double errors, against the nearest-codeword reference;
// status flags (corrected, nonzero, syndrome = flipped position); the link's
// received words EEE, EE7, EEB, EED -> FF, CDE -> 6E, AB1 and AFD -> 00.
// Checksum decoder (DATA_W = 12): 17'h05208 -> 12'hC04 and random words with
// zero or one error. A second byte decoder with ZERO_ON_NON_DATA_SYNDROME = 0
// must keep the data when a parity bit is hit.
module hamming_dec_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [11:0] c8;
  logic [7:0]  d8, d8k;
  logic [3:0]  s8, s8k;
  logic        corr8, nz8, corr8k, nz8k;
  logic [16:0] c17;
  logic [11:0] d12;
  logic [4:0]  s12;
  logic        corr12, nz12;
  logic [7:0]  ref8;
  logic [11:0] ref12;

  // Reference results follow the received words combinationally.
  always_comb ref8  = ref_dec8(c8);
  always_comb ref12 = ref_dec12(c17);

  hamming_dec #(.DATA_W(8)) dut8 (
    .code_i(c8), .data_o(d8), .syndrome_o(s8), .corrected_o(corr8), .nonzero_o(nz8));
  hamming_dec #(.DATA_W(8), .ZERO_ON_NON_DATA_SYNDROME(1'b0)) dut8k (
    .code_i(c8), .data_o(d8k), .syndrome_o(s8k), .corrected_o(corr8k), .nonzero_o(nz8k));
  hamming_dec #(.DATA_W(12)) dut12 (
    .code_i(c17), .data_o(d12), .syndrome_o(s12), .corrected_o(corr12), .nonzero_o(nz12));

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] table_in  [7] = '{12'hEEE, 12'hEE7, 12'hEEB, 12'hEED, 12'hCDE, 12'hAB1, 12'hAFD};
    logic [7:0]  table_out [7] = '{8'hFF,   8'hFF,   8'hFF,   8'hFF,   8'h6E,   8'h00,   8'h00};
    c17 = '0;
    for (int i = 0; i < 7; i++) begin
      c8 = table_in[i]; #1;
      check($sformatf("table %03h", table_in[i]), 32'(d8), 32'(table_out[i]));
    end
    for (int d = 0; d < 256; d++) begin
      logic [11:0] cw;
      cw = ref_enc8(8'(d));
      c8 = cw; #1;
      check("clean data", 32'(d8), 32'(d));
      check("clean flags", {corr8, nz8, s8}, 0);
      for (int p = 1; p <= 12; p++) begin
        c8 = cw ^ (12'b1 << (12 - p)); #1;
        check("1-bit data", 32'(d8), 32'(ref8));
        check("1-bit syndrome", 32'(s8), 32'(p));
        check("1-bit nonzero", 32'(nz8), 1);
        check("1-bit corrected", 32'(corr8), 32'(!is_pow2(p)));
        check("1-bit keep-data", 32'(d8k), 32'(d));
      end
      for (int n = 0; n < 4; n++) begin
        int a, b;
        a = $urandom_range(11); b = (a + 1 + $urandom_range(10)) % 12;
        c8 = cw ^ (12'b1 << a) ^ (12'b1 << b); #1;
        check("2-bit data", 32'(d8), 32'(ref8));
        check("2-bit nonzero", 32'(nz8), 1);
      end
    end
    c17 = 17'h05208; #1;
    check("05208", 32'(d12), 32'h0C04);
    check("05208 flags", {corr12, nz12}, 0);
    for (int n = 0; n < 300; n++) begin
      logic [11:0] d;
      logic [16:0] cw;
      int p;
      d = 12'($urandom);
      cw = ref_enc12(d);
      p = $urandom_range(17);   // 0 = no error
      c17 = (p == 0) ? cw : cw ^ (17'b1 << (17 - p)); #1;
      check("cs data", 32'(d12), 32'(ref12));
      check("cs syndrome", 32'(s12), 32'(p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
