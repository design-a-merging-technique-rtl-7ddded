// edac_tx_tb: checks the transmitter.
//
// Four bytes 8'hFF must give dout1..4 = 12'hEEF and dout5 = 17'h05208; bytes
// 8'h1A must give 12'h92A; random words are compared with the reference
// encoders applied to the bytes and to their checksum.
module edac_tx_tb;
  import edac_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  din [4];
  logic [11:0] dout [4];
  logic [16:0] dout5;

  edac_tx dut (
    .datain1(din[0]), .datain2(din[1]), .datain3(din[2]), .datain4(din[3]),
    .zero10('0), .zero11('0),
    .dout1(dout[0]), .dout2(dout[1]), .dout3(dout[2]), .dout4(dout[3]), .dout5(dout5));

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (din[i]) din[i] = 8'hFF;
    #1;
    foreach (dout[i]) check("FF byte", 32'(dout[i]), 32'h0EEF);
    check("FF checksum word", 32'(dout5), 32'h05208);
    foreach (din[i]) din[i] = 8'h1A;
    #1;
    foreach (dout[i]) check("1A byte", 32'(dout[i]), 32'h092A);
    check("1A checksum word", 32'(dout5), 32'(ref_enc12(12'hF98)));
    for (int n = 0; n < 2000; n++) begin
      foreach (din[i]) din[i] = 8'($urandom);
      #1;
      foreach (dout[i]) check("byte", 32'(dout[i]), 32'(ref_enc8(din[i])));
      check("checksum word", 32'(dout5),
            32'(ref_enc12(ref_checksum(din[0], din[1], din[2], din[3]))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
